// tb_weight_mem: loads every weight of a default-size weight memory one at a
// time in random element order, then reads all words back in random order
// and checks each against a copy kept here, one clock after the address.
module tb_weight_mem;
  localparam int DEPTH = 69, ELEMS = 20, W = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic [4:0] wr_elem = '0;
  logic [W-1:0] wr_data = '0;
  logic [ELEMS-1:0][W-1:0] rd_data;
  int checks = 0, failures = 0;
  int ref_w [DEPTH][ELEMS];

  weight_mem u_dut (.*);

  initial begin
    int a, e;
    @(negedge clk);
    for (a = 0; a < DEPTH; a++)
      for (e = 0; e < ELEMS; e++) begin
        ref_w[a][e] = $urandom_range(511);
        we = 1; wr_addr = 7'(a); wr_elem = 5'(ELEMS - 1 - e); wr_data = W'(ref_w[a][e]);
        @(negedge clk);
      end
    we = 0;
    for (int t = 0; t < 300; t++) begin
      a = (t < DEPTH) ? t : $urandom_range(DEPTH-1);
      rd_addr = 7'(a);
      @(negedge clk);
      for (e = 0; e < ELEMS; e++) begin
        checks++;
        if (int'(rd_data[ELEMS - 1 - e]) != ref_w[a][e]) begin
          failures++;
          if (failures < 10) $display("word %0d elem %0d: %0d expected %0d", a, ELEMS-1-e, rd_data[ELEMS-1-e], ref_w[a][e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
