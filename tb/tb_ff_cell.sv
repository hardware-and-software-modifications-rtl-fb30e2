// tb_ff_cell: feeds random sequences of binary inputs and signed weights to
// the FC cell (with idle clocks in between) and checks after each step that
// acc is the sum of the weights whose input was 1 since the last `first`.
module tb_ff_cell;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, first = 1'b0, x = 1'b0;
  logic signed [FC_W-1:0] w = '0;
  logic signed [FC_ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  ff_cell u_dut (.*);

  initial begin
    int e, wv, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      n = (s == 0) ? FC_IN : $urandom_range(1, 64);
      e = 0;
      for (int i = 0; i < n; i++) begin
        in_valid = 1; first = (i == 0);
        x = (s == 0) ? 1'b1 : 1'($urandom);
        wv = (s == 0) ? 255 : int'($urandom_range(511)) - 256;
        w = FC_W'(wv);
        if (x) e = (i == 0) ? wv : e + wv;
        else if (i == 0) e = 0;
        @(negedge clk);
        checks++;
        if (int'(acc) != e) begin
          failures++;
          if (failures < 10) $display("seq %0d step %0d: acc %0d expected %0d", s, i, acc, e);
        end
        if ($urandom_range(4) == 0) begin
          in_valid = 0; x = 1; w = FC_W'(77);
          @(negedge clk);
          checks++;
          if (int'(acc) != e) begin failures++; $display("acc changed while idle"); end
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
