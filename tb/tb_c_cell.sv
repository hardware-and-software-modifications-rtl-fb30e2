// tb_c_cell: applies the all-zero field, every single-cell field and random
// fields to the 16-input C cell and checks that it fires exactly when at
// least one input cell fires.
module tb_c_cell;
  logic [15:0] field = '0;
  logic        out;
  int checks = 0, failures = 0;

  c_cell u_dut (.*);

  task automatic chk();
    logic e;
    #1;
    e = 1'b0;
    for (int i = 0; i < 16; i++) if (field[i]) e = 1'b1;
    checks++;
    if (out !== e) begin failures++; $display("field %h: out %b", field, out); end
  endtask

  initial begin
    field = '0; chk();
    for (int i = 0; i < 16; i++) begin field = 16'(1) << i; chk(); end
    for (int t = 0; t < 500; t++) begin
      field = 16'($urandom);
      if (t % 3 == 0) field = field & 16'($urandom) & 16'($urandom);
      chk();
    end
    field = '0; chk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
