// tb_satlin_unit: streams sums from -200 to +200 (and the extremes of the
// input range) through the shared activation unit, one per clock, and checks
// that each result appears exactly two clocks later with its tag and lies
// within one output LSB of the real-valued satlin with th = 2.5
// (inputs have FC_FRAC fraction bits, output SAT_ONE means 1.0).
module tb_satlin_unit;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0;
  logic signed [FC_ACC_W-1:0] x = '0;
  logic [CODE_W-1:0] tag_in = '0, tag_out;
  logic out_valid;
  logic [SAT_OUT_W-1:0] y;
  int checks = 0, failures = 0;
  int lo = 0, lin = 0, hi = 0;

  satlin_unit u_dut (.*);

  int xs [$];
  int sent = 0, got = 0;

  function automatic real satlin(int v);
    real r;
    r = 0.5 + (real'(v) / real'(1 << FC_FRAC)) * 0.5 / 2.5;
    if (r < 0.0) r = 0.0;
    if (r > 1.0) r = 1.0;
    return r * SAT_ONE;
  endfunction

  // expected output two clocks after each input
  int pipe_v [3], pipe_x [3];
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== 1'(pipe_v[1])) begin failures++; $display("out_valid %b expected %0d", out_valid, pipe_v[1]); end
      if (out_valid && pipe_v[1] == 1) begin
        real e;
        e = satlin(pipe_x[1]);
        checks++;
        if ((real'(y) - e) > 1.0 || (e - real'(y)) > 1.0) begin
          failures++;
          if (failures < 10) $display("x %0d: y %0d expected %f", pipe_x[1], y, e);
        end
        checks++;
        if (tag_out !== CODE_W'(pipe_x[1])) begin failures++; $display("tag %0d for x %0d", tag_out, pipe_x[1]); end
        if (y == 0) lo++; else if (int'(y) == SAT_ONE) hi++; else lin++;
      end
    end
    pipe_v[1] = pipe_v[0]; pipe_x[1] = pipe_x[0];
    pipe_v[0] = int'(in_valid); pipe_x[0] = int'(x);
  end

  initial begin
    pipe_v[0] = 0; pipe_v[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = -200; v <= 200; v++) xs.push_back(v);
    xs.push_back(-(1 << (FC_ACC_W-1)));
    xs.push_back((1 << (FC_ACC_W-1)) - 1);
    foreach (xs[i]) begin
      in_valid = 1; x = FC_ACC_W'(xs[i]); tag_in = CODE_W'(xs[i]);
      @(negedge clk);
      if (i % 7 == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (lo == 0 || hi == 0 || lin == 0) begin failures++; $display("region missed %0d %0d %0d", lo, lin, hi); end
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
