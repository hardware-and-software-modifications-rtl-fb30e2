// tb_s_cell_pe: streams random fields of 1 to 16 beats (random lane masks,
// some beats idle in between) through the distance PE and checks, on the
// clock after each field's last beat, that dvalid pulses and dsum equals the
// sum of |x - w| over the unmasked lanes computed here.
module tb_s_cell_pe;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic [LANES-1:0] mask = '0;
  logic [LANES-1:0][PIX_W-1:0] x = '0, w = '0;
  logic [DIST_W-1:0] dsum;
  logic dvalid;
  int checks = 0, failures = 0;

  s_cell_pe u_dut (.*);

  initial begin
    int n, e, xv, wv;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      n = $urandom_range(1, 16);
      e = 0;
      for (int b = 0; b < n; b++) begin
        in_valid = 1; first = (b == 0); last = (b == n - 1);
        mask = (f % 2) ? '1 : LANES'($urandom);
        for (int l = 0; l < LANES; l++) begin
          xv = (f % 5 == 0) ? 511 : $urandom_range(511);
          wv = (f % 5 == 0) ? 0 : $urandom_range(511);
          x[l] = PIX_W'(xv); w[l] = PIX_W'(wv);
          if (mask[l]) e += (xv > wv) ? xv - wv : wv - xv;
        end
        @(negedge clk);
        checks++;
        if (dvalid !== last) begin failures++; $display("dvalid %b on beat %0d of %0d", dvalid, b, n); end
        if ($urandom_range(3) == 0) begin
          in_valid = 0; first = 0; last = 0;
          x = '1;
          @(negedge clk);
        end
      end
      in_valid = 0; first = 0; last = 0;
      checks++;
      if (int'(dsum) != e) begin
        failures++;
        if (failures < 10) $display("field %0d: dsum %0d expected %0d", f, dsum, e);
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
