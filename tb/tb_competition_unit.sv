// tb_competition_unit: presents random positions of 1 to 4 plane groups of
// four distances (many with ties, within and across groups) and checks that,
// one clock after the last group, win_valid pulses with the plane of smallest
// distance (lowest plane on ties) and the position tag of that group.
module tb_competition_unit;
  import mneo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, last = 1'b0;
  logic [GRP_W-1:0] grp = '0;
  logic [N_PE-1:0][DIST_W-1:0] dsum = '0;
  logic [2*POS_W:0] tag_in = '0, tag_out;
  logic win_valid;
  logic [$clog2(N_PE*N_GRP)-1:0] win_idx;
  int checks = 0, failures = 0, later_wins = 0;

  competition_unit u_dut (.*);

  initial begin
    int ng, best, bd, d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 400; p++) begin
      ng = (p % 2) ? N_GRP : $urandom_range(1, N_GRP);
      best = 0; bd = 0;
      for (int g = 0; g < ng; g++) begin
        in_valid = 1; grp = GRP_W'(g); last = (g == ng - 1);
        tag_in = (2*POS_W+1)'($urandom);
        for (int k = 0; k < N_PE; k++) begin
          d = (p % 3 == 0) ? $urandom_range(3) : $urandom_range(20000);
          dsum[k] = DIST_W'(d);
          if ((g == 0 && k == 0) || d < bd) begin bd = d; best = g * N_PE + k; end
        end
        @(negedge clk);
        checks++;
        if (win_valid !== last) begin failures++; $display("win_valid %b at group %0d of %0d", win_valid, g, ng); end
        if (last) begin
          checks += 2;
          if (int'(win_idx) != best) begin
            failures++;
            if (failures < 10) $display("position %0d: winner %0d expected %0d", p, win_idx, best);
          end
          if (tag_out !== tag_in) begin failures++; $display("tag %h expected %h", tag_out, tag_in); end
          if (best >= N_PE) later_wins++;
        end
        if ($urandom_range(3) == 0) begin in_valid = 0; last = 0; dsum = '0; @(negedge clk); end
      end
      in_valid = 0; last = 0;
    end
    checks++;
    if (later_wins == 0) begin failures++; $display("no winner from a later group"); end
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
