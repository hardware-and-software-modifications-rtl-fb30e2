// control_unit (CU): sequences one recognition through the five layers.
//
// A start pulse runs S1 -> C1 -> S2 -> C2 -> FC -> ACT and returns to idle;
// `phase` tells the memory unit which maps are being written and read.
//   S1, S2  pulse su_start (su_mode 0 / 1) and wait for the PE array's s_done.
//   C1, C2  step the C-cell position (c_row, c_col) over the C map, one per
//           clock, addressing the S-map window at (stride*row, stride*col);
//           wait for c_done.
//   FC      step the input number n = ((row*C2_OUT)+col)*S2_PLANES + plane over
//           all FC_IN inputs, one per clock, with the matching weight address;
//           wait for fc_done.
//   ACT     send the N_CLASS output cells one per clock to the shared satlin
//           unit; wait for recog_end.
// Issue signals (c_valid, fc_valid, act_valid and their addresses) are
// combinational from the counters: they are valid in the clock the address is
// presented to the memories. `clear` is a one-clock pulse at start.
// The control unit as a sequencer of a SIMD array follows the published block
// diagram; the phase order and handshakes are this design's choice.
module control_unit
  import mneo_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output phase_t                        phase,
  output logic                          clear,
  // segmentation unit
  output logic                          su_start,
  output logic                          su_mode,
  input  logic                          s_done,
  // C layers
  output logic                          c_valid,
  output logic                          c_last,
  output logic [POS_W-1:0]              c_row,
  output logic [POS_W-1:0]              c_col,
  output logic [POS_W-1:0]              c_rd_row,
  output logic [POS_W-1:0]              c_rd_col,
  input  logic                          c_done,
  // FC layer
  output logic                          fc_valid,
  output logic                          fc_first,
  output logic                          fc_last,
  output logic [$clog2(S2_PLANES)-1:0]  fc_plane,
  output logic [POS_W-1:0]              fc_rd_row,
  output logic [POS_W-1:0]              fc_rd_col,
  output logic [FC_AW-1:0]              fc_w_addr,
  input  logic                          fc_done,
  // activation
  output logic                          act_valid,
  output logic [CODE_W-1:0]             act_idx,
  input  logic                          recog_end
);

  logic             issuing;
  logic [POS_W-1:0] ci, cj;
  logic [POS_W-1:0] c_max;
  logic [FC_AW-1:0] n;
  logic [CODE_W-1:0] k;

  always_comb begin
    c_max     = (phase == PH_C2) ? POS_W'(C2_OUT - 1) : POS_W'(C1_OUT - 1);
    c_valid   = issuing && (phase == PH_C1 || phase == PH_C2);
    c_last    = (ci == c_max) && (cj == c_max);
    c_row     = ci;
    c_col     = cj;
    c_rd_row  = (phase == PH_C2) ? POS_W'(int'(ci) * C2_STRIDE) : POS_W'(int'(ci) * C1_STRIDE);
    c_rd_col  = (phase == PH_C2) ? POS_W'(int'(cj) * C2_STRIDE) : POS_W'(int'(cj) * C1_STRIDE);

    fc_valid  = issuing && phase == PH_FC;
    fc_first  = (n == '0);
    fc_last   = (n == FC_AW'(FC_IN - 1));
    fc_plane  = n[$clog2(S2_PLANES)-1:0];
    fc_rd_row = POS_W'((int'(n) / S2_PLANES) / C2_OUT);
    fc_rd_col = POS_W'((int'(n) / S2_PLANES) % C2_OUT);
    fc_w_addr = n;

    act_valid = issuing && phase == PH_ACT;
    act_idx   = k;

    busy      = (phase != PH_IDLE);
  end

  // at most one layer issues a step in any clock
  a_one_issue: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({c_valid, fc_valid, act_valid}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      issuing  <= 1'b0;
      clear    <= 1'b0;
      su_start <= 1'b0;
      su_mode  <= 1'b0;
      ci <= '0; cj <= '0; n <= '0; k <= '0;
    end else begin
      clear    <= 1'b0;
      su_start <= 1'b0;
      case (phase)
        PH_IDLE: if (start) begin
          phase    <= PH_S1;
          clear    <= 1'b1;
          su_start <= 1'b1;
          su_mode  <= 1'b0;
        end
        PH_S1, PH_S2: if (s_done) begin
          phase   <= (phase == PH_S1) ? PH_C1 : PH_C2;
          issuing <= 1'b1;
          ci <= '0; cj <= '0;
        end
        PH_C1, PH_C2: begin
          if (issuing) begin
            if (cj != c_max) cj <= cj + 1'b1;
            else begin
              cj <= '0;
              if (ci != c_max) ci <= ci + 1'b1;
              else issuing <= 1'b0;
            end
          end
          if (c_done) begin
            if (phase == PH_C1) begin
              phase    <= PH_S2;
              su_start <= 1'b1;
              su_mode  <= 1'b1;
            end else begin
              phase   <= PH_FC;
              issuing <= 1'b1;
              n       <= '0;
            end
          end
        end
        PH_FC: begin
          if (issuing) begin
            if (fc_last) issuing <= 1'b0;
            else         n <= n + 1'b1;
          end
          if (fc_done) begin
            phase   <= PH_ACT;
            issuing <= 1'b1;
            k       <= '0;
          end
        end
        PH_ACT: begin
          if (issuing) begin
            if (k == CODE_W'(N_CLASS - 1)) issuing <= 1'b0;
            else                           k <= k + 1'b1;
          end
          if (recog_end && !issuing) phase <= PH_DONE;
        end
        default: phase <= PH_IDLE;   // PH_DONE: one clock, then idle
      endcase
    end
  end

endmodule
