// mneo_pkg: sizes, number formats and shared types of the modified-neocognitron
// (MNEO) face recogniser.
//
// The network takes a 32x32 grey image through five layers:
//   S1  4 planes, 5x5 receptive field, stride 1      -> 28x28x4 one-hot map
//   C1  4 planes, 4x4 OR window, stride 2            -> 13x13x4 binary map
//   S2 16 planes, 4x4x4 receptive field, stride 1    -> 10x10x16 one-hot map
//   C2 16 planes, 4x4 OR window, stride 2            ->  4x4x16 binary map
//   FC 12 output cells on the 256 C2 bits, satlin activation, arg-max -> class code
// The layer counts, window sizes, overlaps, 12 classes, 9-bit data and the
// 5-lane x 4-PE array follow the published network. Number formats (where the
// binary point sits, the satlin constants in fixed point, the beat layout) are
// this design's own choices and are described next to each constant.
package mneo_pkg;

  // ---------------- network geometry ----------------
  localparam int IMG_SIZE  = 32;   // input image is IMG_SIZE x IMG_SIZE pixels
  localparam int PIX_W     = 9;    // data and S-layer weight width ("9 bits ~ 1 byte")

  localparam int S1_PLANES = 4;
  localparam int S1_WIN    = 5;
  localparam int S1_STRIDE = 1;    // 5x5 fields overlapping by 4 pixels
  localparam int S1_OUT    = (IMG_SIZE - S1_WIN) / S1_STRIDE + 1;   // 28

  localparam int C1_WIN    = 4;
  localparam int C1_STRIDE = 2;    // 4x4 fields overlapping by 2 pixels
  localparam int C1_OUT    = (S1_OUT - C1_WIN) / C1_STRIDE + 1;     // 13

  localparam int S2_PLANES = 16;
  localparam int S2_WIN    = 4;
  localparam int S2_STRIDE = 1;    // 4x4 fields overlapping by 3 pixels
  localparam int S2_OUT    = (C1_OUT - S2_WIN) / S2_STRIDE + 1;     // 10

  localparam int C2_WIN    = 4;
  localparam int C2_STRIDE = 2;    // 4x4 fields overlapping by 2 pixels
  localparam int C2_OUT    = (S2_OUT - C2_WIN) / C2_STRIDE + 1;     // 4

  localparam int FC_IN     = C2_OUT * C2_OUT * S2_PLANES;           // 256
  localparam int N_CLASS   = 12;

  // ---------------- S-layer processing element array ----------------
  localparam int LANES     = 5;    // input connections evaluated per PE per clock
  localparam int N_PE      = 4;    // PEs (weight connections) working in parallel
  localparam int N_GRP     = S2_PLANES / N_PE;                      // S2 plane groups
  localparam int GRP_W     = $clog2(N_GRP);
  // Manhattan distance: at most S2_WIN*S2_WIN*S1_PLANES terms of PIX_W bits.
  localparam int DIST_W    = PIX_W + $clog2(S2_WIN * S2_WIN * S1_PLANES) + 1;
  // A binary C1 cell that is '1' enters S2 as this value (1.0 in the
  // unsigned 9-bit weight scale whose full range is 0..256).
  localparam int BIN_ONE   = 1 << (PIX_W - 1);

  // S-weight memory: S1 uses S1_WIN words (one per field row); S2 uses one
  // word per (plane group, input plane, field row). A word holds N_PE x LANES weights.
  localparam int SW_S1_WORDS = S1_WIN;
  localparam int SW_S2_BASE  = SW_S1_WORDS;
  localparam int SW_S2_WORDS = N_GRP * S1_PLANES * S2_WIN;
  localparam int SW_DEPTH    = SW_S1_WORDS + SW_S2_WORDS;          // 69
  localparam int SW_AW       = $clog2(SW_DEPTH);

  // ---------------- fully connected layer and satlin ----------------
  localparam int FC_W      = 9;    // signed weight, FC_FRAC fraction bits
  localparam int FC_FRAC   = 5;
  localparam int FC_ACC_W  = FC_W + $clog2(FC_IN);                  // 17
  localparam int FC_AW     = $clog2(FC_IN);
  localparam int SAT_OUT_W = 9;    // unsigned output, SAT_ONE means 1.0
  localparam int SAT_ONE   = 1 << (SAT_OUT_W - 1);
  localparam int SAT_HALF  = SAT_ONE / 2;
  // Saturation threshold th = 2.5, in accumulator units (2.5 * 2^FC_FRAC).
  localparam int SAT_TH    = 80;
  // Slope 0.5/th expressed as output LSBs per accumulator LSB, scaled by
  // 2^SAT_SHIFT: 0.5/2.5 * SAT_ONE / 2^FC_FRAC * 2^10 = 1638.4.
  localparam int SAT_SHIFT = 10;
  localparam int SAT_SLOPE = 1638;
  localparam int CODE_W    = $clog2(N_CLASS);

  // ---------------- shared types ----------------
  localparam int POS_W = $clog2(IMG_SIZE);

  // Layer currently run by the control unit.
  typedef enum logic [2:0] {
    PH_IDLE, PH_S1, PH_C1, PH_S2, PH_C2, PH_FC, PH_ACT, PH_DONE
  } phase_t;

  // One beat of the segmented S-layer input stream (see segmentation_unit).
  typedef struct packed {
    logic             valid;     // beat carries data
    logic             first;     // first beat of a plane group: clear accumulators
    logic             last_grp;  // last beat of a plane group: distances complete
    logic             last_pos;  // last beat of a receptive-field position
    logic             last_all;  // last beat of the layer
    logic [GRP_W-1:0] grp;       // plane group (S2 only, 0 for S1)
    logic [POS_W-1:0] row;       // output position of the field
    logic [POS_W-1:0] col;
  } beat_t;

endpackage
