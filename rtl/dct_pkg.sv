// dct_pkg: types and constants shared by the upgraded drift-chamber trigger
// interface (TSF -> TSFi -> channel link -> ZPD_i -> ZPD, ZPD -> GLT_i).
//
// Numbers that come from the interface specification: 3 segments kept per
// 2pi/16 sector and superlayer, a 4-bit rank, 21 segment pins for a TSFX and
// 18 for a TSFY, a 28-bit link word, a 16-word frame per event (16 clocks of
// 60 MHz = 267 ns), fields loc[3:0], phi[5:0], dPhi[2:0] plus a mask (valid)
// bit, 16 TSFX, 8 TSFY, 8 ZPDs, 6 ZPD output bits of which the GLT uses 4,
// 2 bits per PTD and 16-bit GLT slots.
// Choices of this design: 16 candidate positions per sector and superlayer
// (the range of the 4-bit loc field), a 4-bit layer hit pattern and a 2-bit
// weight as the rank table address, and the layout of the test pattern.
package dct_pkg;

  // ---- segment selection (TSF) ----
  localparam int unsigned NSEL    = 3;   // segments kept per sector and superlayer
  localparam int unsigned NCAND   = 16;  // candidate positions per sector and superlayer
  localparam int unsigned LOC_W   = 4;
  localparam int unsigned PHI_W   = 6;
  localparam int unsigned DPHI_W  = 3;
  localparam int unsigned RANK_W  = 4;
  localparam int unsigned PAT_W   = 4;   // hit layers of the 4-layer superlayer
  localparam int unsigned WGT_W   = 2;   // calibrated resolution category
  localparam int unsigned LUT_AW  = PAT_W + WGT_W;

  // ---- link and frame ----
  localparam int unsigned LINK_W      = 28;  // channel-link word
  localparam int unsigned FRAME_WORDS = 16;  // words per event frame
  localparam int unsigned TSFX_GRP    = 7;   // groups of 3 pins on a TSFX link
  localparam int unsigned TSFY_GRP    = 6;   // groups of 3 pins on a TSFY link
  localparam int unsigned CELLS_PER_GRP = 2; // supercells (2pi/32) per 2pi/16 sector

  // ---- system ----
  localparam int unsigned N_TSFX  = 16;
  localparam int unsigned N_TSFY  = 8;
  localparam int unsigned N_ZPD   = 8;
  localparam int unsigned ZPD_OUT_W = 6;
  localparam int unsigned PTD_OUT_W = 2;
  localparam int unsigned GLT_W   = 16;

  // A segment candidate as found by the TSF segment finder.
  typedef struct packed {
    logic              valid;   // a segment was found at this position
    logic              fine;    // it has fine-phi data (phi error < 5 mm)
    logic [PAT_W-1:0]  pattern;
    logic [WGT_W-1:0]  weight;
    logic [PHI_W-1:0]  phi;
    logic [DPHI_W-1:0] dphi;
  } cand_t;

  // A selected segment as sent to the ZPD.
  typedef struct packed {
    logic              mask;    // slot holds a segment
    logic [LOC_W-1:0]  loc;
    logic [PHI_W-1:0]  phi;
    logic [DPHI_W-1:0] dphi;
  } seg_t;

  // Bit that a segment pin carries in word w of a frame:
  // word 0 mask, words 1-4 loc[3..0], words 5-10 phi[5..0],
  // words 11-13 dPhi[2..0], words 14-15 zero.
  function automatic logic seg_frame_bit(seg_t s, logic [3:0] w);
    logic b;
    if (w == 4'd0)       b = s.mask;
    else if (w <= 4'd4)  b = s.loc[4 - w];
    else if (w <= 4'd10) b = s.phi[10 - w];
    else if (w <= 4'd13) b = s.dphi[13 - w];
    else                 b = 1'b0;
    return b;
  endfunction

  // Rank table contents after reset: more hit layers rank higher, then weight.
  function automatic logic [RANK_W-1:0] default_rank(logic [LUT_AW-1:0] a);
    logic [PAT_W-1:0] p;
    logic [WGT_W-1:0] wt;
    int unsigned n;
    p  = a[LUT_AW-1:WGT_W];
    wt = a[WGT_W-1:0];
    n  = 0;
    for (int i = 0; i < PAT_W; i++) n += int'(p[i]);
    return {(n >= 2) ? 2'(n - 1) : 2'd0, wt};
  endfunction

  // Test pattern word w of frame f: frame bit on word 15, the data bits
  // repeat {f[4:0], w[3:0]} three times.
  function automatic logic [LINK_W-1:0] test_word(logic [4:0] f, logic [3:0] w);
    return {{3{f, w}}, (w == 4'd15)};
  endfunction

  function automatic int unsigned popcount(logic [63:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
