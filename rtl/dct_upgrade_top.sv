// dct_upgrade_top: the upgraded L1 drift-chamber trigger data path from the
// track segment finders to the global trigger.
//
// 16 TSFX boards (one 2pi/16 sector, 7 superlayers each) and 8 TSFY boards
// (2pi/8, superlayers U5, V6, A7 in two 2pi/16 halves) keep the 3 best
// fine-phi segments per sector and superlayer and send them, one segment per
// pin in 16-word frames, through their TSFi fanout FPGAs as three identical
// 28-bit link words, one for each of the three ZPDs that need the board.
// Each of the 8 ZPD_i boards receives 6 TSFX and 3 TSFY links, masks 12 of
// the 60 groups and puts 144 segment pins plus 9 frame pins on its ZPD's
// backplane. The ZPDs' results come back through their ZPD_i to the GLT_i
// switch, which fills two 16-bit GLT slots from either the ZPDs or the old
// PTD + EMT X inputs.
//
// Brought out as ports, where parts outside this RTL connect:
//   cand_x / cand_y       segment candidates from the TSF segment finders
//   coarse_x / coarse_y   coarse-phi supercell maps to the BLT
//   tsfi_x / tsfi_y       parallel inputs of the DS90CR287 transmitters
//                         [board][copy]; copy c of TSFX j feeds ZPD
//                         (j/2 - 1 + c) mod 8, copy c of TSFY m feeds ZPD
//                         (m - 1 + c) mod 8
//   zpdi_lx / zpdi_ly     parallel outputs of the DS90CR288 receivers
//                         [zpd][link]; link i of ZPD k is TSFX (2k-2+i) mod 16
//                         and TSFY (k-1+i) mod 8
//   zpd_bp_seg/_frame     ZPD backplane pins; zpd_res the ZPDs' 6-bit results
//   ptd_in, emtx_in       the old system's GLT inputs
// One tick per 267 ns event, common to all TSFs; rank tables share one load
// port, test modes are common to all TSFi and to all ZPD_i.
module dct_upgrade_top
  import dct_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  cand_t                cand_x [N_TSFX][TSFX_GRP][NCAND],
  input  cand_t                cand_y [N_TSFY][TSFY_GRP][NCAND],
  input  logic                 lut_we,
  input  logic [LUT_AW-1:0]    lut_addr,
  input  logic [RANK_W-1:0]    lut_wdata,
  input  logic                 tsfi_test_en,
  input  logic                 zpdi_test_en,
  output logic [TSFX_GRP*CELLS_PER_GRP-1:0] coarse_x [N_TSFX],
  output logic [TSFY_GRP*CELLS_PER_GRP-1:0] coarse_y [N_TSFY],
  output logic [LINK_W-1:0]    tsfi_x [N_TSFX][3],
  output logic [LINK_W-1:0]    tsfi_y [N_TSFY][3],
  input  logic [LINK_W-1:0]    zpdi_lx [N_ZPD][6],
  input  logic [LINK_W-1:0]    zpdi_ly [N_ZPD][3],
  output logic [143:0]         zpd_bp_seg   [N_ZPD],
  output logic [8:0]           zpd_bp_frame [N_ZPD],
  input  logic [ZPD_OUT_W-1:0] zpd_res [N_ZPD],
  input  logic [PTD_OUT_W-1:0] ptd_in  [N_ZPD],
  input  logic [GLT_W-1:0]     emtx_in,
  input  logic                 glt_use_new,
  output logic [GLT_W-1:0]     glt_slot_a,
  output logic [GLT_W-1:0]     glt_slot_b
);
  logic [ZPD_OUT_W-1:0] zpd_to_glt [N_ZPD];

  for (genvar j = 0; j < N_TSFX; j++) begin : g_tsfx
    logic [LINK_W-1:0] word;
    tsf_zpd_out #(.N_GRP(TSFX_GRP)) u_tsf (
      .clk, .rst_n, .tick, .cand(cand_x[j]), .lut_we, .lut_addr, .lut_wdata,
      .link_word(word), .word_idx(), .coarse_phi(coarse_x[j]));
    tsfi_fanout #(.N_COPY(3)) u_tsfi (
      .clk, .rst_n, .word_in(word), .test_en(tsfi_test_en), .word_out(tsfi_x[j]));
  end

  for (genvar m = 0; m < N_TSFY; m++) begin : g_tsfy
    logic [LINK_W-1:0] word;
    tsf_zpd_out #(.N_GRP(TSFY_GRP)) u_tsf (
      .clk, .rst_n, .tick, .cand(cand_y[m]), .lut_we, .lut_addr, .lut_wdata,
      .link_word(word), .word_idx(), .coarse_phi(coarse_y[m]));
    tsfi_fanout #(.N_COPY(3)) u_tsfi (
      .clk, .rst_n, .word_in(word), .test_en(tsfi_test_en), .word_out(tsfi_y[m]));
  end

  for (genvar k = 0; k < N_ZPD; k++) begin : g_zpdi
    zpdi u_zpdi (
      .clk, .rst_n, .lx(zpdi_lx[k]), .ly(zpdi_ly[k]), .test_en(zpdi_test_en),
      .zpd_res(zpd_res[k]), .bp_seg(zpd_bp_seg[k]), .bp_frame(zpd_bp_frame[k]),
      .glt_res(zpd_to_glt[k]));
  end

  glti_switch u_glti (
    .clk, .rst_n, .use_new(glt_use_new), .zpd_in(zpd_to_glt), .ptd_in,
    .emtx_in, .slot_a(glt_slot_a), .slot_b(glt_slot_b));
endmodule
