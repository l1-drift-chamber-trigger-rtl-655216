// zpdi: the ZPD_i interface board in front of one ZPD.
//
// The board receives the links of nine TSFs through channel-link receivers:
// six TSFX (X0..X5, X2 and X3 the central ones whose seeds this ZPD
// processes) and three TSFY (Y0..Y2, Y1 central), 6*21 + 3*18 = 180 segment
// pins. Three switch FPGAs (zpdi_mask_fpga) drop 12 groups of 3 pins that lie
// outside the ZPD's pT envelope, leaving 144 segment pins, plus 9 frame pins,
// for the ZPD backplane. FPGA 0 handles X0, X1, Y0; FPGA 1 X2, X3, Y1; FPGA 2
// X4, X5, Y2. The board also carries the ZPD's 6-bit result to the GLT.
//
// bp_seg = {FPGA 2 pins, FPGA 1 pins, FPGA 0 pins}; bp_frame[3k+l] is the
// frame bit of link l of FPGA k. zpd_res reaches glt_res one clock later.
//
// The default masks drop: in X0 the outer superlayers U8, V9, A10; in X5 the
// inner superlayers A1, U2, V3; in Y0 the three groups of its sector 0; in Y2
// the three groups of its sector 1. The count (12 groups, 144 pins) is the
// specification's; which groups is this design's default and is a parameter.
module zpdi
  import dct_pkg::*;
#(
  parameter logic [19:0] KEEP0 = {6'b010101, 7'b1111111, 7'b1111000},
  parameter logic [19:0] KEEP1 = 20'hFFFFF,
  parameter logic [19:0] KEEP2 = {6'b101010, 7'b0001111, 7'b1111111}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LINK_W-1:0]    lx [6],
  input  logic [LINK_W-1:0]    ly [3],
  input  logic                 test_en,
  input  logic [ZPD_OUT_W-1:0] zpd_res,
  output logic [3*(popcount(64'(KEEP0)) + popcount(64'(KEEP1)) + popcount(64'(KEEP2)))-1:0] bp_seg,
  output logic [8:0]           bp_frame,
  output logic [ZPD_OUT_W-1:0] glt_res
);
  localparam int unsigned N0 = 3 * popcount(64'(KEEP0));
  localparam int unsigned N1 = 3 * popcount(64'(KEEP1));
  localparam int unsigned N2 = 3 * popcount(64'(KEEP2));

  logic [LINK_W-1:0] l0 [3], l1 [3], l2 [3];
  assign l0 = '{lx[0], lx[1], ly[0]};
  assign l1 = '{lx[2], lx[3], ly[1]};
  assign l2 = '{lx[4], lx[5], ly[2]};

  zpdi_mask_fpga #(.KEEP(KEEP0)) u_f0 (
    .clk, .rst_n, .link(l0), .test_en, .seg_out(bp_seg[N0-1:0]), .frame_out(bp_frame[2:0]));
  zpdi_mask_fpga #(.KEEP(KEEP1)) u_f1 (
    .clk, .rst_n, .link(l1), .test_en, .seg_out(bp_seg[N0 +: N1]), .frame_out(bp_frame[5:3]));
  zpdi_mask_fpga #(.KEEP(KEEP2)) u_f2 (
    .clk, .rst_n, .link(l2), .test_en, .seg_out(bp_seg[N0+N1 +: N2]), .frame_out(bp_frame[8:6]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) glt_res <= '0;
    else        glt_res <= zpd_res;
  end
endmodule
