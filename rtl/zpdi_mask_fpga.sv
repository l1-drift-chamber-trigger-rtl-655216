// zpdi_mask_fpga: one of the three switch FPGAs on a ZPD_i board.
//
// It takes the received 28-bit words of three TSF links, two TSFX (21
// segment pins each) and one TSFY (18 pins), and drops whole groups of three
// segment pins (one superlayer of one 2pi/16 sector) that lie outside the pT
// coverage of the ZPD. The groups that are kept are packed, in order, onto
// the single-ended ZPD backplane pins; the three frame bits go through on
// pins of their own. With test_en high all outputs carry the link test
// pattern instead (seg_out[j] = pattern bit 1 + j mod 27, each frame pin =
// pattern bit 0), which tests the backplane into the ZPD.
//
// KEEP selects the groups: bits [6:0] link 0 (TSFX), [13:7] link 1 (TSFX),
// [19:14] link 2 (TSFY), group order as on the link (see tsf_zpd_out). Kept
// group number n (counting kept groups from bit 0) drives
// seg_out[3n+2 : 3n]. frame_out[l] is the frame bit of link l.
//
// Timing: one register stage, outputs follow inputs by one clock; the first
// test word follows test_en by two clocks. Masking in groups of 3 and the
// test ability follow the specification; which groups are masked is set by
// the board (zpdi), and the register stage and pattern are this design's.
module zpdi_mask_fpga
  import dct_pkg::*;
#(
  parameter logic [19:0] KEEP = 20'hFFFFF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINK_W-1:0] link [3],
  input  logic              test_en,
  output logic [3*popcount(64'(KEEP))-1:0] seg_out,
  output logic [2:0]        frame_out
);
  localparam int unsigned N_OUT = 3 * popcount(64'(KEEP));
  localparam int unsigned N_GRP = 20;

  logic [LINK_W-1:0] pat;
  logic [N_OUT-1:0]  seg_d;
  logic [2:0]        frame_d;

  test_pattern_gen u_pat (.clk, .rst_n, .enable(test_en), .word(pat));

  always_comb begin
    int unsigned n;
    logic [1:0]  l;
    logic [2:0]  lg;
    n = 0;
    seg_d = '0;
    for (int g = 0; g < N_GRP; g++) begin
      l  = (g < 7) ? 2'd0 : (g < 14) ? 2'd1 : 2'd2;
      lg = 3'((g < 7) ? g : (g < 14) ? g - 7 : g - 14);
      if (KEEP[g]) begin
        seg_d[3*n +: 3] = link[l][1 + 3*lg +: 3];
        n++;
      end
    end
    for (int l2 = 0; l2 < 3; l2++) frame_d[l2] = link[l2][0];
    if (test_en) begin
      for (int j = 0; j < N_OUT; j++) seg_d[j] = pat[1 + (j % 27)];
      frame_d = {3{pat[0]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_out   <= '0;
      frame_out <= '0;
    end else begin
      seg_out   <= seg_d;
      frame_out <= frame_d;
    end
  end
endmodule
