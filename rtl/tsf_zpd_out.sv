// tsf_zpd_out: the ZPD and BLT output stage of one TSF board.
//
// For every group of the board (one superlayer of the 2pi/16 TSFX sector, or
// one superlayer of one 2pi/16 half of a TSFY) a rank table gives each
// segment candidate its rank, a selector keeps the 3 best fine-phi segments
// and a coarse-phi stage ORs the segment hits of the group's two supercells.
// The selected segments of all groups are framed onto the 28-bit link
// (tsf_frame_tx): 21 segment pins for a TSFX (N_GRP = 7), 18 for a TSFY
// (N_GRP = 6), pin order as in dct_pkg / tsf_frame_tx.
//
// Group order on the link (group g drives pins 3g+1..3g+3, segment 0 lowest):
//   TSFX: A10, V9, U8, A4, V3, U2, A1
//   TSFY: A7 sector 1, A7 sector 0, V6 sector 1, V6 sector 0,
//         U5 sector 1, U5 sector 0
// coarse_phi[2g+c] is supercell c of group g.
//
// Timing: candidates are sampled when tick = 1 (once per 267 ns event);
// coarse_phi is valid one clock later, word 0 of the frame two clocks later,
// word 15 seventeen clocks later. All rank tables share the load port.
// The quota, the pin map and the frame follow the specification; the tick
// interface and latencies are this design's own.
module tsf_zpd_out
  import dct_pkg::*;
#(
  parameter int unsigned N_GRP = TSFX_GRP
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick,
  input  cand_t                     cand [N_GRP][NCAND],
  input  logic                      lut_we,
  input  logic [LUT_AW-1:0]         lut_addr,
  input  logic [RANK_W-1:0]         lut_wdata,
  output logic [LINK_W-1:0]         link_word,
  output logic [3:0]                word_idx,
  output logic [N_GRP*CELLS_PER_GRP-1:0] coarse_phi
);
  seg_t sel       [N_GRP*NSEL];
  logic sel_valid [N_GRP];

  for (genvar g = 0; g < N_GRP; g++) begin : g_grp
    logic [LUT_AW-1:0] raddr [NCAND];
    logic [RANK_W-1:0] rank  [NCAND];
    logic [NCAND-1:0]  hit;
    seg_t              gsel  [NSEL];

    always_comb begin
      for (int i = 0; i < NCAND; i++) begin
        raddr[i] = {cand[g][i].pattern, cand[g][i].weight};
        hit[i]   = cand[g][i].valid;
      end
    end

    seg_rank_lut #(.N_RD(NCAND)) u_lut (
      .clk, .rst_n, .we(lut_we), .waddr(lut_addr), .wdata(lut_wdata),
      .raddr, .rank
    );

    seg_selector #(.N_CAND(NCAND), .N_SEL(NSEL)) u_sel (
      .clk, .rst_n, .tick, .cand(cand[g]), .rank, .sel(gsel),
      .sel_valid(sel_valid[g])
    );

    tsf_coarse_phi #(.N_CAND(NCAND), .N_CELL(CELLS_PER_GRP)) u_cphi (
      .clk, .rst_n, .tick, .hit,
      .cell_map(coarse_phi[g*CELLS_PER_GRP +: CELLS_PER_GRP])
    );

    for (genvar k = 0; k < NSEL; k++) begin : g_slot
      assign sel[g*NSEL + k] = gsel[k];
    end
  end

  tsf_frame_tx #(.N_GRP(N_GRP)) u_tx (
    .clk, .rst_n, .start(sel_valid[0]), .seg(sel), .word(link_word), .word_idx
  );
endmodule
