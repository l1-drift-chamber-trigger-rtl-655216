// seg_rank_lut: the segment rank table of the TSF segment selection.
//
// Every segment candidate gets a 4-bit rank from a small lookup table whose
// address is the segment's hit pattern and calibrated weight; the table is
// the "simple 4 bit lookup table for each segment" of the specification.
// One table is read by N_RD candidates at once (combinational read ports) and
// written one entry per clock through a load port, so the ranking can be
// changed without new firmware.
//
// Interface: we/waddr/wdata write one entry on the rising clock edge;
// raddr[i] -> rank[i] is combinational.
// Own choices: the address is {pattern[3:0], weight[1:0]} (64 entries) and
// reset loads dct_pkg::default_rank (hit-layer count first, then weight).
module seg_rank_lut
  import dct_pkg::*;
#(
  parameter int unsigned N_RD = NCAND
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [LUT_AW-1:0]     waddr,
  input  logic [RANK_W-1:0]     wdata,
  input  logic [LUT_AW-1:0]     raddr [N_RD],
  output logic [RANK_W-1:0]     rank  [N_RD]
);
  localparam int unsigned DEPTH = 1 << LUT_AW;

  logic [RANK_W-1:0] table_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < DEPTH; a++) table_q[a] <= default_rank(LUT_AW'(a));
    end else if (we) begin
      table_q[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < N_RD; i++) rank[i] = table_q[raddr[i]];
  end
endmodule
