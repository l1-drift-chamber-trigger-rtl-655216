// tsf_coarse_phi: the coarse-phi supercell map that the TSF sends to the BLT.
//
// At the end of the TSF processing the segment hits of each supercell
// (2pi/32 of azimuth in one superlayer) are ORed: a map bit is set when any
// segment was found in that supercell, fine phi or not. The N_CAND candidate
// positions of a 2pi/16 sector are split evenly over N_CELL supercells,
// lower positions in supercell 0.
//
// Timing: sampled on the clock edge where tick = 1, registered, held until
// the next tick. The OR per supercell follows the specification; the even
// split of positions and the timing are this design's choices.
module tsf_coarse_phi
  import dct_pkg::*;
#(
  parameter int unsigned N_CAND = NCAND,
  parameter int unsigned N_CELL = CELLS_PER_GRP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [N_CAND-1:0] hit,
  output logic [N_CELL-1:0] cell_map
);
  localparam int unsigned PER_CELL = N_CAND / N_CELL;

  logic [N_CELL-1:0] map_d;

  always_comb begin
    for (int c = 0; c < N_CELL; c++) map_d[c] = |hit[c*PER_CELL +: PER_CELL];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cell_map <= '0;
    else if (tick) cell_map <= map_d;
  end
endmodule
