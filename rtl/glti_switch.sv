// glti_switch: the switch FPGA on the new GLT_i board.
//
// The GLT keeps its number of inputs. In the new system the eight ZPDs give
// 4 bits each, 32 bits, which fill two 16-bit GLT input slots: the slot that
// held the PTD A' phi map and the slot that held EMT X. In the old system
// the eight PTDs give 2 bits each for the A' map and EMT X keeps its slot.
// Both sets of cables stay connected; use_new (a DIP switch) selects.
//
// Mapping (this design's choice): new system, ZPD k bits [1:0] -> slot_a
// [2k+1:2k] and bits [3:2] -> slot_b [2k+1:2k]; ZPD bits [5:4] are carried
// but unused. Old system, PTD k bits [1:0] -> slot_a [2k+1:2k], EMT X ->
// slot_b. Outputs are registered, one clock after the inputs.
module glti_switch
  import dct_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 use_new,
  input  logic [ZPD_OUT_W-1:0] zpd_in  [N_ZPD],
  input  logic [PTD_OUT_W-1:0] ptd_in  [N_ZPD],
  input  logic [GLT_W-1:0]     emtx_in,
  output logic [GLT_W-1:0]     slot_a,
  output logic [GLT_W-1:0]     slot_b
);
  logic [GLT_W-1:0] a_d, b_d;

  always_comb begin
    for (int k = 0; k < N_ZPD; k++) begin
      a_d[2*k +: 2] = use_new ? zpd_in[k][1:0] : ptd_in[k];
      b_d[2*k +: 2] = use_new ? zpd_in[k][3:2] : emtx_in[2*k +: 2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_a <= '0;
      slot_b <= '0;
    end else begin
      slot_a <= a_d;
      slot_b <= b_d;
    end
  end
endmodule
