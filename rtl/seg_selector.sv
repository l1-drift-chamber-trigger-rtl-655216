// seg_selector: keeps the best NSEL segments of one 2pi/16 sector of one
// superlayer.
//
// Only candidates that were found (valid) and carry fine-phi data (phi error
// below 5 mm) take part. Among them the selector takes the NSEL with the
// highest rank; between equal ranks the candidate at the lower position wins,
// which is "the first N segments with the highest rank". NSEL passes of an
// arg-max run in one combinational cone; slot 0 receives the best segment.
// A slot with no segment left has mask = 0.
//
// Timing: the candidates and ranks present on the clock edge where tick = 1
// are evaluated; sel and sel_valid are registered and appear one clock later
// (sel_valid is a one-clock pulse, sel holds until the next tick).
// Assertions check that slots fill in order and in falling rank.
// The specification gives the quota of 3 and the rank rule; the tie rule,
// the slot order and the single-cycle timing are this design's choices.
module seg_selector
  import dct_pkg::*;
#(
  parameter int unsigned N_CAND = NCAND,
  parameter int unsigned N_SEL  = NSEL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  cand_t             cand [N_CAND],
  input  logic [RANK_W-1:0] rank [N_CAND],
  output seg_t              sel  [N_SEL],
  output logic              sel_valid
);
  seg_t sel_d [N_SEL];

  always_comb begin
    logic [N_CAND-1:0] taken;
    int                best;
    taken = '0;
    for (int s = 0; s < N_SEL; s++) begin
      best = -1;
      for (int i = 0; i < N_CAND; i++) begin
        if (cand[i].valid && cand[i].fine && !taken[i]) begin
          if (best < 0) best = i;
          else if (rank[i] > rank[best]) best = i;
        end
      end
      if (best >= 0) begin
        taken[best]    = 1'b1;
        sel_d[s].mask  = 1'b1;
        sel_d[s].loc   = LOC_W'(best);
        sel_d[s].phi   = cand[best].phi;
        sel_d[s].dphi  = cand[best].dphi;
      end else begin
        sel_d[s] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SEL; s++) sel[s] <= '0;
      sel_valid <= 1'b0;
    end else begin
      sel_valid <= tick;
      if (tick) sel <= sel_d;
    end
  end

  // Slots fill from slot 0 upward, and a later slot never outranks an
  // earlier one.
  for (genvar s = 1; s < N_SEL; s++) begin : g_order
    a_fill: assert property (@(posedge clk) disable iff (!rst_n)
      tick && sel_d[s].mask |-> sel_d[s-1].mask);
    a_rank: assert property (@(posedge clk) disable iff (!rst_n)
      tick && sel_d[s].mask |-> rank[sel_d[s].loc] <= rank[sel_d[s-1].loc]);
  end
endmodule
