// tsf_frame_tx: serialises the selected segments of one TSF into the 28-bit
// link words that go over the backplane to the TSFi.
//
// Each segment travels on a pin of its own: pin 0 of the word is the frame
// bit, pin 1 + 3*g + k carries segment k of group g (a group is one
// superlayer, or one half-sector of a superlayer for a TSFY). A frame is 16
// words, one per 60 MHz clock, so one event per 267 ns. Over the 16 words a
// segment pin carries: word 0 mask, words 1-4 loc[3..0], words 5-10
// phi[5..0], words 11-13 dPhi[2..0], words 14-15 zero. The frame bit is 1 on
// word 15 only. Pins above 3*N_GRP are 0. This layout is the specification's.
//
// Timing: a start pulse captures seg[] and the first word of the new frame
// appears on the registered output one clock later; the word counter then
// advances every clock. If no start arrives when a frame ends, an empty frame
// (all masks 0, frame bit still set on word 15) follows, so the framing never
// stops once started. A start in mid-frame restarts the frame. Before the
// first start the link is all zero. These timing rules are this design's own.
// Assertions check the frame bit position and the word sequence.
module tsf_frame_tx
  import dct_pkg::*;
#(
  parameter int unsigned N_GRP = TSFX_GRP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  seg_t              seg  [N_GRP*NSEL],
  output logic [LINK_W-1:0] word,
  output logic [3:0]        word_idx
);
  localparam int unsigned NS = N_GRP * NSEL;

  seg_t       frame_q [NS];
  seg_t       frame_d [NS];
  logic [3:0] cnt_q, cnt_d;
  logic       run_q;
  logic [LINK_W-1:0] word_d;

  always_comb begin
    if (start) begin
      cnt_d = 4'd0;
      for (int s = 0; s < NS; s++) frame_d[s] = seg[s];
    end else begin
      cnt_d = cnt_q + 4'd1;
      for (int s = 0; s < NS; s++) frame_d[s] = (cnt_q == 4'(FRAME_WORDS - 1)) ? '0 : frame_q[s];
    end
    word_d    = '0;
    word_d[0] = (cnt_d == 4'(FRAME_WORDS - 1));
    for (int s = 0; s < NS; s++) word_d[1 + s] = seg_frame_bit(frame_d[s], cnt_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q    <= 1'b0;
      cnt_q    <= 4'd0;
      word     <= '0;
      word_idx <= 4'd0;
      for (int s = 0; s < NS; s++) frame_q[s] <= '0;
    end else if (start || run_q) begin
      run_q    <= 1'b1;
      cnt_q    <= cnt_d;
      word     <= word_d;
      word_idx <= cnt_d;
      frame_q  <= frame_d;
    end
  end

  // Once framing runs, the frame bit marks word 15 and nothing else, and the
  // word number advances by one each clock unless a new frame starts.
  a_frame_bit: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> word[0] == (word_idx == 4'(FRAME_WORDS - 1)));
  a_advance: assert property (@(posedge clk) disable iff (!rst_n)
    run_q && !start |=> word_idx == $past(word_idx) + 4'd1);
endmodule
