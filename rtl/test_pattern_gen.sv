// test_pattern_gen: link test pattern used by the TSFi fanout FPGA and the
// ZPD_i switch FPGAs to exercise the links and the ZPD backplane.
//
// It produces 16-word frames like a real TSF link: word w of frame f is
// dct_pkg::test_word(f, w) = {3{f[4:0], w[3:0]}, frame bit}, the frame bit
// set on word 15 only. The word and frame counters run while enable is high
// and restart at word 0, frame 0 when it is low. Output is registered: the
// first word follows one clock after enable rises. The specification asks
// only for test patterns; the pattern itself is this design's choice.
module test_pattern_gen
  import dct_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  output logic [LINK_W-1:0] word
);
  logic [3:0] w_q;
  logic [4:0] f_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q  <= '0;
      f_q  <= '0;
      word <= '0;
    end else if (!enable) begin
      w_q  <= '0;
      f_q  <= '0;
      word <= '0;
    end else begin
      word <= test_word(f_q, w_q);
      w_q  <= w_q + 4'd1;
      if (w_q == 4'd15) f_q <= f_q + 5'd1;
    end
  end
endmodule
