// tsfi_fanout: the small fanout FPGA on the TSFi interface board.
//
// It receives the TSF's 28-bit link word from the backplane and drives the
// same word to the three channel-link transmitters, one per ZPD that needs
// this TSF. Both the input and the outputs are registered, which gives all
// three copies the same clean timing. With test_en high the three outputs
// carry the link test pattern (test_pattern_gen) instead, so a ZPD_i and ZPD
// can be checked without a TSF.
//
// Timing: word_in reaches word_out two clocks later. After test_en rises the
// first pattern word appears two clocks later. The fanout by three, the
// retiming and the test-pattern ability follow the specification; the
// register depth and the pattern are this design's choices.
module tsfi_fanout
  import dct_pkg::*;
#(
  parameter int unsigned N_COPY = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINK_W-1:0] word_in,
  input  logic              test_en,
  output logic [LINK_W-1:0] word_out [N_COPY]
);
  logic [LINK_W-1:0] in_q, pat;

  test_pattern_gen u_pat (.clk, .rst_n, .enable(test_en), .word(pat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q <= '0;
      for (int c = 0; c < N_COPY; c++) word_out[c] <= '0;
    end else begin
      in_q <= word_in;
      for (int c = 0; c < N_COPY; c++) word_out[c] <= test_en ? pat : in_q;
    end
  end
endmodule
