// tb_tsf_frame_tx: frames of random segments on a TSFX (7 groups) and a
// TSFY (6 groups) transmitter. Each pin's 16 bits are decoded back into a
// segment and compared; the frame bit must be set on word 15 only, unused
// pins must stay 0, word 0 must follow start by one clock, a frame must be
// 16 clocks, and a missing start must give an empty frame.
module tb_tsf_frame_tx;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  seg_t segx [21], segy [18];
  logic [LINK_W-1:0] wx, wy;
  logic [3:0] ix, iy;
  int checks = 0, failures = 0, n_empty = 0;

  tsf_frame_tx #(.N_GRP(7)) ux (.clk, .rst_n, .start, .seg(segx), .word(wx), .word_idx(ix));
  tsf_frame_tx #(.N_GRP(6)) uy (.clk, .rst_n, .start, .seg(segy), .word(wy), .word_idx(iy));

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic seg_t rseg();
    seg_t s;
    s = seg_t'($urandom);
    s.mask = ($urandom_range(3) != 0);
    return s;
  endfunction

  initial begin
    seg_t ex [21], ey [18];
    logic [LINK_W-1:0] capx [16], capy [16];
    for (int s = 0; s < 21; s++) segx[s] = '0;
    for (int s = 0; s < 18; s++) segy[s] = '0;
    repeat (2) @(posedge clk);
    #1 chk(wx == 0 && wy == 0, "idle before first start");
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int f = 0; f < 60; f++) begin
      automatic logic skip = (f % 7 == 3);
      if (!skip) begin
        for (int s = 0; s < 21; s++) begin segx[s] = rseg(); ex[s] = segx[s]; end
        for (int s = 0; s < 18; s++) begin segy[s] = rseg(); ey[s] = segy[s]; end
        start = 1;
      end else begin
        for (int s = 0; s < 21; s++) ex[s] = '0;
        for (int s = 0; s < 18; s++) ey[s] = '0;
        n_empty++;
      end
      @(negedge clk);
      start = 0;
      for (int s = 0; s < 21; s++) segx[s] = rseg();
      for (int w = 0; w < 16; w++) begin
        capx[w] = wx; capy[w] = wy;
        chk(ix == 4'(w) && iy == 4'(w), $sformatf("word index %0d", w));
        chk(wx[0] == (w == 15) && wy[0] == (w == 15), $sformatf("frame bit word %0d", w));
        chk(wx[27:22] == 0 && wy[27:19] == 0, "unused pins");
        if (w < 15) @(negedge clk);
      end
      for (int s = 0; s < 21; s++) begin
        logic [15:0] b;
        for (int w = 0; w < 16; w++) b[w] = capx[w][1 + s];
        chk(decode_pin(b) == ex[s] && b[15:14] == 0, $sformatf("frame %0d TSFX pin %0d", f, s + 1));
      end
      for (int s = 0; s < 18; s++) begin
        logic [15:0] b;
        for (int w = 0; w < 16; w++) b[w] = capy[w][1 + s];
        chk(decode_pin(b) == ey[s], $sformatf("frame %0d TSFY pin %0d", f, s + 1));
      end
    end
    chk(n_empty > 0, "empty frame reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
