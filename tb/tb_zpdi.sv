// tb_zpdi: a ZPD_i board with its default masks. Random words on the nine
// links must appear on the 144 backplane segment pins in the documented
// order one clock later, with the nine frame pins beside them, and the
// ZPD result must be carried to the GLT side. Test mode drives the pattern.
module tb_zpdi;
  import dct_pkg::*;
  logic clk = 0, rst_n = 0, test_en = 0;
  logic [LINK_W-1:0] lx [6], ly [3];
  logic [ZPD_OUT_W-1:0] zpd_res = '0, glt_res;
  logic [143:0] bp_seg;
  logic [8:0] bp_frame;
  int checks = 0, failures = 0, n_test = 0;

  zpdi dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // group g (0..6 TSFX, 0..5 TSFY) of a link: pins 3g+1..3g+3
  function automatic logic [2:0] grp(logic [LINK_W-1:0] w, int g);
    return w[1 + 3*g +: 3];
  endfunction

  initial begin
    logic [LINK_W-1:0] px [6], py [3];
    logic [5:0] pr;
    logic [143:0] e;
    for (int i = 0; i < 6; i++) lx[i] = '0;
    for (int i = 0; i < 3; i++) ly[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < 6; i++) lx[i] = LINK_W'($urandom);
      for (int i = 0; i < 3; i++) ly[i] = LINK_W'($urandom);
      zpd_res = 6'($urandom);
      px = lx; py = ly; pr = zpd_res;
      @(negedge clk);
      // FPGA 0: X0 without U8, V9, A10 (groups 0-2); X1; Y0 sector 1 only
      e[11:0]   = px[0][21:10];
      e[32:12]  = px[1][21:1];
      e[41:33]  = {grp(py[0], 4), grp(py[0], 2), grp(py[0], 0)};
      // FPGA 1: X2, X3, Y1 complete
      e[62:42]  = px[2][21:1];
      e[83:63]  = px[3][21:1];
      e[101:84] = py[1][18:1];
      // FPGA 2: X4; X5 without A1, U2, V3 (groups 4-6); Y2 sector 0 only
      e[122:102] = px[4][21:1];
      e[134:123] = px[5][12:1];
      e[143:135] = {grp(py[2], 5), grp(py[2], 3), grp(py[2], 1)};
      chk(bp_seg == e, $sformatf("backplane pins t=%0d", t));
      chk(bp_frame == {py[2][0], px[5][0], px[4][0], py[1][0], px[3][0], px[2][0],
                       py[0][0], px[1][0], px[0][0]}, "frame pins");
      chk(glt_res == pr, "ZPD result to GLT");
    end
    @(negedge clk);
    test_en = 1;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 32; t++) begin
      chk(bp_frame == {9{t % 16 == 15}}, "test frame pins");
      chk(bp_seg[3:0] == 4'(t % 16) && bp_seg[8:4] == 5'(t / 16), "test pattern");
      n_test++;
      @(negedge clk);
    end
    chk(n_test > 0, "test mode reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
