// tb_zpdi_mask_fpga: two switch FPGAs, one keeping every group and one with
// a mask that drops 6 groups, fed with random link words. The expected
// backplane pins are built from a list of kept (link, group) pairs; frame
// pins and the one-clock latency are checked, and test mode must give the
// pattern on every pin.
module tb_zpdi_mask_fpga;
  import dct_pkg::*;
  localparam logic [19:0] KM = {6'b010101, 7'b1111111, 7'b1111000};
  logic clk = 0, rst_n = 0, test_en = 0;
  logic [LINK_W-1:0] link [3];
  logic [59:0] seg_a;
  logic [41:0] seg_m;
  logic [2:0] fr_a, fr_m;
  int checks = 0, failures = 0, n_test = 0;

  zpdi_mask_fpga ua (.clk, .rst_n, .link, .test_en, .seg_out(seg_a), .frame_out(fr_a));
  zpdi_mask_fpga #(.KEEP(KM)) um (.clk, .rst_n, .link, .test_en, .seg_out(seg_m), .frame_out(fr_m));

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

  // kept groups of KM, in output order: link 0 groups 3..6, link 1 all, link 2 groups 0,2,4
  int kl [14] = '{0,0,0,0, 1,1,1,1,1,1,1, 2,2,2};
  int kg [14] = '{3,4,5,6, 0,1,2,3,4,5,6, 0,2,4};

  initial begin
    logic [LINK_W-1:0] prev [3];
    for (int l = 0; l < 3; l++) link[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int l = 0; l < 3; l++) link[l] = LINK_W'($urandom);
      prev = link;
      @(negedge clk);
      chk(seg_a == {prev[2][18:1], prev[1][21:1], prev[0][21:1]}, "all-kept pins");
      chk(fr_a == {prev[2][0], prev[1][0], prev[0][0]} && fr_m == fr_a, "frame pins");
      for (int n = 0; n < 14; n++)
        chk(seg_m[3*n +: 3] == prev[kl[n]][1 + 3*kg[n] +: 3], $sformatf("masked out group %0d", n));
    end
    @(negedge clk);
    test_en = 1;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      automatic int w = t % 16, f = t / 16;
      logic [LINK_W-1:0] e;
      e[0] = (w == 15);
      for (int b = 1; b < LINK_W; b++) begin
        automatic int k = (b - 1) % 9;
        e[b] = (k < 4) ? w[k] : f[k - 4];
      end
      for (int j = 0; j < 60; j++) chk(seg_a[j] == e[1 + j % 27], "test pattern pin");
      for (int j = 0; j < 42; j++) chk(seg_m[j] == e[1 + j % 27], "test pattern pin masked");
      chk(fr_a == {3{e[0]}}, "test pattern frame");
      n_test++;
      @(negedge clk);
    end
    chk(n_test > 0, "test mode reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
