// tb_tsfi_fanout: random link words must reach all three copies two clocks
// later; in test mode all three copies must carry the test pattern, whose
// frame counter and word counter the testbench follows independently.
module tb_tsfi_fanout;
  import dct_pkg::*;
  logic clk = 0, rst_n = 0, test_en = 0;
  logic [LINK_W-1:0] word_in = '0;
  logic [LINK_W-1:0] word_out [3];
  int checks = 0, failures = 0, n_test = 0;
  logic [LINK_W-1:0] hist [$];

  tsfi_fanout dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      hist.delete();
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        if (t >= 2) for (int c = 0; c < 3; c++)
          chk(word_out[c] == hist[t - 2], $sformatf("copy %0d cycle %0d", c, t));
        word_in = LINK_W'($urandom);
        hist.push_back(word_in);
      end
      // test pattern mode
      @(negedge clk);
      test_en = 1;
      @(negedge clk);
      @(negedge clk);
      for (int t = 0; t < 100; t++) begin
        automatic int w = t % 16, f = (t / 16) % 32;
        logic [LINK_W-1:0] e;
        e[0] = (w == 15);
        for (int b = 1; b < LINK_W; b++) begin
          automatic int k = (b - 1) % 9;   // position in the 9-bit {f, w} group, LSB first
          e[b] = (k < 4) ? w[k] : f[k - 4];
        end
        for (int c = 0; c < 3; c++) chk(word_out[c] == e, $sformatf("pattern t=%0d copy %0d", t, c));
        n_test++;
        @(negedge clk);
      end
      test_en = 0;
    end
    chk(n_test > 0, "test mode reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
