// tb_seg_selector: random sectors with random ranks against the reference
// ranking order. Checks the three slots, that the result appears one clock
// after tick and holds without tick, and counts sectors with more eligible
// segments than the quota, rank ties and rejected coarse-only segments.
module tb_seg_selector;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  cand_t cand [NCAND];
  logic [RANK_W-1:0] rank [NCAND];
  seg_t sel [NSEL];
  logic sel_valid;
  int checks = 0, failures = 0;
  int n_over = 0, n_tie = 0, n_coarse = 0, n_empty = 0;

  seg_selector dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    seg_t exp [NSEL];
    int r [NCAND];
    for (int i = 0; i < NCAND; i++) begin cand[i] = '0; rank[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      automatic int pv = (t % 10 == 0) ? 0 : (t % 4 == 0) ? 10 : 60;
      automatic int elig = 0;
      @(negedge clk);
      for (int i = 0; i < NCAND; i++) begin
        cand[i] = rand_cand(pv, 70);
        rank[i] = 4'($urandom_range((t % 3 == 0) ? 3 : 15));
        r[i] = rank[i];
        if (cand[i].valid && cand[i].fine) elig++;
        if (cand[i].valid && !cand[i].fine) n_coarse++;
      end
      for (int i = 0; i < NCAND; i++)
        for (int j = i + 1; j < NCAND; j++)
          if (cand[i].valid && cand[i].fine && cand[j].valid && cand[j].fine && r[i] == r[j]) n_tie++;
      if (elig > NSEL) n_over++;
      if (elig == 0) n_empty++;
      ref_select(cand, r, exp);
      tick = 1;
      @(negedge clk);
      tick = 0;
      chk(sel_valid, "sel_valid one clock after tick");
      for (int k = 0; k < NSEL; k++)
        chk(sel[k] == exp[k], $sformatf("slot %0d got %h exp %h", k, sel[k], exp[k]));
      // inputs change without tick: output must hold
      for (int i = 0; i < NCAND; i++) cand[i] = rand_cand(60, 60);
      @(negedge clk);
      chk(!sel_valid, "sel_valid is a pulse");
      for (int k = 0; k < NSEL; k++) chk(sel[k] == exp[k], "hold without tick");
    end
    chk(n_over > 0 && n_tie > 0 && n_coarse > 0 && n_empty > 0, "all cases reached");
    $display("overflow=%0d ties=%0d coarse_only=%0d empty=%0d", n_over, n_tie, n_coarse, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
