// tb_tsf_zpd_out: a TSFX output stage over back-to-back events (one tick
// every 16 clocks). For each event the testbench decodes the link frame pin
// by pin and compares every group's three segments with the reference
// selection, and checks the coarse-phi map one clock after tick and word 0
// two clocks after tick. Half of the events run after the rank tables were
// reloaded with a random table through the load port.
module tb_tsf_zpd_out;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  localparam int G = 7;
  logic clk = 0, rst_n = 0, tick = 0;
  cand_t cand [G][NCAND];
  logic lut_we = 0;
  logic [LUT_AW-1:0] lut_addr = '0;
  logic [RANK_W-1:0] lut_wdata = '0;
  logic [LINK_W-1:0] link_word;
  logic [3:0] word_idx;
  logic [G*2-1:0] coarse_phi;
  int checks = 0, failures = 0, n_over = 0, n_reload = 0;
  int table_r [64];

  tsf_zpd_out #(.N_GRP(G)) dut (.*);

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

  seg_t exp [G][NSEL], prev [G][NSEL];
  logic [G*2-1:0] exp_c;
  logic [LINK_W-1:0] cap [16];

  task automatic check_frame(int e);
    for (int g = 0; g < G; g++)
      for (int k = 0; k < NSEL; k++) begin
        logic [15:0] b;
        for (int w = 0; w < 16; w++) b[w] = cap[w][1 + 3*g + k];
        chk(decode_pin(b) == prev[g][k], $sformatf("event %0d group %0d seg %0d", e, g, k));
      end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) table_r[a] = ref_rank(a >> 2, a & 3);
    for (int g = 0; g < G; g++) for (int i = 0; i < NCAND; i++) cand[g][i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < 80; e++) begin
      if (e == 40) begin
        for (int a = 0; a < 64; a++) begin
          lut_we = 1; lut_addr = 6'(a); lut_wdata = 4'($urandom);
          table_r[a] = lut_wdata;
          @(negedge clk);
        end
        lut_we = 0;
        n_reload++;
      end
      for (int g = 0; g < G; g++) begin
        int r [NCAND];
        seg_t s [NSEL];
        automatic int elig = 0;
        for (int i = 0; i < NCAND; i++) begin
          cand[g][i] = rand_cand(40, 70);
          r[i] = table_r[{cand[g][i].pattern, cand[g][i].weight}];
          if (cand[g][i].valid && cand[g][i].fine) elig++;
        end
        if (elig > NSEL) n_over++;
        ref_select(cand[g], r, s);
        exp[g] = s;
        for (int c = 0; c < 2; c++) begin
          exp_c[2*g + c] = 1'b0;
          for (int i = 8*c; i < 8*c + 8; i++) if (cand[g][i].valid) exp_c[2*g + c] = 1'b1;
        end
      end
      tick = 1;
      @(negedge clk);
      tick = 0;
      if (e > 0 && e != 40) begin
        cap[15] = link_word;
        chk(word_idx == 4'd15 && link_word[0], "word 15 framing");
        check_frame(e - 1);
      end
      chk(coarse_phi == exp_c, "coarse phi one clock after tick");
      prev = exp;
      @(negedge clk);
      for (int w = 0; w < 15; w++) begin
        cap[w] = link_word;
        chk(word_idx == 4'(w) && link_word[0] == 1'b0, $sformatf("event %0d word %0d framing", e, w));
        if (w < 14 || e == 39) @(negedge clk);
      end
      if (e == 39) begin
        cap[15] = link_word;
        chk(word_idx == 4'd15 && link_word[0], "word 15 framing");
        check_frame(e);
      end
      // the next tick goes out while word 14 is on the link: frames back to back
    end
    @(negedge clk);
    cap[15] = link_word;
    check_frame(79);
    chk(n_over > 0 && n_reload > 0, "overflow and table reload reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
