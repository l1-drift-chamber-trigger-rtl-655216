// tb_dct_upgrade_top: the whole upgraded data path at its full size: 16 TSFX
// and 8 TSFY boards, their TSFi fanouts, 8 ZPD_i boards and the GLT_i.
//
// The channel links between TSFi and ZPD_i are modelled here by two clock
// stages of cable and the cable map of the system (copy c of TSFX j goes to
// ZPD j/2-1+c, copy c of TSFY m to ZPD m-1+c, modulo 8). Phases:
//   1. back-to-back events of random segment candidates, then one missing
//      event; every ZPD's 144 backplane segment pins are decoded word by word
//      and compared with the reference selection of the TSF group that the
//      pin should carry, frame pins must mark word 15 every 16 clocks, the
//      coarse-phi maps are checked one clock after tick
//   2. the rank tables are reloaded and two more events are checked
//   3. TSFi test mode: the pattern must reach every ZPD backplane
//   4. ZPD_i test mode: the pattern must appear on the backplane pins
//   5. GLT_i in both switch positions, fed through the ZPD_i result path
// Each mechanism is counted; one that never happens counts as a failure.
module tb_dct_upgrade_top;
  import dct_pkg::*;
  import tb_ref_pkg::*;

  localparam int NE  = 6;      // events per run of phase 1 / 2
  localparam int LAT = 6;      // word 0 is on the ZPD backplane 7 clocks after tick

  logic clk = 0, rst_n = 0, tick = 0;
  cand_t cand_x [N_TSFX][TSFX_GRP][NCAND];
  cand_t cand_y [N_TSFY][TSFY_GRP][NCAND];
  logic lut_we = 0;
  logic [LUT_AW-1:0] lut_addr = '0;
  logic [RANK_W-1:0] lut_wdata = '0;
  logic tsfi_test_en = 0, zpdi_test_en = 0, glt_use_new = 0;
  logic [TSFX_GRP*2-1:0] coarse_x [N_TSFX];
  logic [TSFY_GRP*2-1:0] coarse_y [N_TSFY];
  logic [LINK_W-1:0] tsfi_x [N_TSFX][3], tsfi_y [N_TSFY][3];
  logic [LINK_W-1:0] zpdi_lx [N_ZPD][6], zpdi_ly [N_ZPD][3];
  logic [LINK_W-1:0] cab_x [N_TSFX][3], cab_y [N_TSFY][3];
  logic [143:0] zpd_bp_seg [N_ZPD];
  logic [8:0] zpd_bp_frame [N_ZPD];
  logic [ZPD_OUT_W-1:0] zpd_res [N_ZPD];
  logic [PTD_OUT_W-1:0] ptd_in [N_ZPD];
  logic [GLT_W-1:0] emtx_in = '0, glt_slot_a, glt_slot_b;

  dct_upgrade_top dut (.*);

  always #5 clk = ~clk;

  // channel links: transmitter, cable and receiver as two clock stages
  always_ff @(posedge clk) begin
    cab_x <= tsfi_x;
    cab_y <= tsfi_y;
    for (int k = 0; k < N_ZPD; k++) begin
      for (int i = 0; i < 6; i++) zpdi_lx[k][i] <= cab_x[(2*k - 2 + i + N_TSFX) % N_TSFX][2 - i/2];
      for (int i = 0; i < 3; i++) zpdi_ly[k][i] <= cab_y[(k - 1 + i + N_TSFY) % N_TSFY][2 - i];
    end
  end

  int checks = 0, failures = 0;
  int n_over = 0, n_coarse_only = 0, n_tie = 0, n_masked_data = 0, n_frames = 0;
  int n_empty = 0, n_reload = 0, n_tsfi_test = 0, n_zpdi_test = 0, n_glt_new = 0, n_glt_old = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int table_r [64];
  seg_t exp_x [NE][N_TSFX][TSFX_GRP][NSEL];
  seg_t exp_y [NE][N_TSFY][TSFY_GRP][NSEL];
  logic [143:0] cap [N_ZPD][16];

  // kept groups on a ZPD backplane, in pin order: is_y, link index i, group
  int pin_y [48], pin_i [48], pin_g [48];
  initial begin
    int n = 0;
    for (int f = 0; f < 3; f++) begin
      for (int h = 0; h < 2; h++)
        for (int g = 0; g < 7; g++)
          if (!((f == 0 && h == 0 && g <= 2) || (f == 2 && h == 1 && g >= 4))) begin
            pin_y[n] = 0; pin_i[n] = 2*f + h; pin_g[n] = g; n++;
          end
      for (int g = 0; g < 6; g++)
        if (!((f == 0 && g % 2 == 1) || (f == 2 && g % 2 == 0))) begin
          pin_y[n] = 1; pin_i[n] = f; pin_g[n] = g; n++;
        end
    end
  end

  // random candidates for every board, the reference selection and coarse map
  task automatic new_event(int e, output logic [13:0] ecx [N_TSFX], output logic [11:0] ecy [N_TSFY]);
    for (int b = 0; b < N_TSFX + N_TSFY; b++) begin
      int ng = (b < N_TSFX) ? TSFX_GRP : TSFY_GRP;
      for (int g = 0; g < ng; g++) begin
        cand_t c [NCAND];
        int r [NCAND];
        seg_t s [NSEL];
        int elig = 0;
        logic [1:0] cm = '0;
        for (int i = 0; i < NCAND; i++) begin
          c[i] = rand_cand((g + b) % 3 == 0 ? 8 : 35, 75);
          r[i] = table_r[{c[i].pattern, c[i].weight}];
          if (c[i].valid) cm[i / 8] = 1'b1;
          if (c[i].valid && c[i].fine) elig++;
          if (c[i].valid && !c[i].fine) n_coarse_only++;
        end
        for (int i = 0; i < NCAND; i++)
          for (int j = i + 1; j < NCAND; j++)
            if (c[i].valid && c[i].fine && c[j].valid && c[j].fine && r[i] == r[j] &&
                ref_slot(c, r, i) >= 0 && ref_slot(c, r, j) < 0) n_tie++;
        if (elig > NSEL) n_over++;
        ref_select(c, r, s);
        if (b < N_TSFX) begin
          cand_x[b][g] = c; exp_x[e][b][g] = s; ecx[b][2*g +: 2] = cm;
        end else begin
          cand_y[b - N_TSFX][g] = c; exp_y[e][b - N_TSFX][g] = s; ecy[b - N_TSFX][2*g +: 2] = cm;
        end
      end
    end
  endtask

  // compare one captured frame of every ZPD with event e (e < 0: empty frame)
  task automatic check_frames(int e);
    for (int k = 0; k < N_ZPD; k++) begin
      for (int n = 0; n < 48; n++) begin
        for (int s = 0; s < NSEL; s++) begin
          logic [15:0] bits;
          seg_t want;
          for (int w = 0; w < 16; w++) bits[w] = cap[k][w][3*n + s];
          if (e < 0) want = '0;
          else if (pin_y[n] == 0) want = exp_x[e][(2*k - 2 + pin_i[n] + N_TSFX) % N_TSFX][pin_g[n]][s];
          else                    want = exp_y[e][(k - 1 + pin_i[n] + N_TSFY) % N_TSFY][pin_g[n]][s];
          chk(decode_pin(bits) == want,
              $sformatf("event %0d ZPD %0d pin group %0d seg %0d: got %h want %h", e, k, n, s, decode_pin(bits), want));
        end
      end
    end
    if (e >= 0)
      for (int k = 0; k < N_ZPD; k++) begin
        // dropped groups of X0, X5, Y0, Y2 that carried a selected segment
        for (int g = 0; g <= 2; g++) if (exp_x[e][(2*k - 2 + N_TSFX) % N_TSFX][g][0].mask) n_masked_data++;
        for (int g = 4; g <= 6; g++) if (exp_x[e][(2*k + 3) % N_TSFX][g][0].mask) n_masked_data++;
      end
  endtask

  // run events back to back (a tick every 16 clocks); skip: no tick for that slot
  task automatic run_events(int ne, int skip_at);
    logic [13:0] ecx [N_TSFX];
    logic [11:0] ecy [N_TSFY];
    int kind [NE + 1];
    int total = 16 * (ne + 1) + LAT + 1;
    for (int c = 0; c < total; c++) begin
      int rel = c - LAT;
      if (c % 16 == 0 && c / 16 < ne) begin
        if (c / 16 == skip_at) begin
          kind[c / 16] = -1;
          n_empty++;
        end else begin
          new_event(c / 16, ecx, ecy);
          kind[c / 16] = c / 16;
          tick = 1;
        end
      end
      @(negedge clk);
      if (tick) begin
        for (int j = 0; j < N_TSFX; j++) chk(coarse_x[j] == ecx[j], "coarse phi TSFX");
        for (int m = 0; m < N_TSFY; m++) chk(coarse_y[m] == ecy[m], "coarse phi TSFY");
      end
      tick = 0;
      if (rel >= 0 && rel / 16 < ne) begin
        int w = rel % 16;
        for (int k = 0; k < N_ZPD; k++) begin
          cap[k][w] = zpd_bp_seg[k];
          chk(zpd_bp_frame[k] == {9{w == 15}}, $sformatf("frame pins ZPD %0d word %0d", k, w));
        end
        if (w == 15) begin
          check_frames(kind[rel / 16]);
          n_frames++;
        end
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) table_r[a] = ref_rank(a >> 2, a & 3);
    for (int k = 0; k < N_ZPD; k++) begin zpd_res[k] = '0; ptd_in[k] = '0; end
    for (int j = 0; j < N_TSFX; j++) for (int g = 0; g < TSFX_GRP; g++) for (int i = 0; i < NCAND; i++) cand_x[j][g][i] = '0;
    for (int m = 0; m < N_TSFY; m++) for (int g = 0; g < TSFY_GRP; g++) for (int i = 0; i < NCAND; i++) cand_y[m][g][i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // phase 1: events with one missing in the middle
    run_events(NE, 3);

    // phase 2: new rank table
    for (int a = 0; a < 64; a++) begin
      lut_we = 1; lut_addr = 6'(a); lut_wdata = 4'($urandom);
      table_r[a] = lut_wdata;
      @(negedge clk);
    end
    lut_we = 0;
    n_reload++;
    repeat (40) @(negedge clk);
    run_events(2, -1);
    repeat (40) @(negedge clk);

    // phase 3: TSFi test pattern through links and ZPD_i
    tsfi_test_en = 1;
    repeat (10) @(negedge clk);
    for (int t = 0; t < 48; t++) begin
      automatic logic [8:0] fr = zpd_bp_frame[0];
      for (int k = 0; k < N_ZPD; k++) begin
        chk(zpd_bp_frame[k] == {9{fr[0]}}, "TSFi test frame aligned");
        // FPGA 1 of each ZPD_i keeps all pins: X2 pins 1..21 carry the pattern word
        chk(zpd_bp_seg[k][50:42] == zpd_bp_seg[k][59:51], "TSFi pattern repeats on X2 pins");
        chk(zpd_bp_seg[k][50:42] == zpd_bp_seg[0][50:42], "TSFi pattern same on every ZPD");
        chk(fr[0] == (zpd_bp_seg[k][45:42] == 4'd15), "TSFi pattern word number matches frame bit");
      end
      if (fr[0]) n_tsfi_test++;
      @(negedge clk);
    end
    tsfi_test_en = 0;
    repeat (40) @(negedge clk);

    // phase 4: ZPD_i test pattern
    zpdi_test_en = 1;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < N_ZPD; k++) begin
        chk(zpd_bp_frame[k] == {9{t % 16 == 15}}, "ZPD_i test frame pins");
        chk(zpd_bp_seg[k][3:0] == 4'(t % 16) && zpd_bp_seg[k][8:4] == 5'(t / 16), "ZPD_i test pins");
      end
      n_zpdi_test++;
      @(negedge clk);
    end
    zpdi_test_en = 0;

    // phase 5: GLT_i switch, ZPD results through ZPD_i (two clocks)
    for (int t = 0; t < 64; t++) begin
      logic [GLT_W-1:0] ea, eb;
      glt_use_new = (t / 16) % 2 == 0;
      emtx_in = 16'($urandom);
      for (int k = 0; k < N_ZPD; k++) begin zpd_res[k] = 6'($urandom); ptd_in[k] = 2'($urandom); end
      for (int k = 0; k < N_ZPD; k++) begin
        ea[2*k +: 2] = glt_use_new ? zpd_res[k][1:0] : ptd_in[k];
        eb[2*k +: 2] = glt_use_new ? zpd_res[k][3:2] : emtx_in[2*k +: 2];
      end
      @(negedge clk);
      // ZPD result needs one more clock through the ZPD_i than PTD / EMT X
      if (!glt_use_new) begin
        chk(glt_slot_a == ea && glt_slot_b == eb, "GLT old system");
        n_glt_old++;
      end
      @(negedge clk);
      if (glt_use_new) begin
        chk(glt_slot_a == ea && glt_slot_b == eb, "GLT new system");
        n_glt_new++;
      end
    end

    $display("overflow=%0d coarse_only=%0d tie=%0d masked_data=%0d frames=%0d empty=%0d reload=%0d",
             n_over, n_coarse_only, n_tie, n_masked_data, n_frames, n_empty, n_reload);
    $display("tsfi_test=%0d zpdi_test=%0d glt_new=%0d glt_old=%0d", n_tsfi_test, n_zpdi_test, n_glt_new, n_glt_old);
    chk(n_over > 0, "quota overflow happened");
    chk(n_coarse_only > 0, "coarse-only segment rejected");
    chk(n_tie > 0, "rank tie decided by position");
    chk(n_masked_data > 0, "masked group carried data");
    chk(n_frames > 0 && n_empty > 0, "frames and empty frame");
    chk(n_reload > 0, "rank table reload");
    chk(n_tsfi_test > 0 && n_zpdi_test > 0, "test modes");
    chk(n_glt_new > 0 && n_glt_old > 0, "GLT both systems");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
