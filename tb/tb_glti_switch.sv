// tb_glti_switch: random ZPD, PTD and EMT X inputs in both switch
// positions; the two GLT slots must follow the selected system one clock
// later with the documented bit mapping.
module tb_glti_switch;
  import dct_pkg::*;
  logic clk = 0, rst_n = 0, use_new = 0;
  logic [ZPD_OUT_W-1:0] zpd_in [N_ZPD];
  logic [PTD_OUT_W-1:0] ptd_in [N_ZPD];
  logic [GLT_W-1:0] emtx_in = '0, slot_a, slot_b;
  int checks = 0, failures = 0, n_new = 0, n_old = 0;

  glti_switch dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [GLT_W-1:0] ea, eb;
    for (int k = 0; k < N_ZPD; k++) begin zpd_in[k] = '0; ptd_in[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      use_new = (t / 50) % 2 == 1;
      emtx_in = 16'($urandom);
      for (int k = 0; k < N_ZPD; k++) begin zpd_in[k] = 6'($urandom); ptd_in[k] = 2'($urandom); end
      if (use_new) begin
        ea = {zpd_in[7][1:0], zpd_in[6][1:0], zpd_in[5][1:0], zpd_in[4][1:0],
              zpd_in[3][1:0], zpd_in[2][1:0], zpd_in[1][1:0], zpd_in[0][1:0]};
        eb = {zpd_in[7][3:2], zpd_in[6][3:2], zpd_in[5][3:2], zpd_in[4][3:2],
              zpd_in[3][3:2], zpd_in[2][3:2], zpd_in[1][3:2], zpd_in[0][3:2]};
        n_new++;
      end else begin
        ea = {ptd_in[7], ptd_in[6], ptd_in[5], ptd_in[4], ptd_in[3], ptd_in[2], ptd_in[1], ptd_in[0]};
        eb = emtx_in;
        n_old++;
      end
      @(negedge clk);
      checks++;
      if (slot_a != ea || slot_b != eb) begin
        failures++;
        $display("FAIL t=%0d new=%0d a=%h/%h b=%h/%h", t, use_new, slot_a, ea, slot_b, eb);
      end
    end
    checks++;
    if (n_new == 0 || n_old == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
