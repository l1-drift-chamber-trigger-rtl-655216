// tb_tsf_coarse_phi: random hit maps; each supercell bit must be the OR of
// its eight positions, sampled on tick and held until the next tick.
module tb_tsf_coarse_phi;
  import dct_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [NCAND-1:0] hit = '0;
  logic [1:0] cell_map;
  int checks = 0, failures = 0;

  tsf_coarse_phi dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      hit = '0;
      for (int i = 0; i < NCAND; i++) if ($urandom_range(99) < 8) hit[i] = 1'b1;
      exp[0] = (hit[7:0] != 0);
      exp[1] = (hit[15:8] != 0);
      tick = 1;
      @(negedge clk);
      tick = 0;
      hit = ~hit;
      checks++;
      if (cell_map != exp) begin failures++; $display("FAIL got %b exp %b", cell_map, exp); end
      @(negedge clk);
      checks++;
      if (cell_map != exp) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
