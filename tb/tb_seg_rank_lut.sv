// tb_seg_rank_lut: checks the reset contents of the rank table against the
// reference ranking, then reloads random entries and reads them back through
// all read ports, including a write and a read of the same entry.
module tb_seg_rank_lut;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [LUT_AW-1:0] waddr = '0, raddr [NR];
  logic [RANK_W-1:0] wdata = '0, rank [NR];
  int checks = 0, failures = 0;
  logic [RANK_W-1:0] shadow [64];

  seg_rank_lut #(.N_RD(NR)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < NR; i++) raddr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int a = 0; a < 64; a += NR) begin
      for (int i = 0; i < NR; i++) raddr[i] = 6'(a + i);
      #1;
      for (int i = 0; i < NR; i++) begin
        chk(rank[i], ref_rank((a + i) >> 2, (a + i) & 3), $sformatf("reset entry %0d", a + i));
        shadow[a + i] = 4'(ref_rank((a + i) >> 2, (a + i) & 3));
      end
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 1; waddr = 6'($urandom); wdata = 4'($urandom);
      shadow[waddr] = wdata;
      for (int i = 0; i < NR; i++) raddr[i] = 6'($urandom);
      raddr[0] = waddr;
      @(posedge clk); #1;
      we = 0;
      for (int i = 0; i < NR; i++) chk(rank[i], shadow[raddr[i]], "after load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
