// tb_keccak_state_reg: checks the state register with 32-bit write words
// (the memory-mapped variant) and with 64-bit write words (the coprocessor):
// word writes with random byte enables, reads of every 32-bit word, full
// loads, a load winning over a write in the same cycle, and reset to zero.
module tb_keccak_state_reg;
  import kronos_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // 32-bit instance
  logic        wr32, ld32;
  logic [5:0]  wi32, ri32;
  logic [31:0] wd32, rd32;
  logic [3:0]  be32;
  kronos_pkg::state_t ls32, so32;
  // 64-bit instance
  logic        wr64, ld64;
  logic [4:0]  wi64;
  logic [5:0]  ri64;
  logic [63:0] wd64;
  logic [31:0] rd64;
  logic [7:0]  be64;
  kronos_pkg::state_t ls64, so64;

  state_t m32, m64;

  keccak_state_reg #(.WR_W(32)) dut32 (.clk_i(clk), .rst_ni(rst_n), .wr_en_i(wr32),
    .wr_idx_i(wi32), .wr_data_i(wd32), .wr_be_i(be32), .ld_en_i(ld32), .ld_state_i(ls32),
    .rd_idx_i(ri32), .rd_data_o(rd32), .state_o(so32));
  keccak_state_reg #(.WR_W(64)) dut64 (.clk_i(clk), .rst_ni(rst_n), .wr_en_i(wr64),
    .wr_idx_i(wi64), .wr_data_i(wd64), .wr_be_i(be64), .ld_en_i(ld64), .ld_state_i(ls64),
    .rd_idx_i(ri64), .rd_data_o(rd64), .state_o(so64));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_reads();
    for (int w = 0; w < 50; w++) begin
      ri32 = 6'(w); ri64 = 6'(w); #1;
      check(rd32 == m32[w/2][32*(w%2) +: 32], $sformatf("32-bit reg word %0d", w));
      check(rd64 == m64[w/2][32*(w%2) +: 32], $sformatf("64-bit reg word %0d", w));
    end
    check(so32 == m32 && so64 == m64, "whole state");
  endtask

  initial begin
    {wr32, ld32, wr64, ld64} = '0;
    wi32 = 0; wi64 = 0; wd32 = 0; wd64 = 0; be32 = 0; be64 = 0; ls32 = '0; ls64 = '0;
    ri32 = 0; ri64 = 0;
    m32 = '0; m64 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    check_reads();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr32 = 1; wi32 = 6'($urandom_range(0, 49)); wd32 = $urandom; be32 = 4'($urandom);
      wr64 = 1; wi64 = 5'($urandom_range(0, 24)); wd64 = {$urandom, $urandom}; be64 = 8'($urandom);
      ld32 = (t % 50 == 7); ls32 = rand_state();
      ld64 = (t % 50 == 9); ls64 = rand_state();
      if (ld32) m32 = ls32;
      else for (int b = 0; b < 4; b++) if (be32[b]) m32[int'(wi32)/2][32*(int'(wi32)%2) + 8*b +: 8] = wd32[8*b +: 8];
      if (ld64) m64 = ls64;
      else for (int b = 0; b < 8; b++) if (be64[b]) m64[wi64][8*b +: 8] = wd64[8*b +: 8];
      @(negedge clk);
      {wr32, ld32, wr64, ld64} = '0;
      if (t % 30 == 0) check_reads();
    end
    check_reads();
    rst_n = 0; #1; rst_n = 1; m32 = '0; m64 = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
