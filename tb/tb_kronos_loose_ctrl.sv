// tb_kronos_loose_ctrl: checks the memory-mapped controller on its own. The
// testbench plays the state register (read data is a fixed function of the
// word index) and the permutation engine (busy/done driven by hand).
// Checked: OBI grant in the request cycle and response one cycle later,
// state-word writes with byte enables, state-word reads, CTRL/STATUS
// registers, START pulse, writes dropped while busy, DONE and the interrupt
// with its enable and clearing, unmapped offsets reading zero.
module tb_kronos_loose_ctrl;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        req, gnt, we, rvalid, intr;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  be;
  logic        reg_wr, reg_ld, kf_start, kf_busy, kf_done;
  logic [5:0]  reg_wr_idx, reg_rd_idx;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic [3:0]  reg_wr_be;
  int          n_start;

  kronos_loose_ctrl dut (.clk_i(clk), .rst_ni(rst_n),
    .obi_req_i(req), .obi_gnt_o(gnt), .obi_addr_i(addr), .obi_we_i(we), .obi_be_i(be),
    .obi_wdata_i(wdata), .obi_rvalid_o(rvalid), .obi_rdata_o(rdata), .intr_o(intr),
    .reg_wr_o(reg_wr), .reg_wr_idx_o(reg_wr_idx), .reg_wr_data_o(reg_wr_data),
    .reg_wr_be_o(reg_wr_be), .reg_ld_o(reg_ld), .reg_rd_idx_o(reg_rd_idx),
    .reg_rd_data_i(reg_rd_data), .kf_start_o(kf_start), .kf_busy_i(kf_busy), .kf_done_i(kf_done));

  function automatic logic [31:0] word_of(input logic [5:0] i);
    return {26'h2a5a5a5, i} ^ 32'h1357_9bdf;
  endfunction
  assign reg_rd_data = word_of(reg_rd_idx);

  always #5 clk = ~clk;
  always @(posedge clk) if (kf_start) n_start <= n_start + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one OBI write; checks the grant and the state-register write strobe
  task automatic bus_write(input logic [7:0] off, input logic [31:0] d, input logic [3:0] b,
                           input bit expect_reg_wr);
    @(negedge clk);
    req = 1; we = 1; addr = {24'h0, off}; wdata = d; be = b;
    #1;
    check(gnt, "grant in request cycle");
    check(reg_wr == expect_reg_wr, $sformatf("reg write strobe at %h", off));
    if (expect_reg_wr)
      check(reg_wr_idx == off[7:2] && reg_wr_data == d && reg_wr_be == b, "reg write fields");
    @(negedge clk);
    req = 0; we = 0;
    check(rvalid, "write response one cycle later");
  endtask

  task automatic bus_read(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk);
    req = 1; we = 0; addr = {24'h0, off}; be = 4'hf;
    #1 check(gnt, "grant in request cycle");
    @(negedge clk);
    req = 0;
    check(rvalid, "read response one cycle later");
    d = rdata;
  endtask

  logic [31:0] d;

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0; be = 0; kf_busy = 0; kf_done = 0; n_start = 0;
    repeat (2) @(negedge clk); rst_n = 1; n_start = 0;
    check(!intr && !kf_start, "quiet after reset");
    bus_write(8'h1C, 32'hdead_beef, 4'b0101, 1);
    bus_write(8'hC4, 32'h0123_4567, 4'b1111, 1);
    for (int w = 0; w < 50; w += 7) begin
      bus_read(8'(4*w), d);
      check(d == word_of(6'(w)), $sformatf("state word %0d read", w));
    end
    bus_read(8'hD0, d);   check(d == 0, "unmapped offset reads 0");
    bus_write(8'hD0, 32'hffff_ffff, 4'hf, 0);
    bus_read(8'hCC, d);   check(d == 0, "status idle");
    // start with the interrupt enabled
    bus_write(8'hC8, 32'h3, 4'h1, 0);
    @(negedge clk);
    check(n_start == 1, "START pulses kf_start once");
    bus_read(8'hC8, d);   check(d == 32'h2, "CTRL reads IRQ_EN, START reads 0");
    kf_busy = 1;
    bus_read(8'hCC, d);   check(d[0] == 1'b1 && d[1] == 1'b0, "status busy");
    bus_write(8'h00, 32'h1111_1111, 4'hf, 0);     // dropped while busy
    bus_write(8'hC8, 32'h3, 4'h1, 0);             // START while busy: ignored
    @(negedge clk);
    check(n_start == 1, "START while busy ignored");
    @(negedge clk); kf_busy = 0; kf_done = 1; #1;
    check(reg_ld, "result loaded on done");
    @(negedge clk); kf_done = 0; #1;
    check(intr, "interrupt after done");
    bus_read(8'hCC, d);   check(d == 32'h2, "status done");
    bus_write(8'hCC, 32'h2, 4'h1, 0);             // clear DONE
    #1 check(!intr, "interrupt cleared");
    // start with the interrupt disabled
    bus_write(8'hC8, 32'h1, 4'h1, 0);
    @(negedge clk);
    check(n_start == 2, "second START");
    @(negedge clk); kf_done = 1;
    @(negedge clk); kf_done = 0; #1;
    check(!intr, "no interrupt when disabled");
    bus_read(8'hCC, d);   check(d == 32'h2, "status done without interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
