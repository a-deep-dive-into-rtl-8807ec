// tb_kronos_loose: runs the memory-mapped accelerator the way a driver
// would. For each test message the host absorbs every SHA3-384 rate block by
// reading the 26 rate words, XORing the message words in and writing them
// back, starts the permutation through CTRL, waits for the interrupt, clears
// it, and finally reads the 48-byte digest from the state words. The digests
// are compared with known SHA3-384 values. Also checked: a random state
// against the reference permutation, byte-enable writes, and the number of
// cycles from the START write to the interrupt.
module tb_kronos_loose;
  import kronos_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        req, gnt, we, rvalid, intr;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  be;

  kronos_loose dut (.clk_i(clk), .rst_ni(rst_n), .obi_req_i(req), .obi_gnt_o(gnt),
    .obi_addr_i(addr), .obi_we_i(we), .obi_be_i(be), .obi_wdata_i(wdata),
    .obi_rvalid_o(rvalid), .obi_rdata_o(rdata), .intr_o(intr));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [7:0] off, input logic [31:0] d, input logic [3:0] b = 4'hf);
    @(negedge clk);
    req = 1; we = 1; addr = 32'h2000_0000 | 32'(off); wdata = d; be = b;
    do @(negedge clk); while (!gnt);
    req = 0; we = 0;
    while (!rvalid) @(negedge clk);
  endtask

  task automatic bus_read(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk);
    req = 1; we = 0; addr = 32'h2000_0000 | 32'(off); be = 4'hf;
    do @(negedge clk); while (!gnt);
    req = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask

  // start, wait for the interrupt, clear it; returns START-to-interrupt cycles
  task automatic permute(output int n);
    bus_write(8'hC8, 32'h3, 4'h1);
    n = 1;   // the write's response cycle
    while (!intr) begin @(negedge clk); n++; end
    bus_write(8'hCC, 32'h2, 4'h1);
    check(!intr, "interrupt cleared");
  endtask

  task automatic write_state(input state_t s);
    for (int w = 0; w < 50; w++) bus_write(8'(4*w), s[w/2][32*(w%2) +: 32]);
  endtask

  task automatic read_state(output state_t s);
    logic [31:0] d;
    for (int w = 0; w < 50; w++) begin bus_read(8'(4*w), d); s[w/2][32*(w%2) +: 32] = d; end
  endtask

  state_t s, blk, got;
  logic [31:0] d;
  logic [383:0] dig;
  int n;

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0; be = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // random state through one permutation
    s = rand_state();
    write_state(s);
    read_state(got);
    check(got == s, "state written and read back");
    permute(n);
    check(n == 27, $sformatf("START to interrupt %0d cycles, expected 27", n));
    read_state(got);
    check(got == ref_perm(s), "random state permuted");
    // byte-enable write into word 3
    bus_write(8'h0C, 32'h0000_0000);
    bus_write(8'h0C, 32'hAABB_CCDD, 4'b1010);
    bus_read(8'h0C, d);
    check(d == 32'hAA00_CC00, "byte-enable write");
    // SHA3-384 of the test messages, starting from a zeroed state
    for (int m = 0; m < 3; m++) begin
      write_state('0);
      for (int b = 0; b < num_blocks(m); b++) begin
        blk = padded_block(m, b);
        for (int w = 0; w < RATE_BYTES / 4; w++) begin
          bus_read(8'(4*w), d);
          bus_write(8'(4*w), d ^ blk[w/2][32*(w%2) +: 32]);
        end
        permute(n);
        check(n == 27, "permutation latency");
      end
      for (int w = 0; w < 12; w++) begin
        bus_read(8'(4*w), d);
        got[w/2][32*(w%2) +: 32] = d;
      end
      dig = state_digest(got);
      check(dig == msg_digest(m), $sformatf("SHA3-384 of message %0d: %h", m, dig));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
