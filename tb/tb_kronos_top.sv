// tb_kronos_top: end-to-end test of the three KRONOS variants in kronos_top,
// at the top's default parameters. Each variant computes SHA3-384 of the
// three test messages (empty, "abc", 150 bytes spanning two rate blocks)
// the way its software would, and the digests are compared with known
// values:
//   loose - the host absorbs blocks with bus reads/writes of the state
//           words, starts the permutation and waits for the interrupt;
//   tight - the host runs Keccak-f in software and hands every 64-bit
//           rotation (theta and rho) to the rol_32 instruction, one
//           instruction per 32-bit half;
//   cop   - the host absorbs with store/load instructions and starts the
//           permutation with the start instruction.
// The CV-X-IF hosts vary the commit delay and the result back-pressure at
// random and kill some instructions (then offer them again). Each mechanism
// below must occur at least once, and the cycles per hash are printed.
module tb_kronos_top;
  import kronos_tb_pkg::*;
  import cvxif_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic        l_req, l_gnt, l_we, l_rvalid, l_intr;
  logic [31:0] l_addr, l_wdata, l_rdata;
  logic [3:0]  l_be;
  logic          t_iv, t_ir, t_cv, t_rv, t_rr, c_iv, c_ir, c_cv, c_rv, c_rr;
  x_issue_req_t  t_ireq, c_ireq;
  x_issue_resp_t t_iresp, c_iresp;
  x_commit_t     t_cmt, c_cmt;
  x_result_t     t_res, c_res;

  kronos_top dut (.clk_i(clk), .rst_ni(rst_n),
    .loose_req_i(l_req), .loose_gnt_o(l_gnt), .loose_addr_i(l_addr), .loose_we_i(l_we),
    .loose_be_i(l_be), .loose_wdata_i(l_wdata), .loose_rvalid_o(l_rvalid),
    .loose_rdata_o(l_rdata), .loose_intr_o(l_intr),
    .tight_issue_valid_i(t_iv), .tight_issue_ready_o(t_ir), .tight_issue_req_i(t_ireq),
    .tight_issue_resp_o(t_iresp), .tight_commit_valid_i(t_cv), .tight_commit_i(t_cmt),
    .tight_result_valid_o(t_rv), .tight_result_ready_i(t_rr), .tight_result_o(t_res),
    .cop_issue_valid_i(c_iv), .cop_issue_ready_o(c_ir), .cop_issue_req_i(c_ireq),
    .cop_issue_resp_o(c_iresp), .cop_commit_valid_i(c_cv), .cop_commit_i(c_cmt),
    .cop_result_valid_o(c_rv), .cop_result_ready_i(c_rr), .cop_result_o(c_res));

  cvxif_host th (.clk_i(clk), .issue_valid_o(t_iv), .issue_ready_i(t_ir), .issue_req_o(t_ireq),
    .issue_resp_i(t_iresp), .commit_valid_o(t_cv), .commit_o(t_cmt), .result_valid_i(t_rv),
    .result_ready_o(t_rr), .result_i(t_res));
  cvxif_host ch (.clk_i(clk), .issue_valid_o(c_iv), .issue_ready_i(c_ir), .issue_req_o(c_ireq),
    .issue_resp_i(c_iresp), .commit_valid_o(c_cv), .commit_o(c_cmt), .result_valid_i(c_rv),
    .result_ready_o(c_rr), .result_i(c_res));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_irq, n_be_write, n_busy_drop, n_rol, n_late_commit, n_kill, n_refused, n_stall,
      n_load, n_start, n_store, n_cop_kill, n_cop_stall, n_cop_refused;

  // ---------------- loosely coupled: bus host ----------------
  task automatic bus_write(input logic [7:0] off, input logic [31:0] d, input logic [3:0] b = 4'hf);
    @(negedge clk);
    l_req = 1; l_we = 1; l_addr = 32'h2000_0000 | 32'(off); l_wdata = d; l_be = b;
    do @(negedge clk); while (!l_gnt);
    l_req = 0; l_we = 0;
    while (!l_rvalid) @(negedge clk);
  endtask

  task automatic bus_read(input logic [7:0] off, output logic [31:0] d);
    @(negedge clk);
    l_req = 1; l_we = 0; l_addr = 32'h2000_0000 | 32'(off); l_be = 4'hf;
    do @(negedge clk); while (!l_gnt);
    l_req = 0;
    while (!l_rvalid) @(negedge clk);
    d = l_rdata;
  endtask

  task automatic loose_hash(input int m, output logic [383:0] dig);
    state_t blk, got;
    logic [31:0] d, keep;
    for (int w = 0; w < 50; w++) bus_write(8'(4*w), 32'h0);
    for (int b = 0; b < num_blocks(m); b++) begin
      blk = padded_block(m, b);
      for (int w = 0; w < RATE_BYTES / 4; w++) begin
        bus_read(8'(4*w), d);
        d ^= blk[w/2][32*(w%2) +: 32];
        // the first word goes in two halves by byte enables
        if (w == 0) begin
          bus_write(8'h00, d, 4'b0011); bus_write(8'h00, d, 4'b1100); n_be_write++;
        end else bus_write(8'(4*w), d);
      end
      bus_write(8'hC8, 32'h3, 4'h1);
      // a write while the permutation runs is dropped
      bus_read(8'h04, keep);
      bus_write(8'h04, ~keep);
      bus_read(8'h04, d);
      if (l_intr == 0) begin
        check(d == keep, "state write dropped while busy");
        n_busy_drop++;
      end
      while (!l_intr) @(negedge clk);
      n_irq++;
      bus_write(8'hCC, 32'h2, 4'h1);
    end
    for (int w = 0; w < 12; w++) begin bus_read(8'(4*w), d); got[w/2][32*(w%2) +: 32] = d; end
    dig = state_digest(got);
  endtask

  // ---------------- tightly coupled: software Keccak with rol_32 ----------------
  task automatic rol_half(input lane_t v, input int n, input bit hi, output logic [31:0] r);
    bit acc;
    int lat, cd, rd;
    bit kill;
    forever begin
      cd   = $urandom_range(0, 3) - 1;
      rd   = ($urandom_range(0, 7) == 0) ? 2 : 0;
      kill = ($urandom_range(0, 40) == 0);
      th.offload(rtype({hi, 6'(n)}, 3'b000, 5'd5, OPC_CUSTOM0), v[31:0], v[63:32], cd, kill, rd,
                 acc, r, lat);
      check(acc, "rol_32 accepted");
      if (cd >= 0) n_late_commit++;
      if (rd > 0) n_stall++;
      if (kill) begin n_kill++; continue; end
      n_rol++;
      return;
    end
  endtask

  task automatic rol64(input lane_t v, input int n, output lane_t r);
    rol_half(v, n, 0, r[31:0]);
    rol_half(v, n, 1, r[63:32]);
    checks++;
    if (r != rol(v, n)) begin failures++; $display("FAIL: rol_32 pair, amount %0d", n); end
  endtask

  task automatic sw_keccak_f(inout state_t s);
    lane_t a [5][5], b [5][5];
    lane_t c [5], d [5], t;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = s[x + 5*y];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
      for (int x = 0; x < 5; x++) begin rol64(c[(x+1)%5], 1, t); d[x] = c[(x+4)%5] ^ t; end
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) begin
        if (ROT_TAB[x][y] == 0) t = a[x][y];
        else rol64(a[x][y], ROT_TAB[x][y], t);
        b[y][(2*x + 3*y) % 5] = t;
      end
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
        a[x][y] = b[x][y] ^ ((~b[(x+1)%5][y]) & b[(x+2)%5][y]);
      a[0][0] ^= RC_TAB[r];
    end
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) s[x + 5*y] = a[x][y];
  endtask

  task automatic tight_hash(input int m, output logic [383:0] dig);
    state_t s;
    s = '0;
    for (int b = 0; b < num_blocks(m); b++) begin
      s ^= padded_block(m, b);
      sw_keccak_f(s);
    end
    dig = state_digest(s);
  endtask

  // ---------------- coprocessor ----------------
  task automatic cop_op(input logic [2:0] f3, input int idx, input lane_t v,
                        output logic [31:0] r, output int lat);
    bit acc, kill;
    int cd, rd;
    forever begin
      cd   = $urandom_range(0, 3) - 1;
      rd   = ($urandom_range(0, 7) == 0) ? 1 : 0;
      kill = ($urandom_range(0, 30) == 0);
      ch.offload(rtype(7'(idx), f3, 5'd11, OPC_CUSTOM1), v[31:0], v[63:32], cd, kill, rd,
                 acc, r, lat);
      check(acc, "coprocessor instruction accepted");
      if (rd > 0) n_cop_stall++;
      if (kill) begin n_cop_kill++; continue; end
      return;
    end
  endtask

  task automatic cop_hash(input int m, output logic [383:0] dig);
    state_t blk, got;
    lane_t v;
    logic [31:0] d;
    int lat;
    for (int k = 0; k < 25; k++) begin cop_op(3'b000, k, '0, d, lat); n_load++; end
    for (int b = 0; b < num_blocks(m); b++) begin
      blk = padded_block(m, b);
      for (int k = 0; k < RATE_BYTES / 8; k++) begin
        cop_op(3'b010, 2*k, '0, d, lat);   v[31:0]  = d; n_store++;
        cop_op(3'b010, 2*k+1, '0, d, lat); v[63:32] = d; n_store++;
        cop_op(3'b000, k, v ^ blk[k], d, lat); n_load++;
      end
      cop_op(3'b001, 0, '0, d, lat); n_start++;
      check(lat >= 27, "start completes after the permutation");
    end
    for (int w = 0; w < 12; w++) begin
      cop_op(3'b010, w, '0, d, lat); n_store++; got[w/2][32*(w%2) +: 32] = d;
    end
    dig = state_digest(got);
  endtask

  logic [383:0] dig;
  int t0;
  bit acc;
  logic [31:0] d;
  int lat;

  initial begin
    l_req = 0; l_we = 0; l_addr = 0; l_wdata = 0; l_be = 0;
    {n_irq, n_be_write, n_busy_drop, n_rol, n_late_commit, n_kill, n_refused, n_stall} = '0;
    {n_load, n_start, n_store, n_cop_kill, n_cop_stall, n_cop_refused} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      for (int m = 0; m < 3; m++) begin
        t0 = int'($time / 10);
        loose_hash(m, dig);
        check(dig == msg_digest(m), $sformatf("loosely coupled SHA3-384, message %0d", m));
        $display("loose: message %0d (%0d bytes) hashed in %0d cycles", m, msg_len(m), int'($time / 10) - t0);
      end
      for (int m = 0; m < 3; m++) begin
        int t1;
        t1 = int'($time / 10);
        tight_hash(m, dig);
        check(dig == msg_digest(m), $sformatf("tightly coupled SHA3-384, message %0d", m));
        $display("tight: message %0d hashed in %0d cycles", m, int'($time / 10) - t1);
      end
      for (int m = 0; m < 3; m++) begin
        int t2;
        t2 = int'($time / 10);
        cop_hash(m, dig);
        check(dig == msg_digest(m), $sformatf("coprocessor SHA3-384, message %0d", m));
        $display("cop: message %0d hashed in %0d cycles", m, int'($time / 10) - t2);
      end
    join
    // instructions the accelerators do not own
    th.offload(32'h0020_81b3, 1, 2, -1, 0, 0, acc, d, lat);
    if (!acc) n_refused++;
    ch.offload(rtype(7'd0, 3'b111, 5'd1, OPC_CUSTOM1), 1, 2, -1, 0, 0, acc, d, lat);
    if (!acc) n_cop_refused++;
    $display("mechanisms: irq=%0d be_write=%0d busy_drop=%0d rol=%0d late_commit=%0d kill=%0d refused=%0d stall=%0d",
             n_irq, n_be_write, n_busy_drop, n_rol, n_late_commit, n_kill, n_refused, n_stall);
    $display("            load=%0d start=%0d store=%0d cop_kill=%0d cop_stall=%0d cop_refused=%0d",
             n_load, n_start, n_store, n_cop_kill, n_cop_stall, n_cop_refused);
    check(n_irq > 0, "interrupt seen");
    check(n_be_write > 0, "byte-enable write seen");
    check(n_busy_drop > 0, "write while busy seen");
    check(n_rol > 0, "rol_32 executed");
    check(n_late_commit > 0, "late commit seen");
    check(n_kill > 0, "killed rol_32 seen");
    check(n_refused > 0, "refused instruction (tight) seen");
    check(n_stall > 0, "result back-pressure (tight) seen");
    check(n_load > 0 && n_start > 0 && n_store > 0, "load, start and store executed");
    check(n_cop_kill > 0, "killed coprocessor instruction seen");
    check(n_cop_stall > 0, "result back-pressure (coprocessor) seen");
    check(n_cop_refused > 0, "refused instruction (coprocessor) seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
