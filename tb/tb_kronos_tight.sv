// tb_kronos_tight: drives the tightly coupled rol_32 unit through its
// CV-X-IF as a core would. Checked:
// - rol_32 results for random lanes, all amounts and both halves, against a
//   bit-by-bit rotation, with the right id and rd and we = 1;
// - the result one cycle after the issue handshake when the commit comes
//   with the issue;
// - a commit that comes later, a killed instruction (no result), an
//   instruction of another opcode refused at once, an offer whose source
//   registers are not yet valid held back, and a result held while the core
//   is not ready.
module tb_kronos_tight;
  import kronos_tb_pkg::*;
  import cvxif_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic          issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;

  kronos_tight dut (.clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .issue_req_i(issue_req),
    .issue_resp_o(issue_resp), .commit_valid_i(commit_valid), .commit_i(commit),
    .result_valid_o(result_valid), .result_ready_i(result_ready), .result_o(result));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] rol_instr(input int amt, input bit hi, input logic [4:0] rd);
    return rtype({hi, 6'(amt)}, 3'b000, rd, OPC_CUSTOM0);
  endfunction

  // Offer one instruction. commit_delay < 0: commit in the issue cycle;
  // otherwise that many cycles after it. kill: the commit kills it.
  // ready_delay: cycles the core keeps result_ready low once the result is valid.
  task automatic offload(input logic [31:0] instr, input logic [31:0] rs1, rs2,
                         input logic [3:0] id, input int commit_delay, input bit kill,
                         input int ready_delay, output logic [31:0] data, output int lat);
    logic [31:0] held;
    @(negedge clk);
    issue_valid = 1; issue_req = '0; issue_req.instr = instr; issue_req.id = id;
    issue_req.rs[0] = rs1; issue_req.rs[1] = rs2; issue_req.rs_valid = 2'b11;
    commit_valid = (commit_delay < 0); commit.id = id; commit.commit_kill = kill;
    #1;
    while (!issue_ready) begin @(negedge clk); #1; end
    check(issue_resp.accept && issue_resp.writeback, "rol_32 accepted with writeback");
    @(negedge clk);
    issue_valid = 0; commit_valid = 0;
    lat = 1;
    if (commit_delay >= 0) begin
      repeat (commit_delay) begin
        #1 check(!result_valid, "no result before commit"); @(negedge clk); lat++;
      end
      commit_valid = 1; commit.id = id; commit.commit_kill = kill;
      @(negedge clk); commit_valid = 0; lat++;
    end
    #1;
    if (kill) begin
      repeat (3) begin check(!result_valid, "no result for killed instruction"); @(negedge clk); #1; end
      check(issue_ready, "ready again after kill");
      data = 'x;
      return;
    end
    check(result_valid, "result valid");
    held = result.data;
    result_ready = 0;
    repeat (ready_delay) begin
      @(negedge clk); #1;
      check(result_valid && result.data == held, "result held while core not ready");
    end
    result_ready = 1;
    check(result.id == id && result.rd == instr[11:7] && result.we, "result id/rd/we");
    check(!issue_ready, "no new issue while result pending");
    data = result.data;
    @(negedge clk);
    result_ready = 0;
  endtask

  logic [31:0] lo, hi, d;
  lane_t r;
  int lat;

  initial begin
    issue_valid = 0; commit_valid = 0; result_ready = 0; issue_req = '0; commit = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // every amount, both halves, commit with the issue
    for (int t = 0; t < 128; t++) begin
      lo = $urandom; hi = $urandom;
      r = rol({hi, lo}, t % 64);
      offload(rol_instr(t % 64, t >= 64, 5'(t % 32)), lo, hi, 4'(t), -1, 0, 0, d, lat);
      check(d == (t >= 64 ? r[63:32] : r[31:0]), $sformatf("rol_32 amount %0d half %0d", t % 64, t >= 64));
      check(lat == 1, $sformatf("result latency %0d, expected 1", lat));
    end
    // late commit and result back-pressure
    lo = 32'h8000_0001; hi = 32'h0000_0003;
    r = rol({hi, lo}, 1);
    offload(rol_instr(1, 0, 5'd7), lo, hi, 4'd5, 3, 0, 2, d, lat);
    check(d == r[31:0], "late commit result");
    // killed instruction
    offload(rol_instr(9, 1, 5'd8), lo, hi, 4'd6, 2, 1, 0, d, lat);
    offload(rol_instr(9, 1, 5'd8), lo, hi, 4'd7, -1, 1, 0, d, lat);
    // other opcodes are refused at once
    @(negedge clk);
    issue_valid = 1; issue_req = '0; issue_req.instr = 32'h0020_81b3; // add x3, x1, x2
    #1 check(issue_ready && !issue_resp.accept, "standard instruction refused");
    issue_req.instr = rtype(7'd0, 3'b001, 5'd1, OPC_CUSTOM0);
    #1 check(issue_ready && !issue_resp.accept, "custom-0 with other funct3 refused");
    // rol_32 whose operands are not ready waits
    issue_req.instr = rol_instr(4, 0, 5'd3); issue_req.rs_valid = 2'b01;
    #1 check(!issue_ready, "held until operands are valid");
    @(negedge clk); issue_valid = 0; issue_req.rs_valid = 2'b11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
