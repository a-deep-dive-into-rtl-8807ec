// tb_kronos_cop: drives the coprocessor through its CV-X-IF as a core would.
// A random state is loaded lane by lane, permuted and stored word by word,
// and compared with the reference permutation; then SHA3-384 is computed for
// the test messages (absorbing a block = store the rate words, XOR, load
// them back; then start) and the digests are compared with known values.
// The start instruction's latency is checked too.
module tb_kronos_cop;
  import kronos_tb_pkg::*;
  import cvxif_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic          issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;

  kronos_cop dut (.clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .issue_req_i(issue_req),
    .issue_resp_o(issue_resp), .commit_valid_i(commit_valid), .commit_i(commit),
    .result_valid_o(result_valid), .result_ready_i(result_ready), .result_o(result));

  cvxif_host host (.clk_i(clk), .issue_valid_o(issue_valid), .issue_ready_i(issue_ready),
    .issue_req_o(issue_req), .issue_resp_i(issue_resp), .commit_valid_o(commit_valid),
    .commit_o(commit), .result_valid_i(result_valid), .result_ready_o(result_ready),
    .result_i(result));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit acc;
  int lat;

  task automatic load_lane(input int k, input lane_t v);
    logic [31:0] d;
    host.offload(rtype(7'(k), 3'b000, 5'd0, OPC_CUSTOM1), v[31:0], v[63:32], -1, 0, 0, acc, d, lat);
  endtask

  task automatic store_word(input int w, output logic [31:0] d);
    host.offload(rtype(7'(w), 3'b010, 5'd10, OPC_CUSTOM1), 0, 0, -1, 0, 0, acc, d, lat);
  endtask

  task automatic start_perm(output int n);
    logic [31:0] d;
    host.offload(rtype(7'd0, 3'b001, 5'd0, OPC_CUSTOM1), 0, 0, -1, 0, 0, acc, d, n);
  endtask

  state_t s, got, blk;
  logic [31:0] d;
  int n;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    s = rand_state();
    for (int k = 0; k < 25; k++) load_lane(k, s[k]);
    for (int w = 0; w < 50; w++) begin store_word(w, d); got[w/2][32*(w%2) +: 32] = d; end
    for (int k = 0; k < 25; k++) check(got[k] == s[k], $sformatf("lane %0d loaded and stored back", k));
    start_perm(n);
    check(n == 27, $sformatf("start latency %0d, expected 27", n));
    for (int w = 0; w < 50; w++) begin store_word(w, d); got[w/2][32*(w%2) +: 32] = d; end
    s = ref_perm(s);
    for (int k = 0; k < 25; k++) check(got[k] == s[k], $sformatf("lane %0d of the permuted state", k));
    for (int m = 0; m < 3; m++) begin
      for (int k = 0; k < 25; k++) load_lane(k, '0);
      for (int b = 0; b < num_blocks(m); b++) begin
        blk = padded_block(m, b);
        for (int k = 0; k < RATE_BYTES / 8; k++) begin
          lane_t v;
          store_word(2*k, d);   v[31:0]  = d;
          store_word(2*k+1, d); v[63:32] = d;
          load_lane(k, v ^ blk[k]);
        end
        start_perm(n);
      end
      for (int w = 0; w < 12; w++) begin store_word(w, d); got[w/2][32*(w%2) +: 32] = d; end
      check(state_digest(got) == msg_digest(m), $sformatf("SHA3-384 of message %0d", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
