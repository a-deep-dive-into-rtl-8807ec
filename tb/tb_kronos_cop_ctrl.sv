// tb_kronos_cop_ctrl: checks the coprocessor controller on its own. The
// testbench plays the state register (store reads a fixed function of the
// word index) and the permutation engine (done 25 cycles after start).
// Checked: load writes lane funct7 with {rs2, rs1} exactly once, only after
// the commit and never when killed; store returns the indexed word in rd;
// start pulses the engine once and completes only after done; results carry
// id, rd and we; result latencies (2 cycles for load/store, 27 for start);
// other instructions refused; the issue interface closed while a start runs.
module tb_kronos_cop_ctrl;
  import kronos_tb_pkg::*;
  import cvxif_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic          issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;
  logic          reg_wr, kf_start, kf_done;
  logic [4:0]    reg_wr_idx;
  logic [63:0]   reg_wr_data;
  logic [5:0]    reg_rd_idx;
  logic [31:0]   reg_rd_data;
  int            n_wr, n_start, kf_cnt;
  logic [4:0]    last_wr_idx;
  logic [63:0]   last_wr_data;

  kronos_cop_ctrl dut (.clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .issue_req_i(issue_req),
    .issue_resp_o(issue_resp), .commit_valid_i(commit_valid), .commit_i(commit),
    .result_valid_o(result_valid), .result_ready_i(result_ready), .result_o(result),
    .reg_wr_o(reg_wr), .reg_wr_idx_o(reg_wr_idx), .reg_wr_data_o(reg_wr_data),
    .reg_rd_idx_o(reg_rd_idx), .reg_rd_data_i(reg_rd_data),
    .kf_start_o(kf_start), .kf_done_i(kf_done));

  cvxif_host host (.clk_i(clk), .issue_valid_o(issue_valid), .issue_ready_i(issue_ready),
    .issue_req_o(issue_req), .issue_resp_i(issue_resp), .commit_valid_o(commit_valid),
    .commit_o(commit), .result_valid_i(result_valid), .result_ready_o(result_ready),
    .result_i(result));

  function automatic logic [31:0] word_of(input logic [5:0] i);
    return {26'h3c3c3c3, i} ^ 32'hf00d_0000;
  endfunction
  assign reg_rd_data = word_of(reg_rd_idx);

  // engine model: done 25 cycles after the start pulse
  always @(posedge clk) begin
    if (reg_wr) begin n_wr <= n_wr + 1; last_wr_idx <= reg_wr_idx; last_wr_data <= reg_wr_data; end
    if (kf_start) begin n_start <= n_start + 1; kf_cnt <= 25; end
    else if (kf_cnt > 0) kf_cnt <= kf_cnt - 1;
  end
  assign kf_done = (kf_cnt == 1);

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

  bit acc;
  logic [31:0] d, lo, hi;
  int lat, w0, s0;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; n_wr = 0; n_start = 0; kf_cnt = 0;
    // loads into every lane
    for (int k = 0; k < 25; k++) begin
      lo = $urandom; hi = $urandom; w0 = n_wr;
      host.offload(rtype(7'(k), 3'b000, 5'd0, OPC_CUSTOM1), lo, hi, (k % 3) - 1, 0, k % 2,
                   acc, d, lat);
      @(negedge clk);
      check(acc, "load accepted");
      check(n_wr == w0 + 1 && last_wr_idx == 5'(k) && last_wr_data == {hi, lo},
            $sformatf("load of lane %0d", k));
      check(!host.last_result.we, "load writes no register");
      if (k % 3 == 0) check(lat == 2, $sformatf("load latency %0d, expected 2", lat));
    end
    // killed load: no write
    w0 = n_wr;
    host.offload(rtype(7'd3, 3'b000, 5'd0, OPC_CUSTOM1), 1, 2, 1, 1, 0, acc, d, lat);
    repeat (3) @(negedge clk);
    check(n_wr == w0, "killed load leaves the state alone");
    // stores of every word
    for (int w = 0; w < 50; w++) begin
      host.offload(rtype(7'(w), 3'b010, 5'(w % 31 + 1), OPC_CUSTOM1), 0, 0, -1, 0, 0, acc, d, lat);
      check(acc && d == word_of(6'(w)), $sformatf("store of word %0d", w));
      check(host.last_result.we && host.last_result.rd == 5'(w % 31 + 1), "store writes rd");
      check(lat == 2, $sformatf("store latency %0d, expected 2", lat));
    end
    // start: completes after the engine
    s0 = n_start;
    host.offload(rtype(7'd0, 3'b001, 5'd0, OPC_CUSTOM1), 0, 0, -1, 0, 0, acc, d, lat);
    check(acc && n_start == s0 + 1, "start pulses the engine once");
    check(lat == 27, $sformatf("start latency %0d, expected 27", lat));
    // a second start: the interface stays closed while the permutation runs
    fork
      host.offload(rtype(7'd0, 3'b001, 5'd0, OPC_CUSTOM1), 0, 0, -1, 0, 0, acc, d, lat);
      begin
        repeat (4) @(negedge clk);
        check(!issue_ready, "issue held while the permutation runs");
      end
    join
    // other instructions are refused
    host.offload(rtype(7'd0, 3'b011, 5'd1, OPC_CUSTOM1), 0, 0, -1, 0, 0, acc, d, lat);
    check(!acc, "custom-1 funct3 011 refused");
    host.offload(rtype(7'd0, 3'b000, 5'd1, OPC_CUSTOM0), 0, 0, -1, 0, 0, acc, d, lat);
    check(!acc, "custom-0 refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
