// cvxif_host: behavioural model of the core side of a CV-X-IF, for
// testbenches. offload() offers one instruction, commits or kills it with a
// chosen delay, waits for and takes the result, and reports the cycles from
// the issue handshake to the result; it also counts the stalls it saw
// (issue held back, result held by the core).
module cvxif_host
  import cvxif_pkg::*;
(
  input  logic          clk_i,
  output logic          issue_valid_o,
  input  logic          issue_ready_i,
  output x_issue_req_t  issue_req_o,
  input  x_issue_resp_t issue_resp_i,
  output logic          commit_valid_o,
  output x_commit_t     commit_o,
  input  logic          result_valid_i,
  output logic          result_ready_o,
  input  x_result_t     result_i
);

  int issue_stalls = 0;    // cycles an offer waited for issue_ready
  int result_stalls = 0;   // cycles a valid result waited for the core
  int refused = 0;         // instructions answered with accept = 0
  int kills = 0;
  logic [3:0] next_id = 0;
  x_result_t  last_result;  // the last result taken

  initial begin
    issue_valid_o = 0; issue_req_o = '0; commit_valid_o = 0; commit_o = '0; result_ready_o = 0;
  end

  // accepted: the instruction was accepted; data: result data (when not killed);
  // lat: cycles from the issue handshake edge to the result being valid
  task automatic offload(input logic [31:0] instr, input logic [31:0] rs1, rs2,
                         input int commit_delay, input bit kill, input int ready_delay,
                         output bit accepted, output logic [31:0] data, output int lat);
    logic [3:0] id;
    id = next_id; next_id++;
    data = '0; lat = 0;
    @(negedge clk_i);
    issue_valid_o = 1; issue_req_o = '0; issue_req_o.instr = instr; issue_req_o.id = id;
    issue_req_o.rs[0] = rs1; issue_req_o.rs[1] = rs2; issue_req_o.rs_valid = 2'b11;
    commit_valid_o = (commit_delay < 0); commit_o.id = id; commit_o.commit_kill = kill;
    #1;
    while (!issue_ready_i) begin issue_stalls++; @(negedge clk_i); #1; end
    accepted = issue_resp_i.accept;
    @(negedge clk_i);
    issue_valid_o = 0; commit_valid_o = 0;
    if (!accepted) begin refused++; return; end
    lat = 1;
    if (commit_delay >= 0) begin
      repeat (commit_delay) begin @(negedge clk_i); lat++; end
      commit_valid_o = 1; commit_o.id = id; commit_o.commit_kill = kill;
      @(negedge clk_i); commit_valid_o = 0; lat++;
    end
    if (kill) begin kills++; return; end
    #1;
    while (!result_valid_i) begin @(negedge clk_i); lat++; #1; end
    repeat (ready_delay) begin result_stalls++; @(negedge clk_i); #1; end
    result_ready_o = 1;
    data = result_i.data;
    last_result = result_i;
    @(negedge clk_i);
    result_ready_o = 0;
  endtask

endmodule
