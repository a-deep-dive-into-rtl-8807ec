// kronos_tight: the tightly coupled KRONOS, a rol_32 unit on the CV-X-IF.
//
// Keccak works on 64-bit lanes, and a 32-bit core spends many shifts, ORs
// and XORs on each 64-bit rotation. This variant adds a single custom
// instruction instead of a whole permutation engine:
//   rol_32 rd, rs1, rs2   rd = half of rotl64({rs2, rs1}, amount)
// encoded as R-type on opcode custom-0 (0001011) with funct3 = 000 and
// funct7 = {half, amount[5:0]}; half = 1 returns bits 63:32.
//
// Protocol (one instruction in flight):
//   1. Issue: when idle, the controller looks at the offered instruction. A
//      rol_32 is accepted (accept = writeback = 1) once both source values
//      are valid; anything else is answered at once with accept = 0.
//   2. The accepted operands are sampled into rol32 in the handshake cycle;
//      its registered result is ready one cycle later.
//   3. Commit: the controller waits for the commit of the instruction's id.
//      A kill drops the instruction; otherwise the result is offered on the
//      result interface (rd, we = 1, the id) until result_ready_i.
// issue_ready_o is low from the accepting handshake until the result has
// been taken or the instruction killed. The commit may arrive in the same
// cycle as the issue or any time later.
//
// The CV-X-IF signals follow the interface's issue/commit/result split; the
// encoding, the single outstanding instruction and the wait for commit are
// this design's choices.
module kronos_tight
  import cvxif_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          issue_valid_i,
  output logic          issue_ready_o,
  input  x_issue_req_t  issue_req_i,
  output x_issue_resp_t issue_resp_o,
  input  logic          commit_valid_i,
  input  x_commit_t     commit_i,
  output logic          result_valid_o,
  input  logic          result_ready_i,
  output x_result_t     result_o
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_COMMIT, S_RESULT} state_e;
  state_e state_q, state_d;

  logic                  is_rol, issue_hs, commit_hit, kill_hit;
  logic [X_ID_WIDTH-1:0] id_q;
  logic [4:0]            rd_q;
  logic [31:0]           rol_res;

  assign is_rol = (instr_opcode(issue_req_i.instr) == OPC_CUSTOM0) &&
                  (instr_funct3(issue_req_i.instr) == 3'b000);

  // ready: idle, and for a rol_32 both operands present
  assign issue_ready_o = (state_q == S_IDLE) && (!is_rol || (&issue_req_i.rs_valid));
  assign issue_hs      = issue_valid_i && issue_ready_o && is_rol;

  always_comb begin
    issue_resp_o           = '0;
    issue_resp_o.accept    = is_rol;
    issue_resp_o.writeback = is_rol;
  end

  rol32 u_rol32 (
    .clk_i, .rst_ni,
    .en_i     (issue_hs),
    .lo_i     (issue_req_i.rs[0]),
    .hi_i     (issue_req_i.rs[1]),
    .amt_i    (instr_funct7(issue_req_i.instr)[5:0]),
    .sel_hi_i (instr_funct7(issue_req_i.instr)[6]),
    .res_o    (rol_res)
  );

  // commit of the instruction in flight (also in its own issue cycle)
  logic [X_ID_WIDTH-1:0] cur_id;
  assign cur_id     = (state_q == S_IDLE) ? issue_req_i.id : id_q;
  assign commit_hit = commit_valid_i && (commit_i.id == cur_id) && !commit_i.commit_kill;
  assign kill_hit   = commit_valid_i && (commit_i.id == cur_id) &&  commit_i.commit_kill;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:        if (issue_hs) state_d = kill_hit ? S_IDLE
                                           : (commit_hit ? S_RESULT : S_WAIT_COMMIT);
      S_WAIT_COMMIT: if (kill_hit) state_d = S_IDLE;
                     else if (commit_hit) state_d = S_RESULT;
      S_RESULT:      if (result_ready_i) state_d = S_IDLE;
      default:       state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      id_q        <= '0;
      rd_q        <= '0;
    end else begin
      state_q     <= state_d;
      if (issue_hs) begin
        id_q <= issue_req_i.id;
        rd_q <= instr_rd(issue_req_i.instr);
      end
    end
  end

  always_comb begin
    result_valid_o = (state_q == S_RESULT);
    result_o       = '0;
    result_o.id    = id_q;
    result_o.data  = rol_res;
    result_o.rd    = rd_q;
    result_o.we    = 1'b1;
  end

  // the result payload must stay stable while it waits for ready
  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (result_valid_o && !result_ready_i) |=> (result_valid_o && $stable(result_o)));

endmodule
