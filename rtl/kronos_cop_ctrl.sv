// kronos_cop_ctrl: CV-X-IF controller of the KRONOS coprocessor.
//
// Three R-type custom instructions on opcode custom-1 (0101011) drive the
// coprocessor's 1600-bit state register and permutation engine:
//   funct3 000  load  : lane funct7 <= {rs2, rs1}      (64-bit chunk, no rd)
//   funct3 001  start : run the 24-round permutation   (no rd)
//   funct3 010  store : rd <= 32-bit word funct7 of the state
// Lanes are numbered x + 5*y (0..24), words 0..49 (word 2k = low half of
// lane k). Other instructions are refused at once (accept = 0).
//
// One instruction is in flight at a time:
//   IDLE      offer seen; load waits for both source values, then the
//             instruction is accepted (writeback = 1 only for store) and its
//             fields and operands are kept.
//   WAIT_CMT  wait for the commit of its id; a kill returns to IDLE with no
//             effect on the state. The commit may come in the issue cycle.
//   EXEC      one cycle: load writes the lane, store reads the word, start
//             pulses kf_start_o.
//   WAIT_KF   (start only) wait for kf_done_i; the result is then loaded
//             into the state register.
//   RESULT    offer the result (id, rd, data, we) until result_ready_i.
// issue_ready_o is high only in IDLE, so a start holds back every later
// instruction until the permutation has finished and its result was taken.
//
// Latency, counted from the clock edge of the issue handshake when the
// commit comes with the issue: result_valid_o rises 2 cycles later for load
// and store and 27 cycles later for start (2 + the engine's 25).
//
// The three instructions, their widths (64-bit in, 32-bit out) and the 24
// rounds follow the design; the encoding, the index field and the blocking start are this design's choices.
module kronos_cop_ctrl
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
  output x_result_t     result_o,
  // state register
  output logic          reg_wr_o,
  output logic [4:0]    reg_wr_idx_o,
  output logic [63:0]   reg_wr_data_o,
  output logic [5:0]    reg_rd_idx_o,
  input  logic [31:0]   reg_rd_data_i,
  // permutation engine
  output logic          kf_start_o,
  input  logic          kf_done_i
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_CMT, S_EXEC, S_WAIT_KF, S_RESULT} state_e;
  typedef enum logic [1:0] {OP_LOAD, OP_START, OP_STORE, OP_NONE} op_e;

  state_e                state_q, state_d;
  op_e                   op, op_q;
  logic                  issue_hs, commit_hit, kill_hit;
  logic [X_ID_WIDTH-1:0] id_q, cur_id;
  logic [4:0]            rd_q;
  logic [6:0]            idx_q;
  logic [63:0]           data_q;
  logic [31:0]           res_q;

  always_comb begin
    op = OP_NONE;
    if (instr_opcode(issue_req_i.instr) == OPC_CUSTOM1) begin
      unique case (instr_funct3(issue_req_i.instr))
        3'b000:  op = OP_LOAD;
        3'b001:  op = OP_START;
        3'b010:  op = OP_STORE;
        default: op = OP_NONE;
      endcase
    end
  end

  assign issue_ready_o = (state_q == S_IDLE) && ((op != OP_LOAD) || (&issue_req_i.rs_valid));
  assign issue_hs      = issue_valid_i && issue_ready_o && (op != OP_NONE);

  always_comb begin
    issue_resp_o           = '0;
    issue_resp_o.accept    = (op != OP_NONE);
    issue_resp_o.writeback = (op == OP_STORE);
  end

  assign cur_id     = (state_q == S_IDLE) ? issue_req_i.id : id_q;
  assign commit_hit = commit_valid_i && (commit_i.id == cur_id) && !commit_i.commit_kill;
  assign kill_hit   = commit_valid_i && (commit_i.id == cur_id) &&  commit_i.commit_kill;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:     if (issue_hs) state_d = kill_hit ? S_IDLE
                                        : (commit_hit ? S_EXEC : S_WAIT_CMT);
      S_WAIT_CMT: if (kill_hit) state_d = S_IDLE;
                  else if (commit_hit) state_d = S_EXEC;
      S_EXEC:     state_d = (op_q == OP_START) ? S_WAIT_KF : S_RESULT;
      S_WAIT_KF:  if (kf_done_i) state_d = S_RESULT;
      S_RESULT:   if (result_ready_i) state_d = S_IDLE;
      default:    state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      op_q    <= OP_NONE;
      id_q    <= '0;
      rd_q    <= '0;
      idx_q   <= '0;
      data_q  <= '0;
      res_q   <= '0;
    end else begin
      state_q <= state_d;
      if (issue_hs) begin
        op_q   <= op;
        id_q   <= issue_req_i.id;
        rd_q   <= instr_rd(issue_req_i.instr);
        idx_q  <= instr_funct7(issue_req_i.instr);
        data_q <= {issue_req_i.rs[1], issue_req_i.rs[0]};
      end
      if (state_q == S_EXEC && op_q == OP_STORE)
        res_q <= (idx_q < 7'd50) ? reg_rd_data_i : 32'h0;
    end
  end

  assign reg_wr_o      = (state_q == S_EXEC) && (op_q == OP_LOAD) && (idx_q < 7'd25);
  assign reg_wr_idx_o  = idx_q[4:0];
  assign reg_wr_data_o = data_q;
  assign reg_rd_idx_o  = idx_q[5:0];
  assign kf_start_o    = (state_q == S_EXEC) && (op_q == OP_START);

  always_comb begin
    result_valid_o = (state_q == S_RESULT);
    result_o       = '0;
    result_o.id    = id_q;
    result_o.rd    = rd_q;
    result_o.we    = (op_q == OP_STORE);
    result_o.data  = (op_q == OP_STORE) ? res_q : 32'h0;
  end

  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (result_valid_o && !result_ready_i) |=> (result_valid_o && $stable(result_o)));

endmodule
