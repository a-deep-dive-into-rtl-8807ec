// kronos_cop: the KRONOS coprocessor on the CV-X-IF.
//
// Like the memory-mapped variant it computes the whole Keccak-f[1600]
// permutation on a state register of its own, but the core reaches it with
// custom instructions instead of bus accesses: load moves a 64-bit lane from
// two core registers into the state, start runs the permutation, store
// returns one 32-bit word of the state into a core register. The core never
// holds the state during a permutation and no memory traffic is needed.
//
// kronos_cop_ctrl handles the CV-X-IF and sequencing, keccak_state_reg
// (64-bit write words) holds the state, and keccak_f permutes it in 25
// cycles and hands the result back. See kronos_cop_ctrl for the encoding and
// the timing.
//
// The split into controller, 1600-bit state register and permutation engine
// follows the KRONOS coprocessor; the interface details are this design's.
module kronos_cop
  import kronos_pkg::*;
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

  logic        reg_wr, kf_start, kf_busy, kf_done;
  logic [4:0]  reg_wr_idx;
  logic [63:0] reg_wr_data;
  logic [5:0]  reg_rd_idx;
  logic [31:0] reg_rd_data;
  state_t      reg_state, kf_state;

  kronos_cop_ctrl u_ctrl (
    .clk_i, .rst_ni,
    .issue_valid_i, .issue_ready_o, .issue_req_i, .issue_resp_o,
    .commit_valid_i, .commit_i,
    .result_valid_o, .result_ready_i, .result_o,
    .reg_wr_o      (reg_wr),
    .reg_wr_idx_o  (reg_wr_idx),
    .reg_wr_data_o (reg_wr_data),
    .reg_rd_idx_o  (reg_rd_idx),
    .reg_rd_data_i (reg_rd_data),
    .kf_start_o    (kf_start),
    .kf_done_i     (kf_done)
  );

  keccak_state_reg #(.WR_W(64)) u_keccak_reg (
    .clk_i, .rst_ni,
    .wr_en_i    (reg_wr),
    .wr_idx_i   (reg_wr_idx),
    .wr_data_i  (reg_wr_data),
    .wr_be_i    ('1),
    .ld_en_i    (kf_done),
    .ld_state_i (kf_state),
    .rd_idx_i   (reg_rd_idx),
    .rd_data_o  (reg_rd_data),
    .state_o    (reg_state)
  );

  keccak_f u_keccak_f (
    .clk_i, .rst_ni,
    .start_i (kf_start),
    .state_i (reg_state),
    .busy_o  (kf_busy),
    .done_o  (kf_done),
    .state_o (kf_state)
  );

  // the controller only starts the engine when it is idle
  a_start_when_idle: assert property (@(posedge clk_i) disable iff (!rst_ni)
    kf_start |-> !kf_busy);

endmodule
