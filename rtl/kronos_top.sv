// kronos_top: the three KRONOS integration variants, side by side.
//
// Each variant accelerates Keccak for a RISC-V core in a different way, and
// each would sit in its own system, so they share nothing but clock and
// reset here:
//   loose_* - memory-mapped accelerator of the whole permutation, an OBI
//             slave with its own state registers and an interrupt;
//   tight_* - a rol_32 instruction (64-bit rotation on 32-bit registers)
//             behind the core's CV-X-IF;
//   cop_*   - a coprocessor with its own 1600-bit state and permutation
//             engine, driven by load/start/store instructions on the CV-X-IF.
// The core, bus and memory around them are outside this design; their
// signals are this module's ports. Placing the variants side by side, rather
// than in one system, is this design's choice: each was meant for its own
// microcontroller build.
module kronos_top
  import cvxif_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  // loosely coupled: OBI slave and interrupt
  input  logic          loose_req_i,
  output logic          loose_gnt_o,
  input  logic [31:0]   loose_addr_i,
  input  logic          loose_we_i,
  input  logic [3:0]    loose_be_i,
  input  logic [31:0]   loose_wdata_i,
  output logic          loose_rvalid_o,
  output logic [31:0]   loose_rdata_o,
  output logic          loose_intr_o,
  // tightly coupled: CV-X-IF
  input  logic          tight_issue_valid_i,
  output logic          tight_issue_ready_o,
  input  x_issue_req_t  tight_issue_req_i,
  output x_issue_resp_t tight_issue_resp_o,
  input  logic          tight_commit_valid_i,
  input  x_commit_t     tight_commit_i,
  output logic          tight_result_valid_o,
  input  logic          tight_result_ready_i,
  output x_result_t     tight_result_o,
  // coprocessor: CV-X-IF
  input  logic          cop_issue_valid_i,
  output logic          cop_issue_ready_o,
  input  x_issue_req_t  cop_issue_req_i,
  output x_issue_resp_t cop_issue_resp_o,
  input  logic          cop_commit_valid_i,
  input  x_commit_t     cop_commit_i,
  output logic          cop_result_valid_o,
  input  logic          cop_result_ready_i,
  output x_result_t     cop_result_o
);

  kronos_loose u_loose (
    .clk_i, .rst_ni,
    .obi_req_i    (loose_req_i),
    .obi_gnt_o    (loose_gnt_o),
    .obi_addr_i   (loose_addr_i),
    .obi_we_i     (loose_we_i),
    .obi_be_i     (loose_be_i),
    .obi_wdata_i  (loose_wdata_i),
    .obi_rvalid_o (loose_rvalid_o),
    .obi_rdata_o  (loose_rdata_o),
    .intr_o       (loose_intr_o)
  );

  kronos_tight u_tight (
    .clk_i, .rst_ni,
    .issue_valid_i  (tight_issue_valid_i),
    .issue_ready_o  (tight_issue_ready_o),
    .issue_req_i    (tight_issue_req_i),
    .issue_resp_o   (tight_issue_resp_o),
    .commit_valid_i (tight_commit_valid_i),
    .commit_i       (tight_commit_i),
    .result_valid_o (tight_result_valid_o),
    .result_ready_i (tight_result_ready_i),
    .result_o       (tight_result_o)
  );

  kronos_cop u_cop (
    .clk_i, .rst_ni,
    .issue_valid_i  (cop_issue_valid_i),
    .issue_ready_o  (cop_issue_ready_o),
    .issue_req_i    (cop_issue_req_i),
    .issue_resp_o   (cop_issue_resp_o),
    .commit_valid_i (cop_commit_valid_i),
    .commit_i       (cop_commit_i),
    .result_valid_o (cop_result_valid_o),
    .result_ready_i (cop_result_ready_i),
    .result_o       (cop_result_o)
  );

endmodule
