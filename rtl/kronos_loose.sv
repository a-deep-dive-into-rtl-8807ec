// kronos_loose: the loosely coupled, memory-mapped KRONOS accelerator.
//
// The accelerator computes the complete Keccak-f[1600] permutation on a
// state held in fifty 32-bit registers of its own, so the processor does not
// have to move the state through memory between permutations: it writes (or
// XORs in) message words with ordinary stores, starts the permutation by a
// write to CTRL, waits for the interrupt and reads the result words back.
//
// Inside, kronos_loose_ctrl decodes the OBI slave port, keccak_state_reg
// (32-bit words) holds the state, and keccak_f permutes a copy of it in 25
// cycles and hands the result back to the state register. See
// kronos_loose_ctrl for the register map and the bus timing.
//
// The fifty 32-bit state registers, the OBI slave port and the interrupt
// follow the KRONOS memory-mapped variant; the register map and the timing
// are this design's.
module kronos_loose
  import kronos_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        obi_req_i,
  output logic        obi_gnt_o,
  input  logic [31:0] obi_addr_i,
  input  logic        obi_we_i,
  input  logic [3:0]  obi_be_i,
  input  logic [31:0] obi_wdata_i,
  output logic        obi_rvalid_o,
  output logic [31:0] obi_rdata_o,
  output logic        intr_o
);

  logic        reg_wr, reg_ld;
  logic [5:0]  reg_wr_idx, reg_rd_idx;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic [3:0]  reg_wr_be;
  logic        kf_start, kf_busy, kf_done;
  state_t      reg_state, kf_state;

  kronos_loose_ctrl u_ctrl (
    .clk_i, .rst_ni,
    .obi_req_i, .obi_gnt_o, .obi_addr_i, .obi_we_i, .obi_be_i, .obi_wdata_i,
    .obi_rvalid_o, .obi_rdata_o, .intr_o,
    .reg_wr_o      (reg_wr),
    .reg_wr_idx_o  (reg_wr_idx),
    .reg_wr_data_o (reg_wr_data),
    .reg_wr_be_o   (reg_wr_be),
    .reg_ld_o      (reg_ld),
    .reg_rd_idx_o  (reg_rd_idx),
    .reg_rd_data_i (reg_rd_data),
    .kf_start_o    (kf_start),
    .kf_busy_i     (kf_busy),
    .kf_done_i     (kf_done)
  );

  keccak_state_reg #(.WR_W(32)) u_keccak_reg (
    .clk_i, .rst_ni,
    .wr_en_i    (reg_wr),
    .wr_idx_i   (reg_wr_idx),
    .wr_data_i  (reg_wr_data),
    .wr_be_i    (reg_wr_be),
    .ld_en_i    (reg_ld),
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

endmodule
