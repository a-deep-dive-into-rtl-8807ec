// kronos_loose_ctrl: bus-side controller of the memory-mapped KRONOS.
//
// It is an OBI slave. A request is granted in the cycle it is made
// (obi_gnt_o = obi_req_i) and answered in the next cycle with obi_rvalid_o
// and, for a read, obi_rdata_o. Register map, byte offsets from the base:
//   0x00 .. 0xC4  STATE[0..49]  the 50 32-bit words of the Keccak state
//   0xC8          CTRL    bit0 START (write 1: start a permutation, reads 0)
//                         bit1 IRQ_EN (interrupt enable)
//   0xCC          STATUS  bit0 BUSY, bit1 DONE (sticky; write 1 to clear)
// Other offsets read 0 and ignore writes. Only address bits 7:0 are decoded;
// the system bus selects the 256-byte window. Writes to STATE while BUSY are
// dropped, so software cannot corrupt a running permutation.
//
// START hands the state register to the permutation engine (kf_start_o) and
// clears DONE. When the engine reports done, the result is loaded back into
// the state register (reg_ld_o) and DONE is set; intr_o is DONE & IRQ_EN, a
// level the driver clears by writing STATUS.
//
// Timing: the interrupt rises 27 cycles after the clock edge that takes the
// START write: one cycle to register START, 25 in the engine (24 rounds and
// the start cycle) and one to register DONE.
//
// The host talks only to memory-mapped registers and learns of the end by an
// interrupt; the register map, the OBI timing and the interrupt clearing are
// this design's choices.
module kronos_loose_ctrl (
  input  logic        clk_i,
  input  logic        rst_ni,
  // OBI slave
  input  logic        obi_req_i,
  output logic        obi_gnt_o,
  input  logic [31:0] obi_addr_i,
  input  logic        obi_we_i,
  input  logic [3:0]  obi_be_i,
  input  logic [31:0] obi_wdata_i,
  output logic        obi_rvalid_o,
  output logic [31:0] obi_rdata_o,
  // interrupt
  output logic        intr_o,
  // state register
  output logic        reg_wr_o,
  output logic [5:0]  reg_wr_idx_o,
  output logic [31:0] reg_wr_data_o,
  output logic [3:0]  reg_wr_be_o,
  output logic        reg_ld_o,
  output logic [5:0]  reg_rd_idx_o,
  input  logic [31:0] reg_rd_data_i,
  // permutation engine
  output logic        kf_start_o,
  input  logic        kf_busy_i,
  input  logic        kf_done_i
);

  localparam logic [7:0] OFF_CTRL   = 8'hC8;
  localparam logic [7:0] OFF_STATUS = 8'hCC;

  logic       irq_en_q, done_q, start_q;
  logic       rvalid_q;
  logic [31:0] rdata_q;
  logic [7:0] off;
  logic       hs, is_state;
  logic       busy;

  assign off      = obi_addr_i[7:0];
  assign hs       = obi_req_i;                     // always granted
  assign is_state = (off[1:0] == 2'b00) && (off < OFF_CTRL);
  assign busy     = kf_busy_i | start_q;

  assign obi_gnt_o    = obi_req_i;
  assign reg_rd_idx_o = off[7:2];

  always_comb begin
    reg_wr_o      = hs && obi_we_i && is_state && !busy;
    reg_wr_idx_o  = off[7:2];
    reg_wr_data_o = obi_wdata_i;
    reg_wr_be_o   = obi_be_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      irq_en_q <= 1'b0;
      done_q   <= 1'b0;
      start_q  <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rvalid_q <= hs;
      start_q  <= 1'b0;
      if (hs && !obi_we_i) begin
        if (is_state)               rdata_q <= reg_rd_data_i;
        else if (off == OFF_CTRL)   rdata_q <= {30'b0, irq_en_q, 1'b0};
        else if (off == OFF_STATUS) rdata_q <= {30'b0, done_q, busy};
        else                        rdata_q <= '0;
      end
      if (hs && obi_we_i && off == OFF_CTRL) begin
        if (obi_be_i[0]) begin
          irq_en_q <= obi_wdata_i[1];
          if (obi_wdata_i[0] && !busy) begin
            start_q <= 1'b1;
            done_q  <= 1'b0;
          end
        end
      end
      if (hs && obi_we_i && off == OFF_STATUS && obi_be_i[0] && obi_wdata_i[1])
        done_q <= 1'b0;
      if (kf_done_i) done_q <= 1'b1;
    end
  end

  assign kf_start_o   = start_q;
  assign reg_ld_o     = kf_done_i;
  assign obi_rvalid_o = rvalid_q;
  assign obi_rdata_o  = rdata_q;
  assign intr_o       = done_q & irq_en_q;

  // OBI: a response follows every granted request, one cycle later
  a_rvalid_after_gnt: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (obi_req_i && obi_gnt_o) |=> obi_rvalid_o);

endmodule
