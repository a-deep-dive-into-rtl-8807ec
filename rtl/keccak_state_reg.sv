// keccak_state_reg: the 1600-bit Keccak state register (KECCAK REG).
//
// The state is kept as 1600 flip-flops and can be changed two ways:
//   - a word write: wr_data_i (WR_W bits, 32 or 64) replaces word wr_idx_i of
//     the state, byte by byte as wr_be_i enables;
//   - a full load: ld_state_i replaces the whole state (the permutation
//     result). A full load wins over a word write in the same cycle.
// Reads are 32-bit words, combinational: rd_data_o is word rd_idx_i. Word i
// of width W covers state bits [W*i +: W], so 32-bit word 2k is the low half
// of lane k. state_o is the whole register, for the permutation engine.
//
// WR_W = 32 gives the fifty 32-bit registers of the memory-mapped variant,
// WR_W = 64 the 64-bit lane writes of the coprocessor. Reset clears the
// state to zero (the sponge's initial state); the word order, byte enables
// and reset value are this design's choices.
module keccak_state_reg
  import kronos_pkg::*;
#(
  parameter int unsigned WR_W  = 32,
  localparam int unsigned NW   = STATE_W / WR_W,
  localparam int unsigned WI_W = $clog2(NW)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              wr_en_i,
  input  logic [WI_W-1:0]   wr_idx_i,
  input  logic [WR_W-1:0]   wr_data_i,
  input  logic [WR_W/8-1:0] wr_be_i,
  input  logic              ld_en_i,
  input  state_t            ld_state_i,
  input  logic [5:0]        rd_idx_i,
  output logic [31:0]       rd_data_o,
  output state_t            state_o
);

  logic [NW-1:0][WR_W-1:0] words_q;
  logic [NUM_WORDS-1:0][31:0] rd_words;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      words_q <= '0;
    end else if (ld_en_i) begin
      words_q <= ld_state_i;
    end else if (wr_en_i && (int'(wr_idx_i) < NW)) begin
      for (int b = 0; b < WR_W / 8; b++)
        if (wr_be_i[b]) words_q[wr_idx_i][8*b +: 8] <= wr_data_i[8*b +: 8];
    end
  end

  assign state_o   = words_q;
  assign rd_words  = words_q;
  assign rd_data_o = (int'(rd_idx_i) < NUM_WORDS) ? rd_words[rd_idx_i] : 32'h0;

endmodule
