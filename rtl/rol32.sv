// rol32: execution unit of the rol_32 instruction.
//
// A 64-bit Keccak lane lives in two 32-bit registers, lo_i (bits 31:0) and
// hi_i (bits 63:32). The unit rotates the lane left by amt_i (0..63) and
// returns one 32-bit half of the result, the high half if sel_hi_i is set,
// so one instruction keeps the two-source, one-destination register format
// and a full 64-bit rotation takes two instructions. The result is
// registered: res_o holds the half selected in the cycle en_i was high, from
// the next cycle on, until the next en_i.
//
// The rotation on two 32-bit registers and the 32-bit result register follow
// the design; splitting a rotation into two half-results is this design's
// reading of the two-source, one-destination format.
module rol32 (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,
  input  logic [31:0] lo_i,
  input  logic [31:0] hi_i,
  input  logic [5:0]  amt_i,
  input  logic        sel_hi_i,
  output logic [31:0] res_o
);

  logic [63:0] lane, rot;
  logic [31:0] res_q;

  assign lane = {hi_i, lo_i};
  // a double-width shift makes the rotation without a special case for 0
  logic [127:0] dbl;
  assign dbl = {lane, lane} << amt_i;
  assign rot = dbl[127:64];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   res_q <= '0;
    else if (en_i) res_q <= sel_hi_i ? rot[63:32] : rot[31:0];
  end

  assign res_o = res_q;

endmodule
