// cvxif_pkg: the CV-X-IF (Core-V eXtension InterFace) bundles used between a
// RISC-V core and the KRONOS accelerators that sit on it.
//
// Only the parts the accelerators use are modelled: the issue interface (the
// core offers an instruction with its id and both source register values, the
// accelerator answers accept / writeback in the same handshake), the commit
// interface (the core says whether an accepted instruction is kept or killed)
// and the result interface (the accelerator returns the id, the data and the
// destination register). Memory, compressed-instruction and floating-point
// channels are not modelled. All handshakes are valid/ready: a transfer
// happens in a cycle where both are high, and a valid, once raised, holds its
// payload until it is taken.
package cvxif_pkg;

  localparam int unsigned X_NUM_RS   = 2;
  localparam int unsigned X_ID_WIDTH = 4;
  localparam int unsigned X_RFR_W    = 32;

  typedef struct packed {
    logic [31:0]                       instr;
    logic [1:0]                        mode;
    logic [X_ID_WIDTH-1:0]             id;
    logic [X_NUM_RS-1:0][X_RFR_W-1:0]  rs;
    logic [X_NUM_RS-1:0]               rs_valid;
  } x_issue_req_t;

  typedef struct packed {
    logic accept;
    logic writeback;
    logic dualwrite;
    logic dualread;
    logic loadstore;
    logic exc;
  } x_issue_resp_t;

  typedef struct packed {
    logic [X_ID_WIDTH-1:0] id;
    logic                  commit_kill;
  } x_commit_t;

  typedef struct packed {
    logic [X_ID_WIDTH-1:0] id;
    logic [X_RFR_W-1:0]    data;
    logic [4:0]            rd;
    logic                  we;
    logic                  exc;
    logic [5:0]            exccode;
  } x_result_t;

  // R-type fields of a 32-bit instruction
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;  // rol_32 (tightly coupled)
  localparam logic [6:0] OPC_CUSTOM1 = 7'b0101011;  // load/start/store (coprocessor)

  function automatic logic [6:0] instr_opcode(input logic [31:0] i); return i[6:0];   endfunction
  function automatic logic [4:0] instr_rd    (input logic [31:0] i); return i[11:7];  endfunction
  function automatic logic [2:0] instr_funct3(input logic [31:0] i); return i[14:12]; endfunction
  function automatic logic [6:0] instr_funct7(input logic [31:0] i); return i[31:25]; endfunction

endpackage
