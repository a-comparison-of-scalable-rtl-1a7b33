// us_pkg: types and constants shared by the Ultrascalar I, Ultrascalar II and
// Hybrid Ultrascalar register datapaths.
//
// All three processors execute the same small integer RISC instruction set:
// 32-bit registers, no floating point, each instruction reads at most two
// registers and writes at most one. The register width (32) and the
// operation latencies (add 1, multiply 3, divide 10 cycles) follow the
// design description; the opcode set, encoding and the instruction record
// below are this implementation's own choice.
package us_pkg;

  localparam int unsigned XLEN   = 32;  // register width
  localparam int unsigned RIDX_W = 6;   // register-number field, up to 64 registers

  localparam int unsigned LAT_ADD = 1;
  localparam int unsigned LAT_MUL = 3;
  localparam int unsigned LAT_DIV = 10;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_ADD   = 4'd1,   // rd = rs1 + rs2
    OP_SUB   = 4'd2,   // rd = rs1 - rs2
    OP_MUL   = 4'd3,   // rd = rs1 * rs2 (low 32 bits)
    OP_DIV   = 4'd4,   // rd = rs1 / rs2 (unsigned, x/0 = all ones)
    OP_AND   = 4'd5,
    OP_OR    = 4'd6,
    OP_XOR   = 4'd7,
    OP_ADDI  = 4'd8,   // rd = rs1 + imm
    OP_LOAD  = 4'd9,   // rd = mem[rs1 + imm]
    OP_STORE = 4'd10,  // mem[rs1 + imm] = rs2
    OP_BR    = 4'd11   // branch taken iff rs1 != 0; checked against pred_taken
  } op_e;

  // One register value travelling through a datapath, with its ready bit
  // (33 bits in all).
  typedef struct packed {
    logic            ready;
    logic [XLEN-1:0] value;
  } rv_t;

  // Instruction as delivered to an execution station by the fetch unit.
  typedef struct packed {
    logic              valid;       // slot holds an instruction
    op_e               op;
    logic [RIDX_W-1:0] rd;
    logic [RIDX_W-1:0] rs1;
    logic [RIDX_W-1:0] rs2;
    logic [XLEN-1:0]   imm;
    logic              pred_taken;  // branch prediction made by the fetch unit
  } instr_t;

  function automatic logic op_writes(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_XOR,
                      OP_ADDI, OP_LOAD};
  endfunction

  function automatic logic op_reads_a(op_e op);
    return op != OP_NOP;
  endfunction

  function automatic logic op_reads_b(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_XOR,
                      OP_STORE};
  endfunction

endpackage
