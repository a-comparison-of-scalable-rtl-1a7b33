// us_alu: the simple integer ALU of an execution station.
//
// Purely combinational. It computes the result of one operation from the two
// argument values and the immediate, and reports how many clock cycles the
// operation takes. The latencies (add 1, multiply 3, divide 10) are the ones
// the design description uses in its timing example; the execution core
// counts them. Load and store use the adder for the address (rs1 + imm);
// a branch reports its condition (rs1 != 0) in `taken`. Unsigned division
// with x/0 = all ones is this implementation's choice.
module us_alu
  import us_pkg::*;
(
  input  op_e             op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] imm,
  output logic [XLEN-1:0] y,        // result, or memory address for LOAD/STORE
  output logic            taken,    // branch condition
  output logic [3:0]      latency   // cycles this operation takes
);
  always_comb begin
    y       = '0;
    latency = 4'(LAT_ADD);
    unique case (op)
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_MUL: begin y = a * b; latency = 4'(LAT_MUL); end
      OP_DIV: begin y = (b == '0) ? '1 : a / b; latency = 4'(LAT_DIV); end
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_ADDI, OP_LOAD, OP_STORE: y = a + imm;
      default:  y = '0;
    endcase
    taken = (a != '0);
  end
endmodule
