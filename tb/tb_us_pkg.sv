// tb_us_pkg: reference instruction-set model and random program generator
// shared by the processor testbenches.
//
// The reference executes the program strictly in order on 64 registers and a
// 256-word memory (a word is selected by address bits 7:0, the same rule the
// testbench memory models use). It also records, for every branch, whether
// the prediction carried by the instruction was wrong, so that a testbench
// fetch unit can follow a wrong path of filler instructions after it until
// the processor reports the misprediction.
package tb_us_pkg;
  import us_pkg::*;

  localparam int unsigned PMAX = 1024;

  logic [XLEN-1:0] ref_regs [64];
  logic [XLEN-1:0] ref_mem  [256];
  logic [XLEN-1:0] init_mem [256];
  instr_t          prog     [PMAX];
  bit              prog_misp[PMAX];
  int unsigned     prog_len;

  function automatic logic [XLEN-1:0] alu_ref(op_e op, logic [XLEN-1:0] a,
                                              logic [XLEN-1:0] b, logic [XLEN-1:0] imm);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_MUL:  return a * b;
      OP_DIV:  return (b == 0) ? '1 : a / b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_ADDI: return a + imm;
      default: return '0;
    endcase
  endfunction

  function automatic instr_t mk(op_e op, int rd, int rs1, int rs2, int imm = 0,
                                bit pred = 1'b0);
    instr_t i;
    i.valid = 1'b1; i.op = op;
    i.rd = RIDX_W'(rd); i.rs1 = RIDX_W'(rs1); i.rs2 = RIDX_W'(rs2);
    i.imm = XLEN'(imm); i.pred_taken = pred;
    return i;
  endfunction

  // Random instruction over L registers. Memory ops and branches on request.
  function automatic instr_t rand_instr(int unsigned L, bit mem_ops, bit branches);
    int unsigned k;
    op_e ops [8] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_XOR, OP_ADDI};
    k = $urandom_range(0, 15);
    if (mem_ops && k >= 11 && k <= 12)
      return mk(OP_LOAD, $urandom_range(0, L-1), $urandom_range(0, L-1), 0, $urandom_range(0, 255));
    if (mem_ops && k >= 13 && k <= 14)
      return mk(OP_STORE, 0, $urandom_range(0, L-1), $urandom_range(0, L-1), $urandom_range(0, 255));
    if (branches && k == 15)
      return mk(OP_BR, 0, $urandom_range(0, L-1), 0, 0, 1'($urandom_range(0, 1)));
    if ($urandom_range(0, 5) == 0)
      return mk(OP_DIV, $urandom_range(0, L-1), $urandom_range(0, L-1), $urandom_range(0, L-1));
    return mk(ops[$urandom_range(0, 7) == 3 ? 0 : $urandom_range(0, 7)],
              $urandom_range(0, L-1), $urandom_range(0, L-1), $urandom_range(0, L-1),
              $urandom_range(0, 1000));
  endfunction

  // Filler for a wrong path: no branches, loads and stores allowed.
  function automatic instr_t junk_instr(int unsigned L);
    return rand_instr(L, 1'b1, 1'b0);
  endfunction

  // Program: ADDI of a distinct value into every register, then n random
  // instructions.
  function automatic void make_program(int unsigned L, int unsigned n,
                                       bit mem_ops, bit branches);
    prog_len = 0;
    for (int r = 0; r < int'(L); r++) begin
      prog[prog_len] = mk(OP_ADDI, r, r, 0, 100 + 7 * r);
      prog_len++;
    end
    for (int unsigned i = 0; i < n && prog_len < PMAX; i++) begin
      prog[prog_len] = rand_instr(L, mem_ops, branches);
      prog_len++;
    end
  endfunction

  // Run the program in order; fills ref_regs/ref_mem and prog_misp.
  function automatic void run_reference();
    for (int r = 0; r < 64; r++) ref_regs[r] = '0;
    for (int a = 0; a < 256; a++) ref_mem[a] = init_mem[a];
    for (int unsigned p = 0; p < prog_len; p++) begin
      instr_t i = prog[p];
      logic [XLEN-1:0] a, b;
      a = ref_regs[i.rs1]; b = ref_regs[i.rs2];
      prog_misp[p] = 1'b0;
      case (i.op)
        OP_NOP: ;
        OP_LOAD:  ref_regs[i.rd] = ref_mem[8'(a + i.imm)];
        OP_STORE: ref_mem[8'(a + i.imm)] = b;
        OP_BR:    prog_misp[p] = ((a != 0) != i.pred_taken);
        default:  ref_regs[i.rd] = alu_ref(i.op, a, b, i.imm);
      endcase
    end
  endfunction

  function automatic void init_memory();
    for (int a = 0; a < 256; a++) init_mem[a] = XLEN'(32'h1000 + a * 3);
  endfunction
endpackage
