// tb_us1_core: self-checking test of the Ultrascalar I core (8 stations,
// 8 registers).
//
// Part 1 replays the eight-instruction example of the design description
// with the oldest station at position 6 (R3=R1/R2 in station 6, R0=R0+R3 in
// 7, then stations 0..5) and checks the cycle at which each instruction
// finishes against the example's timing (divide 10, multiply 3, add 1 cycle;
// independent instructions run out of order), and the final registers.
// Part 2 runs a random program with loads, stores and mispredicted branches
// through the fetch/memory driver and compares the committed registers and
// memory with an in-order reference.
module tb_us1_core;
  import us_pkg::*;
  import tb_us_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned L = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]           fill, squash, valid, oldest, done, retire, mispredict;
  instr_t [N-1:0]         fill_instr;
  rv_t [L-1:0]            commit_regs;
  logic [N-1:0]           mem_req, mem_we, mem_ack;
  logic [N-1:0][XLEN-1:0] mem_addr, mem_wdata, mem_rdata;

  // manual stimulus for part 1, driver for part 2
  logic [N-1:0]   m_fill;
  instr_t [N-1:0] m_instr;
  logic           use_drv, start;
  logic [N-1:0]   d_fill, d_squash;
  instr_t [N-1:0] d_instr;
  logic           finished;
  int             d_checks, d_failures, n_squash, n_wrap, n_ooo, n_lw, n_sw, n_all, n_ret;

  assign fill       = use_drv ? d_fill   : m_fill;
  assign fill_instr = use_drv ? d_instr  : m_instr;
  assign squash     = use_drv ? d_squash : '0;

  us1_core #(.N(N), .L(L)) dut (
    .clk, .rst_n, .fill, .fill_instr, .squash, .valid, .oldest, .done, .retire,
    .mispredict, .commit_regs, .mem_req, .mem_we, .mem_addr, .mem_wdata,
    .mem_ack, .mem_rdata);

  tb_us1_driver #(.N(N), .L(L), .FW(3)) drv (
    .clk, .start, .fill(d_fill), .fill_instr(d_instr), .squash(d_squash),
    .valid, .oldest, .done, .retire, .mispredict, .commit_regs,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .finished, .checks(d_checks), .failures(d_failures), .n_squash, .n_wrap,
    .n_ooo, .n_load_wait(n_lw), .n_store_wait(n_sw), .n_retire_all(n_all),
    .n_retired(n_ret));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_empty();
    do @(negedge clk); while (valid != '0);
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_end [N] = '{2, 12, 4, 5, 2, 3, 10, 11};
  int seen    [N];
  int t0;

  initial begin
    use_drv = 0; start = 0; m_fill = '0; m_instr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initial values: R0=10 R1=100 R2=7 R4=3 R5=50 R6=8 R7=2
    @(negedge clk);
    m_fill = '1;
    m_instr[0] = mk(OP_ADDI, 0, 0, 0, 10);
    m_instr[1] = mk(OP_ADDI, 1, 1, 0, 100);
    m_instr[2] = mk(OP_ADDI, 2, 2, 0, 7);
    m_instr[3] = mk(OP_ADDI, 4, 4, 0, 3);
    m_instr[4] = mk(OP_ADDI, 5, 5, 0, 50);
    m_instr[5] = mk(OP_ADDI, 6, 6, 0, 8);
    m_instr[6] = mk(OP_ADDI, 7, 7, 0, 2);
    m_instr[7] = mk(OP_NOP, 0, 0, 0, 0);
    @(negedge clk); m_fill = '0;
    wait_empty();
    // six NOPs move the oldest station to 6
    m_fill = 8'h3F;
    for (int i = 0; i < 6; i++) m_instr[i] = mk(OP_NOP, 0, 0, 0);
    @(negedge clk); m_fill = '0;
    wait_empty();
    check(oldest == 8'h40, "station 6 is oldest before the example");
    m_fill = '1;
    m_instr[6] = mk(OP_DIV, 3, 1, 2);
    m_instr[7] = mk(OP_ADD, 0, 0, 3);
    m_instr[0] = mk(OP_ADD, 1, 5, 6);
    m_instr[1] = mk(OP_ADD, 1, 0, 1);
    m_instr[2] = mk(OP_MUL, 2, 5, 6);
    m_instr[3] = mk(OP_ADD, 2, 2, 4);
    m_instr[4] = mk(OP_SUB, 0, 5, 6);
    m_instr[5] = mk(OP_ADD, 4, 0, 7);
    @(negedge clk); m_fill = '0;
    t0 = cyc;
    for (int i = 0; i < N; i++) seen[i] = -1;
    while (valid != '0) begin
      for (int i = 0; i < N; i++) if (done[i] && seen[i] < 0) seen[i] = cyc - t0;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++)
      check(seen[i] == exp_end[i],
            $sformatf("station %0d finished at cycle %0d, expected %0d", i, seen[i], exp_end[i]));
    @(negedge clk);
    check(commit_regs[0].value == 42,  "R0 = 42");
    check(commit_regs[1].value == 82,  "R1 = 82");
    check(commit_regs[2].value == 403, "R2 = 403");
    check(commit_regs[3].value == 14,  "R3 = 14");
    check(commit_regs[4].value == 44,  "R4 = 44");
    check(commit_regs[7].value == 2,   "R7 = 2");

    // part 2: random program
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    init_memory();
    make_program(L, 300, 1'b1, 1'b1);
    run_reference();
    use_drv = 1; start = 1;
    wait (finished);
    @(negedge clk);
    checks += d_checks; failures += d_failures;
    check(n_squash > 0, "a misprediction was recovered");
    check(n_wrap > 0, "the oldest station wrapped around");
    check(n_ooo > 0, "instructions finished out of order");
    check(n_lw > 0, "a load waited for an earlier store");
    check(n_sw > 0, "a store waited");
    $display("us1: retired=%0d squash=%0d wrap=%0d ooo=%0d loadwait=%0d storewait=%0d",
             n_ret, n_squash, n_wrap, n_ooo, n_lw, n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
