// tb_us2_core: self-checking test of the stand-alone Ultrascalar II
// (4 stations, 4 registers, the size of the worked example).
//
// Part 1 loads the committed registers R0=4, R1=13, R2=-7, R3=5 and runs the
// four-instruction example (R2=R1/R0, R1=R0-R3, R2=R3+R0, R3=R2*R1). It
// checks when each station finishes (subtract and add after one cycle, the
// multiply three cycles after its arguments, the divide after ten), that the
// batch retires only when all four have finished, and the final registers
// R0=4, R1=-1, R2=9, R3=-9. Part 2 runs a random program with loads, stores
// and mispredicted branches in batches and compares registers and memory
// with the in-order reference.
module tb_us2_core;
  import us_pkg::*;
  import tb_us_pkg::*;

  localparam int unsigned C = 4;
  localparam int unsigned L = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  fill, busy, retire, finished, use_drv = 0, start = 0, m_fill = 0;
  instr_t [C-1:0]        fill_instr, m_instr = '0;
  logic [C-1:0]          squash, st_valid, st_done, mispredict;
  rv_t  [L-1:0]          commit_regs;
  logic [C-1:0]          mem_req, mem_we, mem_ack;
  logic [C-1:0][XLEN-1:0] mem_addr, mem_wdata, mem_rdata;
  logic [0:0]            d_fill;
  instr_t [0:0][C-1:0]   d_instr;
  logic [0:0][C-1:0]     d_squash;
  int d_checks, d_failures, n_squash, n_wrap, n_ooo, n_lw, n_sw, n_cross, n_ret;

  assign fill       = use_drv ? d_fill[0]   : m_fill;
  assign fill_instr = use_drv ? d_instr[0]  : m_instr;
  assign squash     = use_drv ? d_squash[0] : '0;

  us2_core #(.C(C), .L(L)) dut (
    .clk, .rst_n, .fill, .fill_instr, .squash, .busy, .retire, .st_valid,
    .st_done, .mispredict, .commit_regs,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  tb_cl_driver #(.K(1), .C(C), .L(L)) drv (
    .clk, .start, .fill(d_fill), .fill_instr(d_instr), .squash(d_squash),
    .busy(busy), .oldest(1'b1), .retire(retire), .st_valid(st_valid),
    .st_done(st_done), .mispredict(mispredict), .commit_regs,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .finished, .checks(d_checks), .failures(d_failures), .n_squash, .n_wrap,
    .n_ooo, .n_load_wait(n_lw), .n_store_wait(n_sw), .n_cross, .n_retired(n_ret));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [C];
  int exp_done [C] = '{10, 1, 1, 4};
  int t0, t_ret;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    m_fill = 1;
    m_instr[0] = mk(OP_ADDI, 0, 0, 0, 4);
    m_instr[1] = mk(OP_ADDI, 1, 1, 0, 13);
    m_instr[2] = mk(OP_ADDI, 2, 2, 0, -7);
    m_instr[3] = mk(OP_ADDI, 3, 3, 0, 5);
    @(negedge clk); m_fill = 0;
    while (busy) @(negedge clk);
    check(commit_regs[2].value == XLEN'(-7), "R2 = -7 committed");
    m_fill = 1;
    m_instr[0] = mk(OP_DIV, 2, 1, 0);
    m_instr[1] = mk(OP_SUB, 1, 0, 3);
    m_instr[2] = mk(OP_ADD, 2, 3, 0);
    m_instr[3] = mk(OP_MUL, 3, 2, 1);
    @(negedge clk); m_fill = 0;
    t0 = cyc; t_ret = -1;
    for (int s = 0; s < int'(C); s++) seen[s] = -1;
    while (busy) begin
      for (int s = 0; s < int'(C); s++) if (st_done[s] && seen[s] < 0) seen[s] = cyc - t0;
      if (retire) t_ret = cyc - t0;
      @(negedge clk);
    end
    for (int s = 0; s < int'(C); s++)
      check(seen[s] == exp_done[s], $sformatf("station %0d finished at %0d, expected %0d",
                                              s, seen[s], exp_done[s]));
    check(t_ret == 10, $sformatf("batch retired at %0d, expected 10", t_ret));
    check(commit_regs[0].value == 4,           "R0 = 4");
    check(commit_regs[1].value == XLEN'(-1),   "R1 = -1");
    check(commit_regs[2].value == 9,           "R2 = 9");
    check(commit_regs[3].value == XLEN'(-9),   "R3 = -9");

    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    init_memory();
    make_program(L, 250, 1'b1, 1'b1);
    run_reference();
    use_drv = 1; start = 1;
    wait (finished);
    @(negedge clk);
    checks += d_checks; failures += d_failures;
    check(n_squash > 0, "a misprediction was recovered");
    check(n_ooo > 0, "instructions finished out of order");
    check(n_lw > 0, "a load waited");
    check(n_sw > 0, "a store waited");
    $display("us2: batches=%0d squash=%0d ooo=%0d loadwait=%0d storewait=%0d",
             n_ret, n_squash, n_ooo, n_lw, n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
