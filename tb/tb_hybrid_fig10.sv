// tb_hybrid_fig10: the tb_hybrid_core test at the size of the 32-instruction
// hybrid floorplan: 4 clusters of 8 stations (C = L = 8), 8 registers.
// The checks are those of tb_hybrid_core, described below.
//
// tb_hybrid_core: self-checking test of the Hybrid Ultrascalar at reduced
// size (4 clusters of 4 stations, 8 registers).
//
// Part 1 checks the one-cycle forwarding between clusters: a chain of
// dependent adds spread over two clusters (the last station of cluster 0
// feeding the first station of cluster 1) must finish one instruction per
// cycle. Part 2 runs a random program with loads, stores and mispredicted
// branches through the fetch/memory driver and compares committed registers
// and memory with the in-order reference; it requires that misprediction
// recovery, wrap-around of the oldest cluster, out-of-order completion and
// load/store ordering all occurred.
module tb_hybrid_fig10;
  import us_pkg::*;
  import tb_us_pkg::*;

  localparam int unsigned K = 4;
  localparam int unsigned C = 8;
  localparam int unsigned L = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [K-1:0]                  fill, busy, oldest, retire;
  instr_t [K-1:0][C-1:0]         fill_instr;
  logic [K-1:0][C-1:0]           squash, st_valid, st_done, mispredict;
  rv_t  [L-1:0]                  commit_regs;
  logic [K-1:0][C-1:0]           mem_req, mem_we, mem_ack;
  logic [K-1:0][C-1:0][XLEN-1:0] mem_addr, mem_wdata, mem_rdata;

  logic                  use_drv = 0, start = 0, finished;
  logic [K-1:0]          m_fill = '0, d_fill;
  instr_t [K-1:0][C-1:0] m_instr = '0, d_instr;
  logic [K-1:0][C-1:0]   d_squash;
  int d_checks, d_failures, n_squash, n_wrap, n_ooo, n_lw, n_sw, n_cross, n_ret;

  assign fill       = use_drv ? d_fill   : m_fill;
  assign fill_instr = use_drv ? d_instr  : m_instr;
  assign squash     = use_drv ? d_squash : '0;

  hybrid_core #(.K(K), .C(C), .L(L)) dut (
    .clk, .rst_n, .fill, .fill_instr, .squash, .busy, .oldest, .retire,
    .st_valid, .st_done, .mispredict, .commit_regs,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  tb_cl_driver #(.K(K), .C(C), .L(L)) drv (
    .clk, .start, .fill(d_fill), .fill_instr(d_instr), .squash(d_squash),
    .busy, .oldest, .retire, .st_valid, .st_done, .mispredict, .commit_regs,
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired busy=%b oldest=%b valid=%h done=%h pc=%0d wp=%b tail=%0d req=%h", busy, oldest, st_valid, st_done, drv.pc, drv.wrong_path, drv.tail, mem_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [2][C];
  int t0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // clusters 0 and 1 in one cycle: R1 = R1 + 1 2C times in a chain
    m_fill = 4'b0011;
    for (int k = 0; k < 2; k++)
      for (int s = 0; s < int'(C); s++) m_instr[k][s] = mk(OP_ADDI, 1, 1, 0, 1);
    @(negedge clk); m_fill = '0;
    t0 = cyc;
    for (int k = 0; k < 2; k++) for (int s = 0; s < int'(C); s++) seen[k][s] = -1;
    while (busy != '0) begin
      for (int k = 0; k < 2; k++)
        for (int s = 0; s < int'(C); s++)
          if (st_done[k][s] && seen[k][s] < 0) seen[k][s] = cyc - t0;
      @(negedge clk);
    end
    // cluster 0 is oldest and starts at once; cluster 1 waits one cycle after
    // its fill for its register file, which the chain hides.
    for (int k = 0; k < 2; k++)
      for (int s = 0; s < int'(C); s++)
        check(seen[k][s] == k * int'(C) + s + 1,
              $sformatf("cluster %0d slot %0d finished at %0d, expected %0d", k, s,
                        seen[k][s], k * int'(C) + s + 1));
    @(negedge clk);
    check(commit_regs[1].value == 32'(2 * C), "R1 = 2C after the chain");
    check(oldest == 4'b0100, "cluster 2 is oldest after two clusters retired");

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
    check(n_wrap > 0, "the oldest cluster wrapped around");
    check(n_ooo > 0, "instructions finished out of order");
    check(n_lw > 0, "a load waited");
    check(n_sw > 0, "a store waited");
    check(n_cross > 0, "several clusters were busy at once");
    $display("hybrid: clusters retired=%0d squash=%0d wrap=%0d ooo=%0d loadwait=%0d storewait=%0d cross=%0d",
             n_ret, n_squash, n_wrap, n_ooo, n_lw, n_sw, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
