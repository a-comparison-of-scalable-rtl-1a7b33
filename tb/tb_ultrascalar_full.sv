// tb_ultrascalar_full: end-to-end test of ultrascalar_top at the default sizes (32 registers, a 64-station Ultrascalar I, a 128-station hybrid of 4 clusters of 32, a 32-station Ultrascalar II); the top's parameters are left at their defaults.
//
// The same random program (register initialisation, ALU operations with
// 1/3/10-cycle latencies, loads, stores and branches, some mispredicted) runs
// on the Ultrascalar I, the Hybrid Ultrascalar and the Ultrascalar II. Each
// has its own fetch unit and memory model (tb_us1_driver, tb_cl_driver); at
// the end each processor's committed registers and memory must equal the
// in-order reference. The test also requires that every mechanism of the
// design occurred at least once in each processor where it applies:
// misprediction recovery by squashing, wrap-around of the oldest station or
// cluster, out-of-order completion, loads held behind stores, stores held
// back, and several hybrid clusters in flight at once.
module tb_ultrascalar_full;
  import us_pkg::*;
  import tb_us_pkg::*;

  localparam int unsigned L  = 32;
  localparam int unsigned N  = 64;
  localparam int unsigned K  = 4;
  localparam int unsigned C  = 32;
  localparam int unsigned C2 = 32;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  // Ultrascalar I
  logic [N-1:0]           a_fill, a_squash, a_valid, a_oldest, a_done, a_retire, a_misp;
  instr_t [N-1:0]         a_instr;
  rv_t [L-1:0]            a_regs;
  logic [N-1:0]           a_req, a_we, a_ack;
  logic [N-1:0][XLEN-1:0] a_addr, a_wdata, a_rdata;
  // Hybrid
  logic [K-1:0]                  h_fill, h_busy, h_oldest, h_retire;
  instr_t [K-1:0][C-1:0]         h_instr;
  logic [K-1:0][C-1:0]           h_squash, h_valid, h_done, h_misp, h_req, h_we, h_ack;
  rv_t [L-1:0]                   h_regs;
  logic [K-1:0][C-1:0][XLEN-1:0] h_addr, h_wdata, h_rdata;
  // Ultrascalar II
  logic [0:0]                    b_fill;
  logic                          b_busy, b_retire;
  instr_t [0:0][C2-1:0]          b_instr;
  logic [0:0][C2-1:0]            b_squash, b_valid, b_done, b_misp, b_req, b_we, b_ack;
  rv_t [L-1:0]                   b_regs;
  logic [0:0][C2-1:0][XLEN-1:0]  b_addr, b_wdata, b_rdata;

  ultrascalar_top  dut (
    .clk, .rst_n,
    .us1_fill(a_fill), .us1_fill_instr(a_instr), .us1_squash(a_squash),
    .us1_valid(a_valid), .us1_oldest(a_oldest), .us1_done(a_done), .us1_retire(a_retire),
    .us1_mispredict(a_misp), .us1_commit_regs(a_regs),
    .us1_mem_req(a_req), .us1_mem_we(a_we), .us1_mem_addr(a_addr),
    .us1_mem_wdata(a_wdata), .us1_mem_ack(a_ack), .us1_mem_rdata(a_rdata),
    .hyb_fill(h_fill), .hyb_fill_instr(h_instr), .hyb_squash(h_squash),
    .hyb_busy(h_busy), .hyb_oldest(h_oldest), .hyb_retire(h_retire),
    .hyb_st_valid(h_valid), .hyb_st_done(h_done), .hyb_mispredict(h_misp),
    .hyb_commit_regs(h_regs),
    .hyb_mem_req(h_req), .hyb_mem_we(h_we), .hyb_mem_addr(h_addr),
    .hyb_mem_wdata(h_wdata), .hyb_mem_ack(h_ack), .hyb_mem_rdata(h_rdata),
    .us2_fill(b_fill[0]), .us2_fill_instr(b_instr[0]), .us2_squash(b_squash[0]),
    .us2_busy(b_busy), .us2_retire(b_retire), .us2_st_valid(b_valid[0]),
    .us2_st_done(b_done[0]), .us2_mispredict(b_misp[0]), .us2_commit_regs(b_regs),
    .us2_mem_req(b_req[0]), .us2_mem_we(b_we[0]), .us2_mem_addr(b_addr[0]),
    .us2_mem_wdata(b_wdata[0]), .us2_mem_ack(b_ack[0]), .us2_mem_rdata(b_rdata[0]));

  logic a_fin, h_fin, b_fin;
  int a_chk, a_fail, a_sq, a_wrap, a_ooo, a_lw, a_sw, a_all, a_ret;
  int h_chk, h_fail, h_sq, h_wrap, h_ooo, h_lw, h_sw, h_cross, h_ret;
  int b_chk, b_fail, b_sq, b_wrap, b_ooo, b_lw, b_sw, b_cross, b_ret;

  tb_us1_driver #(.N(N), .L(L), .FW(4)) drv_a (
    .clk, .start, .fill(a_fill), .fill_instr(a_instr), .squash(a_squash),
    .valid(a_valid), .oldest(a_oldest), .done(a_done), .retire(a_retire),
    .mispredict(a_misp), .commit_regs(a_regs),
    .mem_req(a_req), .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata),
    .mem_ack(a_ack), .mem_rdata(a_rdata),
    .finished(a_fin), .checks(a_chk), .failures(a_fail), .n_squash(a_sq),
    .n_wrap(a_wrap), .n_ooo(a_ooo), .n_load_wait(a_lw), .n_store_wait(a_sw),
    .n_retire_all(a_all), .n_retired(a_ret));

  tb_cl_driver #(.K(K), .C(C), .L(L)) drv_h (
    .clk, .start, .fill(h_fill), .fill_instr(h_instr), .squash(h_squash),
    .busy(h_busy), .oldest(h_oldest), .retire(h_retire), .st_valid(h_valid),
    .st_done(h_done), .mispredict(h_misp), .commit_regs(h_regs),
    .mem_req(h_req), .mem_we(h_we), .mem_addr(h_addr), .mem_wdata(h_wdata),
    .mem_ack(h_ack), .mem_rdata(h_rdata),
    .finished(h_fin), .checks(h_chk), .failures(h_fail), .n_squash(h_sq),
    .n_wrap(h_wrap), .n_ooo(h_ooo), .n_load_wait(h_lw), .n_store_wait(h_sw),
    .n_cross(h_cross), .n_retired(h_ret));

  tb_cl_driver #(.K(1), .C(C2), .L(L)) drv_b (
    .clk, .start, .fill(b_fill), .fill_instr(b_instr), .squash(b_squash),
    .busy(b_busy), .oldest(1'b1), .retire(b_retire), .st_valid(b_valid),
    .st_done(b_done), .mispredict(b_misp), .commit_regs(b_regs),
    .mem_req(b_req), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata),
    .mem_ack(b_ack), .mem_rdata(b_rdata),
    .finished(b_fin), .checks(b_chk), .failures(b_fail), .n_squash(b_sq),
    .n_wrap(b_wrap), .n_ooo(b_ooo), .n_load_wait(b_lw), .n_store_wait(b_sw),
    .n_cross(b_cross), .n_retired(b_ret));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_memory();
    make_program(L, 700, 1'b1, 1'b1);
    run_reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    wait (a_fin && h_fin && b_fin);
    @(negedge clk);
    checks += a_chk + h_chk + b_chk;
    failures += a_fail + h_fail + b_fail;
    check(a_sq > 0 && h_sq > 0 && b_sq > 0, "misprediction recovery in all three");
    check(a_wrap > 0, "Ultrascalar I: oldest station wrapped around");
    check(h_wrap > 0, "hybrid: oldest cluster wrapped around");
    check(a_ooo > 0 && h_ooo > 0 && b_ooo > 0, "out-of-order completion in all three");
    check(a_lw > 0 && h_lw > 0 && b_lw > 0, "loads held behind stores in all three");
    check(a_sw > 0 && h_sw > 0 && b_sw > 0, "stores held back in all three");
    check(h_cross > 0, "hybrid: several clusters in flight");
    $display("US-I  : retired=%0d squash=%0d wrap=%0d ooo=%0d loadwait=%0d storewait=%0d",
             a_ret, a_sq, a_wrap, a_ooo, a_lw, a_sw);
    $display("hybrid: clusters=%0d squash=%0d wrap=%0d ooo=%0d loadwait=%0d storewait=%0d cross=%0d",
             h_ret, h_sq, h_wrap, h_ooo, h_lw, h_sw, h_cross);
    $display("US-II : batches=%0d squash=%0d ooo=%0d loadwait=%0d storewait=%0d",
             b_ret, b_sq, b_ooo, b_lw, b_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
