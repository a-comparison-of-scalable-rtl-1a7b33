// tb_us2_cluster: self-checking test of one Ultrascalar II cluster (4
// stations, 4 registers) driven directly.
//
// Part 1 loads R0=4, R1=13, R2=-7, R3=5 through rf_we, fills the Fig 7 batch
// as the oldest cluster and checks the modified bits (one per register
// written by the batch, Fig 9), that stations finish out of order, that
// all_done rises only when all four have finished, the outgoing values
// R1=-1, R2=9, R3=-9 and that dealloc empties the cluster.
// Part 2 checks that a load waits for prev_stores_done, that it completes
// on the memory acknowledge, that a store waits for prev_loads_done and
// prev_stores_done, and that committed follows prev_committed.
// Part 3 squashes every slot of a filled cluster and checks it becomes empty.
module tb_us2_cluster;
  import us_pkg::*;
  import tb_us_pkg::*;

  localparam int unsigned C = 4, L = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               oldest = 1, rf_we = 0, fill = 0, dealloc = 0;
  rv_t  [L-1:0]       rf_d = '0, rf, reg_out;
  logic [L-1:0]       written;
  instr_t [C-1:0]     fill_instr = '0;
  logic [C-1:0]       squash = '0, st_valid, st_done, mispredict;
  logic               busy, all_done, stores_done, loads_done, committed;
  logic               prev_stores_done = 1, prev_loads_done = 1, prev_committed = 1;
  logic [C-1:0]       mem_req, mem_we, mem_ack = '0;
  logic [C-1:0][31:0] mem_addr, mem_wdata, mem_rdata = '0;

  us2_cluster #(.C(C), .L(L)) dut (
    .clk, .rst_n, .oldest, .rf_we, .rf_d, .rf, .reg_out, .written,
    .fill, .fill_instr, .dealloc, .squash, .busy, .all_done, .st_valid,
    .st_done, .mispredict, .prev_stores_done, .prev_loads_done,
    .prev_committed, .stores_done, .loads_done, .committed,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, t_done[C];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && rf[1] == '{ready: 1, value: 0}, "reset: empty, registers 0");
    rf_d[0].ready = 1; rf_d[0].value = 4;
    rf_d[1].ready = 1; rf_d[1].value = 13;
    rf_d[2].ready = 1; rf_d[2].value = -7;
    rf_d[3].ready = 1; rf_d[3].value = 5;
    rf_we = 1;
    @(negedge clk); rf_we = 0;
    check(rf[2].value == -7, "register file load");
    // Part 1: Fig 7 batch
    fill_instr[0] = mk(OP_DIV, 2, 1, 0);
    fill_instr[1] = mk(OP_SUB, 1, 0, 3);
    fill_instr[2] = mk(OP_ADD, 2, 3, 0);
    fill_instr[3] = mk(OP_MUL, 3, 2, 1);
    fill = 1;
    @(negedge clk); fill = 0;
    check(busy && st_valid == 4'b1111, "filled");
    check(written == 4'b1110, "modified bits R1, R2, R3");
    for (int s = 0; s < int'(C); s++) t_done[s] = -1;
    for (cyc = 1; cyc < 30 && !all_done; cyc++) begin
      for (int s = 0; s < int'(C); s++)
        if (st_done[s] && t_done[s] < 0) t_done[s] = cyc;
      @(negedge clk);
    end
    for (int s = 0; s < int'(C); s++)
      if (st_done[s] && t_done[s] < 0) t_done[s] = cyc;
    check(all_done, "batch finished");
    check(t_done[1] < t_done[0] && t_done[2] < t_done[0], "subtract and add finish before divide");
    check(t_done[3] > t_done[1] && t_done[3] >= t_done[2] + 3, "multiply after its arguments");
    check(t_done[0] == cyc, "all_done with the last station");
    check(reg_out[0].value == 4 && reg_out[1].value == -1 &&
          reg_out[2].value == 9 && reg_out[3].value == -9, "outgoing values");
    check(committed && stores_done && loads_done, "aggregates");
    dealloc = 1;
    @(negedge clk); dealloc = 0;
    check(!busy && !all_done, "dealloc empties the cluster");
    // Part 2: memory ordering (addresses rs1 + imm)
    fill_instr = '0;
    fill_instr[0] = mk(OP_LOAD, 1, 0, 0, 8);
    fill_instr[1] = mk(OP_STORE, 0, 0, 3, 4);
    prev_stores_done = 0; prev_loads_done = 1;
    fill = 1;
    @(negedge clk); fill = 0;
    repeat (3) @(negedge clk);
    check(mem_req == '0, "load and store wait for earlier stores");
    prev_stores_done = 1;
    @(negedge clk);
    check(mem_req[0] && !mem_we[0] && mem_addr[0] == 12, "load issues to address 12");
    check(!mem_req[1], "store waits for the earlier load in the cluster");
    prev_loads_done = 0;
    mem_ack[0] = 1; mem_rdata[0] = 321;
    @(negedge clk); mem_ack[0] = 0;
    @(negedge clk);
    check(st_done[0] && reg_out[1].value == 321, "load result");
    check(!mem_req[1], "store waits for earlier loads outside the cluster");
    prev_loads_done = 1;
    @(negedge clk);
    check(mem_req[1] && mem_we[1] && mem_addr[1] == 8 && mem_wdata[1] == 5, "store issues");
    mem_ack[1] = 1;
    @(negedge clk); mem_ack[1] = 0;
    @(negedge clk);
    check(all_done && stores_done, "memory batch finished");
    prev_committed = 0;
    #1 check(committed && st_done == '0 && !all_done,
             "own commit aggregate kept; stations not done before earlier branches confirm");
    prev_committed = 1;
    dealloc = 1;
    @(negedge clk); dealloc = 0;
    // Part 3: squash
    fill_instr[0] = mk(OP_ADD, 1, 0, 0);
    fill = 1;
    @(negedge clk); fill = 0;
    check(busy, "filled again");
    squash = '1;
    @(negedge clk); squash = '0;
    check(!busy, "fully squashed cluster is empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
