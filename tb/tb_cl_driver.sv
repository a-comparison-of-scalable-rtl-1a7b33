// tb_cl_driver: fetch unit and memory model for a ring of K clusters of C
// stations (hybrid_core, or us2_core with K = 1), for tests.
//
// On `start` it runs the program of tb_us_pkg: each empty cluster, taken in
// ring order, is loaded with the next C instructions (slots past the end of
// the program stay empty). After a branch whose prediction is wrong it loads
// filler instructions until that station raises `mispredict`, then squashes
// every later slot of that cluster and every later cluster, and resumes
// after the branch in the next cluster. Memory answers after a random delay.
// When the program has retired it compares the committed registers and the
// memory with the in-order reference. It counts the mechanisms it sees.
module tb_cl_driver
  import us_pkg::*;
  import tb_us_pkg::*;
#(
  parameter int unsigned K = 4,
  parameter int unsigned C = 4,
  parameter int unsigned L = 8
) (
  input  logic                          clk,
  input  logic                          start,
  output logic [K-1:0]                  fill,
  output instr_t [K-1:0][C-1:0]         fill_instr,
  output logic [K-1:0][C-1:0]           squash,
  input  logic [K-1:0]                  busy,
  input  logic [K-1:0]                  oldest,
  input  logic [K-1:0]                  retire,
  input  logic [K-1:0][C-1:0]           st_valid,
  input  logic [K-1:0][C-1:0]           st_done,
  input  logic [K-1:0][C-1:0]           mispredict,
  input  rv_t  [L-1:0]                  commit_regs,
  input  logic [K-1:0][C-1:0]           mem_req,
  input  logic [K-1:0][C-1:0]           mem_we,
  input  logic [K-1:0][C-1:0][XLEN-1:0] mem_addr,
  input  logic [K-1:0][C-1:0][XLEN-1:0] mem_wdata,
  output logic [K-1:0][C-1:0]           mem_ack,
  output logic [K-1:0][C-1:0][XLEN-1:0] mem_rdata,
  output logic                          finished,
  output int                            checks,
  output int                            failures,
  output int                            n_squash,     // misprediction recoveries
  output int                            n_wrap,       // oldest cluster wrapped K-1 -> 0
  output int                            n_ooo,        // station finished before an older one
  output int                            n_load_wait,
  output int                            n_store_wait,
  output int                            n_cross,      // cycles with several busy clusters
  output int                            n_retired     // clusters retired
);
  logic [XLEN-1:0] mem [256];
  instr_t          st_instr [K][C];
  int unsigned     pc, tail, br_k, br_s, idle;
  bit              running, wrong_path;
  int              prev_oldest;

  initial begin
    fill = '0; fill_instr = '0; squash = '0; finished = 1'b0;
    checks = 0; failures = 0; n_squash = 0; n_wrap = 0; n_ooo = 0;
    n_load_wait = 0; n_store_wait = 0; n_cross = 0; n_retired = 0;
    running = 1'b0; mem_ack = '0; mem_rdata = '0; prev_oldest = 0;
    for (int k = 0; k < K; k++) for (int s = 0; s < C; s++) st_instr[k][s] = '0;
  end

  always @(posedge clk) begin
    for (int k = 0; k < K; k++)
      for (int s = 0; s < C; s++) begin
        if (mem_req[k][s] && !mem_ack[k][s] && !squash[k][s] && $urandom_range(0, 2) != 0) begin
          mem_ack[k][s] <= 1'b1;
          if (mem_we[k][s]) mem[8'(mem_addr[k][s])] <= mem_wdata[k][s];
          else              mem_rdata[k][s] <= mem[8'(mem_addr[k][s])];
        end else begin
          mem_ack[k][s] <= 1'b0;
        end
      end
  end

  always @(negedge clk) begin
    fill = '0; squash = '0;
    if (start && !running && !finished) begin
      running = 1'b1; pc = 0; tail = 0; wrong_path = 1'b0; idle = 0;
      for (int k = 0; k < K; k++) if (oldest[k]) tail = k;
      for (int a = 0; a < 256; a++) mem[a] = init_mem[a];
    end else if (running) begin
      for (int k = 0; k < K; k++) begin
        if (oldest[k] && k == 0 && prev_oldest == int'(K) - 1) n_wrap++;
        if (oldest[k]) prev_oldest = k;
        if (retire[k]) n_retired++;
        for (int s = 0; s < C; s++) begin
          if (st_done[k][s] && s > 0 && st_valid[k][s-1] && !st_done[k][s-1]) n_ooo++;
          if (st_valid[k][s] && !st_done[k][s] && !mem_req[k][s] && st_instr[k][s].op == OP_LOAD) n_load_wait++;
          if (st_valid[k][s] && !st_done[k][s] && !mem_req[k][s] && st_instr[k][s].op == OP_STORE) n_store_wait++;
        end
      end
      if ($countones(busy) > 1) n_cross++;
      if (wrong_path && mispredict[br_k][br_s]) begin
        for (int s = br_s + 1; s < int'(C); s++) squash[br_k][s] = 1'b1;
        for (int unsigned k = (br_k + 1) % K; k != tail; k = (k + 1) % K) squash[k] = '1;
        tail = (br_k + 1) % K;
        wrong_path = 1'b0;
        n_squash++;
      end else if (!busy[tail] && (pc < prog_len || wrong_path)) begin
        for (int s = 0; s < int'(C); s++) begin
          if (wrong_path) fill_instr[tail][s] = junk_instr(L);
          else if (pc < prog_len) begin
            fill_instr[tail][s] = prog[pc];
            if (prog_misp[pc]) begin wrong_path = 1'b1; br_k = tail; br_s = s; end
            pc++;
          end else fill_instr[tail][s] = '0;
          st_instr[tail][s] = fill_instr[tail][s];
        end
        fill[tail] = 1'b1;
        tail = (tail + 1) % K;
      end
      if (pc >= prog_len && !wrong_path && busy == '0 && fill == '0) idle++;
      else idle = 0;
      if (idle == 3) begin
        running = 1'b0;
        finished = 1'b1;
        for (int r = 0; r < int'(L); r++) begin
          checks++;
          if (commit_regs[r].value !== ref_regs[r] || !commit_regs[r].ready) begin
            failures++;
            if (failures < 10)
              $display("clusters: R%0d = %h, expected %h", r, commit_regs[r].value, ref_regs[r]);
          end
        end
        for (int a = 0; a < 256; a++) begin
          checks++;
          if (mem[a] !== ref_mem[a]) begin
            failures++;
            if (failures < 10) $display("clusters: mem[%0d] = %h, expected %h", a, mem[a], ref_mem[a]);
          end
        end
      end
    end
  end
endmodule
