// tb_us1_driver: fetch unit and memory model for one us1_core, for tests.
//
// On `start` it runs the program held in tb_us_pkg: it fills empty stations
// in ring order (up to FW per cycle), follows a wrong path of filler
// instructions after a branch whose prediction is wrong until that station
// raises `mispredict`, then squashes every younger station and resumes after
// the branch. The memory answers a request after a random delay of at least
// one cycle. When the program has retired it compares the committed
// registers and the memory with the in-order reference and raises
// `finished`. It also counts how often each mechanism occurred.
module tb_us1_driver
  import us_pkg::*;
  import tb_us_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned L  = 8,
  parameter int unsigned FW = 4
) (
  input  logic                   clk,
  input  logic                   start,
  output logic [N-1:0]           fill,
  output instr_t [N-1:0]         fill_instr,
  output logic [N-1:0]           squash,
  input  logic [N-1:0]           valid,
  input  logic [N-1:0]           oldest,
  input  logic [N-1:0]           done,
  input  logic [N-1:0]           retire,
  input  logic [N-1:0]           mispredict,
  input  rv_t  [L-1:0]           commit_regs,
  input  logic [N-1:0]           mem_req,
  input  logic [N-1:0]           mem_we,
  input  logic [N-1:0][XLEN-1:0] mem_addr,
  input  logic [N-1:0][XLEN-1:0] mem_wdata,
  output logic [N-1:0]           mem_ack,
  output logic [N-1:0][XLEN-1:0] mem_rdata,
  output logic                   finished,
  output int                     checks,
  output int                     failures,
  output int                     n_squash,      // misprediction recoveries
  output int                     n_wrap,        // oldest station wrapped N-1 -> 0
  output int                     n_ooo,         // finished but waiting to retire
  output int                     n_load_wait,   // load held back by an earlier store
  output int                     n_store_wait,  // store held back
  output int                     n_retire_all,  // whole window retired at once
  output int                     n_retired
);
  logic [XLEN-1:0] mem [256];
  instr_t          st_instr [N];
  int unsigned     pc, tail, br_station, idle;
  bit              running, wrong_path;
  int              prev_oldest;

  initial begin
    fill = '0; fill_instr = '0; squash = '0; finished = 1'b0;
    checks = 0; failures = 0; n_squash = 0; n_wrap = 0; n_ooo = 0;
    n_load_wait = 0; n_store_wait = 0; n_retire_all = 0; n_retired = 0;
    running = 1'b0; mem_ack = '0; mem_rdata = '0; prev_oldest = 0;
    for (int i = 0; i < N; i++) st_instr[i] = '0;
  end

  // memory model
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (mem_req[i] && !mem_ack[i] && !squash[i] && $urandom_range(0, 2) != 0) begin
        mem_ack[i] <= 1'b1;
        if (mem_we[i]) mem[8'(mem_addr[i])] <= mem_wdata[i];
        else           mem_rdata[i] <= mem[8'(mem_addr[i])];
      end else begin
        mem_ack[i] <= 1'b0;
      end
    end
  end

  always @(negedge clk) begin
    fill = '0; squash = '0;
    if (start && !running && !finished) begin
      running = 1'b1; pc = 0; tail = 0; wrong_path = 1'b0; idle = 0;
      for (int i = 0; i < N; i++) if (oldest[i]) tail = i;
      for (int a = 0; a < 256; a++) mem[a] = init_mem[a];
    end else if (running) begin
      // statistics
      for (int i = 0; i < N; i++) begin
        if (oldest[i] && i == 0 && prev_oldest == int'(N) - 1) n_wrap++;
        if (oldest[i]) prev_oldest = i;
        if (done[i] && !retire[i]) n_ooo++;
        if (retire[i]) n_retired++;
        if (valid[i] && !done[i] && !mem_req[i] && st_instr[i].op == OP_LOAD) n_load_wait++;
        if (valid[i] && !done[i] && !mem_req[i] && st_instr[i].op == OP_STORE) n_store_wait++;
      end
      if (&retire) n_retire_all++;
      if (wrong_path && mispredict[br_station]) begin
        // squash everything younger than the branch
        for (int unsigned s = (br_station + 1) % N; s != tail; s = (s + 1) % N)
          squash[s] = 1'b1;
        tail = (br_station + 1) % N;
        wrong_path = 1'b0;
        n_squash++;
      end else begin
        for (int f = 0; f < int'(FW); f++) begin
          if (valid[tail] || (pc >= prog_len && !wrong_path)) break;
          if (wrong_path) fill_instr[tail] = junk_instr(L);
          else begin
            fill_instr[tail] = prog[pc];
            if (prog_misp[pc]) begin wrong_path = 1'b1; br_station = tail; end
            pc++;
          end
          fill[tail] = 1'b1;
          st_instr[tail] = fill_instr[tail];
          tail = (tail + 1) % N;
        end
      end
      if (pc >= prog_len && !wrong_path && valid == '0 && fill == '0) idle++;
      else idle = 0;
      if (idle == 3) begin
        running = 1'b0;
        finished = 1'b1;
        for (int r = 0; r < int'(L); r++) begin
          checks++;
          if (commit_regs[r].value !== ref_regs[r] || !commit_regs[r].ready) begin
            failures++;
            if (failures < 10)
              $display("us1: R%0d = %h, expected %h", r, commit_regs[r].value, ref_regs[r]);
          end
        end
        for (int a = 0; a < 256; a++) begin
          checks++;
          if (mem[a] !== ref_mem[a]) begin
            failures++;
            if (failures < 10) $display("us1: mem[%0d] = %h, expected %h", a, mem[a], ref_mem[a]);
          end
        end
      end
    end
  end
endmodule
