// us1_core: the Ultrascalar I register datapath with its sequencing circuits.
//
// N execution stations form a ring that holds the instruction window. One
// station is the oldest; younger instructions follow it to the right and wrap
// around from station 0. Register values travel between stations through one
// cyclic segmented parallel-prefix circuit (cspp, operator a (x) b = a) per
// logical register: a station that writes a register raises that register's
// segment bit and inserts its result and ready bit, and every later station
// up to the next writer receives it. The oldest station raises every segment
// bit and inserts the committed register file. Renaming, bypassing and
// out-of-order issue all fall out of this: an instruction computes as soon as
// the values it reads arrive marked ready.
//
// Four 1-bit CSPPs (operator a (x) b = a & b, oldest station raising its
// segment bit) tell every station whether all earlier stations have
//   finished            -> retirement and the choice of the next oldest,
//   finished their stores -> loads and stores may go,
//   finished their loads  -> stores may go,
//   confirmed their branches -> stores may go.
// A station that has not finished while all earlier ones have becomes the
// oldest on the next cycle; a finished station whose predecessors have all
// finished is deallocated and may be refilled. An empty station counts as
// unfinished, so the oldest role passes to the first empty station once the
// whole window has retired, and that station has latched the final state.
// When every station holds a finished instruction, the oldest stays oldest,
// latches the incoming values (the state after the whole window) and all
// stations are deallocated together: this corner case is this
// implementation's choice.
//
// Everything between two clock edges is combinational: register files and
// results are the only state. The fetch unit (outside) fills empty stations
// in ring order using `oldest` and `valid`; `retire` pulses for each
// deallocated station; `commit_regs` is the oldest station's register file.
// Reset: station 0 is oldest, all stations empty, all registers 0.
module us1_core
  import us_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned L = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           fill,
  input  instr_t [N-1:0]         fill_instr,
  input  logic [N-1:0]           squash,
  output logic [N-1:0]           valid,
  output logic [N-1:0]           oldest,
  output logic [N-1:0]           done,
  output logic [N-1:0]           retire,
  output logic [N-1:0]           mispredict,
  output rv_t [L-1:0]            commit_regs,
  output logic [N-1:0]           mem_req,
  output logic [N-1:0]           mem_we,
  output logic [N-1:0][XLEN-1:0] mem_addr,
  output logic [N-1:0][XLEN-1:0] mem_wdata,
  input  logic [N-1:0]           mem_ack,
  input  logic [N-1:0][XLEN-1:0] mem_rdata
);
  localparam int unsigned RW = $bits(rv_t);

  rv_t  [N-1:0][L-1:0] st_out, st_in, st_rf;
  logic [N-1:0][L-1:0] st_mod;

  logic [N-1:0] store_ok, load_ok, commit_ok;
  logic [N-1:0] pf_done, pf_store, pf_load, pf_commit;     // CSPP outputs
  logic [N-1:0] all_prev, prev_store, prev_load, prev_commit;
  logic [N-1:0] dealloc, next_oldest;
  logic         all_done;

  // ---- register datapath: one CSPP per logical register -----------------
  for (genvar r = 0; r < L; r++) begin : g_reg
    logic [N-1:0]         seg;
    logic [N-1:0][RW-1:0] val, out;
    for (genvar i = 0; i < N; i++) begin : g_leaf
      assign seg[i]       = st_mod[i][r];
      assign val[i]       = st_out[i][r];
      assign st_in[i][r]  = out[i];
    end
    cspp #(.N(N), .W(RW), .OP_AND(1'b0)) u_cspp (.seg(seg), .val(val), .out(out));
  end

  // ---- sequencing CSPPs ---------------------------------------------------
  cspp #(.N(N), .W(1), .OP_AND(1'b1)) u_fin   (.seg(oldest), .val(done),      .out(pf_done));
  cspp #(.N(N), .W(1), .OP_AND(1'b1)) u_store (.seg(oldest), .val(store_ok),  .out(pf_store));
  cspp #(.N(N), .W(1), .OP_AND(1'b1)) u_load  (.seg(oldest), .val(load_ok),   .out(pf_load));
  cspp #(.N(N), .W(1), .OP_AND(1'b1)) u_cmt   (.seg(oldest), .val(commit_ok), .out(pf_commit));

  always_comb begin
    // The oldest station's own CSPP output is the AND over the whole ring.
    all_done = |(oldest & pf_done & done);
    for (int i = 0; i < N; i++) begin
      all_prev[i]    = oldest[i] | pf_done[i];
      prev_store[i]  = oldest[i] | pf_store[i];
      prev_load[i]   = oldest[i] | pf_load[i];
      prev_commit[i] = oldest[i] | pf_commit[i];
      dealloc[i]     = all_prev[i] & done[i];
      next_oldest[i] = all_done ? oldest[i] : (all_prev[i] & ~done[i]);
    end
    retire = dealloc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) oldest <= N'(1);
    else        oldest <= next_oldest;
  end

  // ---- execution stations ---------------------------------------------------
  for (genvar i = 0; i < N; i++) begin : g_st
    us1_station #(.L(L)) u_st (
      .clk, .rst_n,
      .oldest(oldest[i]), .latch_all(all_done),
      .reg_in(st_in[i]), .reg_out(st_out[i]), .modified(st_mod[i]), .rf(st_rf[i]),
      .fill(fill[i]), .fill_instr(fill_instr[i]), .dealloc(dealloc[i]),
      .squash(squash[i]), .valid(valid[i]),
      .prev_stores_done(prev_store[i]), .prev_loads_done(prev_load[i]),
      .prev_committed(prev_commit[i]),
      .done(done[i]), .store_ok(store_ok[i]), .load_ok(load_ok[i]),
      .commit_ok(commit_ok[i]), .mispredict(mispredict[i]),
      .mem_req(mem_req[i]), .mem_we(mem_we[i]), .mem_addr(mem_addr[i]),
      .mem_wdata(mem_wdata[i]), .mem_ack(mem_ack[i]), .mem_rdata(mem_rdata[i]));
  end

  always_comb begin
    commit_regs = st_rf[0];
    for (int i = 0; i < N; i++)
      if (oldest[i]) commit_regs = st_rf[i];
  end

  // Exactly one station is the oldest.
  a_one_oldest: assert property (@(posedge clk) disable iff (!rst_n) $onehot(oldest));
endmodule
