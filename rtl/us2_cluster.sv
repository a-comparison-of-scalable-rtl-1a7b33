// us2_cluster: one Ultrascalar II cluster of C execution stations, as used on
// its own (us2_core) and as a super-station of the Hybrid Ultrascalar.
//
// The cluster holds a register file of all L registers (value and ready bit),
// C execution cores (us_exec) placed in program order from station 0 to
// station C-1, and the grid register datapath (us2_grid) that routes each
// station its arguments from the register file and from earlier stations and
// produces the outgoing value of every register. For the hybrid, an OR over
// each register's comparator row gives one modified bit per register: set
// when some instruction in the cluster writes that register.
//
// The cluster does not wrap around: it is filled as a whole (fill strobes C
// instruction slots, each slot's valid bit telling whether it is used) and
// emptied as a whole (dealloc). all_done is high when the cluster holds a
// batch and every used slot has finished; an emptied or squashed slot counts
// as finished. A cluster whose every slot is squashed becomes empty again,
// so that, like an empty Ultrascalar I station, it counts as unfinished and
// is the place where the fetch unit continues. Inside the cluster, loads, stores and commitment are ordered
// by AND chains: station k may use "all earlier" only if the cluster-level
// input says so for the clusters before it and stations 0..k-1 agree; the
// cluster's own aggregate is the AND over all its stations. These chains are
// this implementation's choice; the design gives the ordering rules only for
// stations of the Ultrascalar I.
//
// A cluster that is not the oldest lets its stations issue from the second
// cycle after a fill (see `fresh`), when its register file is up to date.
//
// rf_we loads rf_d into the register file at the clock edge (the owner
// decides: incoming datapath values in the hybrid, the final values in the
// stand-alone Ultrascalar II). Reset: registers 0 and ready, cluster empty.
module us2_cluster
  import us_pkg::*;
#(
  parameter int unsigned C    = 32,
  parameter int unsigned L    = 32,
  parameter bit          TREE = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // register file
  input  logic                   oldest,    // register file holds committed state
  input  logic                   rf_we,
  input  rv_t  [L-1:0]           rf_d,
  output rv_t  [L-1:0]           rf,
  // outgoing register values and modified bits
  output rv_t  [L-1:0]           reg_out,
  output logic [L-1:0]           written,
  // instruction delivery
  input  logic                   fill,
  input  instr_t [C-1:0]         fill_instr,
  input  logic                   dealloc,
  input  logic [C-1:0]           squash,
  output logic                   busy,      // holds a batch
  output logic                   all_done,
  output logic [C-1:0]           st_valid,
  output logic [C-1:0]           st_done,
  output logic [C-1:0]           mispredict,
  // sequencing with earlier clusters, and this cluster's aggregate
  input  logic                   prev_stores_done,
  input  logic                   prev_loads_done,
  input  logic                   prev_committed,
  output logic                   stores_done,
  output logic                   loads_done,
  output logic                   committed,
  // memory ports, one per station
  output logic [C-1:0]           mem_req,
  output logic [C-1:0]           mem_we,
  output logic [C-1:0][XLEN-1:0] mem_addr,
  output logic [C-1:0][XLEN-1:0] mem_wdata,
  input  logic [C-1:0]           mem_ack,
  input  logic [C-1:0][XLEN-1:0] mem_rdata
);
  instr_t [C-1:0]             st_instr;
  rv_t    [C-1:0]             st_res, st_res_now, arg_a, arg_b;
  logic   [C-1:0]             st_writes, store_ok, load_ok, commit_ok;
  logic   [C-1:0]             pv_store, pv_load, pv_commit;
  logic   [C-1:0][RIDX_W-1:0] st_rd, st_rs1, st_rs2;

  // fresh: first cycle after a fill; a cluster that is not the oldest then
  // holds a register file latched before earlier clusters filled at the same
  // edge inserted their results, so its stations wait one cycle.
  logic fresh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < L; r++) rf[r] <= '{ready: 1'b1, value: '0};
      busy  <= 1'b0;
      fresh <= 1'b0;
    end else begin
      if (rf_we) rf <= rf_d;
      fresh <= fill && !dealloc;
      if (dealloc || (&squash)) busy <= 1'b0;
      else if (fill) busy <= 1'b1;
    end
  end

  // In-cluster ordering chains (linear AND prefix).
  always_comb begin
    logic s, l, c;
    s = prev_stores_done;
    l = prev_loads_done;
    c = prev_committed;
    for (int k = 0; k < C; k++) begin
      pv_store[k]  = s;
      pv_load[k]   = l;
      pv_commit[k] = c;
      s = s & store_ok[k];
      l = l & load_ok[k];
      c = c & commit_ok[k];
    end
    stores_done = &store_ok;
    loads_done  = &load_ok;
    committed   = &commit_ok;
    all_done    = busy && (&(~st_valid | st_done));
  end

  for (genvar k = 0; k < C; k++) begin : g_st
    us_exec u_exec (
      .clk, .rst_n,
      .fill(fill), .fill_instr(fill_instr[k]), .dealloc(dealloc), .squash(squash[k]),
      .valid(st_valid[k]), .instr(st_instr[k]),
      .arg_a(arg_a[k]), .arg_b(arg_b[k]), .args_current(oldest || !fresh),
      .prev_stores_done(pv_store[k]), .prev_loads_done(pv_load[k]),
      .prev_committed(pv_commit[k]),
      .mem_req(mem_req[k]), .mem_we(mem_we[k]), .mem_addr(mem_addr[k]),
      .mem_wdata(mem_wdata[k]), .mem_ack(mem_ack[k]), .mem_rdata(mem_rdata[k]),
      .writes(st_writes[k]), .result(st_res_now[k]), .result_q(st_res[k]), .done(st_done[k]),
      .store_ok(store_ok[k]), .load_ok(load_ok[k]), .commit_ok(commit_ok[k]),
      .mispredict(mispredict[k]));
    assign st_rd[k]  = st_instr[k].rd;
    assign st_rs1[k] = st_instr[k].rs1;
    assign st_rs2[k] = st_instr[k].rs2;
  end

  us2_grid #(.C(C), .L(L), .TREE(TREE)) u_grid (
    .rf(rf), .st_writes(st_writes), .st_rd(st_rd), .st_res(st_res), .st_res_now(st_res_now),
    .st_rs1(st_rs1), .st_rs2(st_rs2), .arg_a(arg_a), .arg_b(arg_b),
    .reg_out(reg_out), .written(written));

  // A batch is only loaded into an empty cluster.
  a_fill_empty: assert property (@(posedge clk) disable iff (!rst_n) fill |-> !busy || dealloc);
endmodule
