// hybrid_core: the Hybrid Ultrascalar.
//
// K clusters of C stations each. Inside a cluster, instructions exchange
// registers through the Ultrascalar II grid (us2_cluster); between clusters,
// register values travel through the Ultrascalar I datapath: one cyclic
// segmented parallel-prefix circuit (cspp, a (x) b = a) per logical register,
// with each cluster acting as one super-station. A cluster's modified bit for
// a register is the OR of its stations' writes of it, and the value it
// inserts is its grid's outgoing value. Exactly one cluster is the oldest: it
// raises every modified bit and so inserts the committed register file it
// holds; every other cluster latches the incoming register values into its
// register file at each clock edge, from where its grid reads them.
//
// Four 1-bit CSPPs (a (x) b = a & b, segment bit from the oldest cluster)
// tell each cluster whether all earlier clusters have finished, finished
// their stores, finished their loads, and confirmed their branches. As in the
// Ultrascalar I, an unfinished cluster whose predecessors have all finished
// becomes the oldest at the next edge, a finished one whose predecessors
// have all finished is emptied, and an empty cluster counts as unfinished.
// When every cluster has finished, the oldest keeps its role, latches the
// incoming state and all clusters are emptied together (this
// implementation's choice for that case).
//
// The fetch unit loads a batch of C instructions into an empty cluster
// (fill[k]), in ring order after the youngest cluster; a cluster in this
// design retires and refills as a whole. Reset: cluster 0 oldest, all empty,
// registers 0 and ready.
module hybrid_core
  import us_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned C    = 32,
  parameter int unsigned L    = 32,
  parameter bit          TREE = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [K-1:0]                  fill,
  input  instr_t [K-1:0][C-1:0]         fill_instr,
  input  logic [K-1:0][C-1:0]           squash,
  output logic [K-1:0]                  busy,
  output logic [K-1:0]                  oldest,
  output logic [K-1:0]                  retire,
  output logic [K-1:0][C-1:0]           st_valid,
  output logic [K-1:0][C-1:0]           st_done,
  output logic [K-1:0][C-1:0]           mispredict,
  output rv_t  [L-1:0]                  commit_regs,
  output logic [K-1:0][C-1:0]           mem_req,
  output logic [K-1:0][C-1:0]           mem_we,
  output logic [K-1:0][C-1:0][XLEN-1:0] mem_addr,
  output logic [K-1:0][C-1:0][XLEN-1:0] mem_wdata,
  input  logic [K-1:0][C-1:0]           mem_ack,
  input  logic [K-1:0][C-1:0][XLEN-1:0] mem_rdata
);
  localparam int unsigned RW = $bits(rv_t);

  rv_t  [K-1:0][L-1:0] cl_out, cl_in, cl_rf;
  logic [K-1:0][L-1:0] cl_written, cl_mod;
  logic [K-1:0] done, stores_ok, loads_ok, commit_ok;
  logic [K-1:0] pf_done, pf_store, pf_load, pf_commit;
  logic [K-1:0] all_prev, dealloc, next_oldest, rf_we;
  logic         all_done;

  for (genvar k = 0; k < K; k++) begin : g_cl
    us2_cluster #(.C(C), .L(L), .TREE(TREE)) u_cl (
      .clk, .rst_n,
      .oldest(oldest[k]), .rf_we(rf_we[k]), .rf_d(cl_in[k]), .rf(cl_rf[k]),
      .reg_out(cl_out[k]), .written(cl_written[k]),
      .fill(fill[k]), .fill_instr(fill_instr[k]), .dealloc(dealloc[k]),
      .squash(squash[k]),
      .busy(busy[k]), .all_done(done[k]), .st_valid(st_valid[k]),
      .st_done(st_done[k]), .mispredict(mispredict[k]),
      .prev_stores_done(oldest[k] | pf_store[k]),
      .prev_loads_done(oldest[k] | pf_load[k]),
      .prev_committed(oldest[k] | pf_commit[k]),
      .stores_done(stores_ok[k]), .loads_done(loads_ok[k]), .committed(commit_ok[k]),
      .mem_req(mem_req[k]), .mem_we(mem_we[k]), .mem_addr(mem_addr[k]),
      .mem_wdata(mem_wdata[k]), .mem_ack(mem_ack[k]), .mem_rdata(mem_rdata[k]));
    assign cl_mod[k] = oldest[k] ? {L{1'b1}} : cl_written[k];
  end

  // ---- Ultrascalar I datapath between clusters ------------------------------
  for (genvar r = 0; r < L; r++) begin : g_reg
    logic [K-1:0]         seg;
    logic [K-1:0][RW-1:0] val, out;
    for (genvar k = 0; k < K; k++) begin : g_leaf
      assign seg[k]      = cl_mod[k][r];
      assign val[k]      = cl_out[k][r];
      assign cl_in[k][r] = out[k];
    end
    cspp #(.N(K), .W(RW), .OP_AND(1'b0)) u_cspp (.seg(seg), .val(val), .out(out));
  end

  cspp #(.N(K), .W(1), .OP_AND(1'b1)) u_fin   (.seg(oldest), .val(done),      .out(pf_done));
  cspp #(.N(K), .W(1), .OP_AND(1'b1)) u_store (.seg(oldest), .val(stores_ok), .out(pf_store));
  cspp #(.N(K), .W(1), .OP_AND(1'b1)) u_load  (.seg(oldest), .val(loads_ok),  .out(pf_load));
  cspp #(.N(K), .W(1), .OP_AND(1'b1)) u_cmt   (.seg(oldest), .val(commit_ok), .out(pf_commit));

  always_comb begin
    all_done = |(oldest & pf_done & done);
    for (int k = 0; k < K; k++) begin
      all_prev[k]    = oldest[k] | pf_done[k];
      dealloc[k]     = all_prev[k] & done[k];
      next_oldest[k] = all_done ? oldest[k] : (all_prev[k] & ~done[k]);
      rf_we[k]       = ~oldest[k] | all_done;
    end
    retire = dealloc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) oldest <= K'(1);
    else        oldest <= next_oldest;
  end

  always_comb begin
    commit_regs = cl_rf[0];
    for (int k = 0; k < K; k++)
      if (oldest[k]) commit_regs = cl_rf[k];
  end

  a_one_oldest: assert property (@(posedge clk) disable iff (!rst_n) $onehot(oldest));
endmodule
