// us2_core: the stand-alone Ultrascalar II processor.
//
// One cluster (us2_cluster) of C stations in program order sits on the grid
// register datapath, which passes every station only the registers it reads
// and writes instead of a whole register file. Stations compute as soon as
// their arguments arrive ready; results ripple through the grid in the same
// cycle. When every station of the batch has finished, the final register
// values (the outgoing columns) are latched into the committed register file,
// the stations are emptied, and the fetch unit may load the next batch of up
// to C instructions (fill with one instruction per slot). The processor does
// not wrap around. The cluster is always the oldest, so its ordering inputs
// are tied high.
// Reset: registers 0 and ready, no batch.
module us2_core
  import us_pkg::*;
#(
  parameter int unsigned C    = 32,
  parameter int unsigned L    = 32,
  parameter bit          TREE = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   fill,
  input  instr_t [C-1:0]         fill_instr,
  input  logic [C-1:0]           squash,
  output logic                   busy,
  output logic                   retire,       // batch finished; registers committed
  output logic [C-1:0]           st_valid,
  output logic [C-1:0]           st_done,
  output logic [C-1:0]           mispredict,
  output rv_t  [L-1:0]           commit_regs,
  output logic [C-1:0]           mem_req,
  output logic [C-1:0]           mem_we,
  output logic [C-1:0][XLEN-1:0] mem_addr,
  output logic [C-1:0][XLEN-1:0] mem_wdata,
  input  logic [C-1:0]           mem_ack,
  input  logic [C-1:0][XLEN-1:0] mem_rdata
);
  rv_t  [L-1:0] reg_out;
  logic [L-1:0] written;
  logic         all_done, stores_done, loads_done, committed;

  us2_cluster #(.C(C), .L(L), .TREE(TREE)) u_cl (
    .clk, .rst_n,
    .oldest(1'b1), .rf_we(all_done), .rf_d(reg_out), .rf(commit_regs),
    .reg_out(reg_out), .written(written),
    .fill, .fill_instr, .dealloc(all_done), .squash,
    .busy, .all_done, .st_valid, .st_done, .mispredict,
    .prev_stores_done(1'b1), .prev_loads_done(1'b1), .prev_committed(1'b1),
    .stores_done, .loads_done, .committed,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  assign retire = all_done;

  // Aggregates and modified bits serve only the hybrid.
  logic unused;
  assign unused = ^{written, stores_done, loads_done, committed};
endmodule
