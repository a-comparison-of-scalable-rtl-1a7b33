// ultrascalar_top: the three scalable register datapaths side by side.
//
// All three execute the same instruction set (us_pkg) with the same
// scheduling: an instruction computes as soon as its arguments are ready,
// registers are renamed implicitly by the datapath, and recovery from a
// mispredicted branch only needs the fetch unit to squash the wrong-path
// stations and refill them.
//   us1_*  Ultrascalar I: US1_N stations, every station sees the whole
//          register file through one CSPP per register (us1_core).
//   hyb_*  Hybrid Ultrascalar: HYB_K clusters of HYB_C stations; Ultrascalar
//          II grids inside clusters, Ultrascalar I CSPPs between them
//          (hybrid_core). This is the design that scales best.
//   us2_*  Ultrascalar II: one non-wrapping grid of US2_C stations
//          (us2_core).
// Default sizes are those of the reference layouts: 32 registers of 32 bits,
// a 64-station Ultrascalar I and a 128-station hybrid of 4 clusters of 32;
// the 32-station Ultrascalar II size is this implementation's choice. The
// instruction fetch unit and the memory system (fat-tree network, memory
// switches, interleaved data cache) are outside: every station's fill port
// and memory port are brought out as plain ports. Each memory port is a
// request held until a one-cycle ack; load data is sampled with the ack.
module ultrascalar_top
  import us_pkg::*;
#(
  parameter int unsigned L     = 32,
  parameter int unsigned US1_N = 64,
  parameter int unsigned HYB_K = 4,
  parameter int unsigned HYB_C = 32,
  parameter int unsigned US2_C = 32
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // ---- Ultrascalar I ----
  input  logic [US1_N-1:0]                      us1_fill,
  input  instr_t [US1_N-1:0]                    us1_fill_instr,
  input  logic [US1_N-1:0]                      us1_squash,
  output logic [US1_N-1:0]                      us1_valid,
  output logic [US1_N-1:0]                      us1_oldest,
  output logic [US1_N-1:0]                      us1_done,
  output logic [US1_N-1:0]                      us1_retire,
  output logic [US1_N-1:0]                      us1_mispredict,
  output rv_t  [L-1:0]                          us1_commit_regs,
  output logic [US1_N-1:0]                      us1_mem_req,
  output logic [US1_N-1:0]                      us1_mem_we,
  output logic [US1_N-1:0][XLEN-1:0]            us1_mem_addr,
  output logic [US1_N-1:0][XLEN-1:0]            us1_mem_wdata,
  input  logic [US1_N-1:0]                      us1_mem_ack,
  input  logic [US1_N-1:0][XLEN-1:0]            us1_mem_rdata,
  // ---- Hybrid Ultrascalar ----
  input  logic [HYB_K-1:0]                      hyb_fill,
  input  instr_t [HYB_K-1:0][HYB_C-1:0]         hyb_fill_instr,
  input  logic [HYB_K-1:0][HYB_C-1:0]           hyb_squash,
  output logic [HYB_K-1:0]                      hyb_busy,
  output logic [HYB_K-1:0]                      hyb_oldest,
  output logic [HYB_K-1:0]                      hyb_retire,
  output logic [HYB_K-1:0][HYB_C-1:0]           hyb_st_valid,
  output logic [HYB_K-1:0][HYB_C-1:0]           hyb_st_done,
  output logic [HYB_K-1:0][HYB_C-1:0]           hyb_mispredict,
  output rv_t  [L-1:0]                          hyb_commit_regs,
  output logic [HYB_K-1:0][HYB_C-1:0]           hyb_mem_req,
  output logic [HYB_K-1:0][HYB_C-1:0]           hyb_mem_we,
  output logic [HYB_K-1:0][HYB_C-1:0][XLEN-1:0] hyb_mem_addr,
  output logic [HYB_K-1:0][HYB_C-1:0][XLEN-1:0] hyb_mem_wdata,
  input  logic [HYB_K-1:0][HYB_C-1:0]           hyb_mem_ack,
  input  logic [HYB_K-1:0][HYB_C-1:0][XLEN-1:0] hyb_mem_rdata,
  // ---- Ultrascalar II ----
  input  logic                                  us2_fill,
  input  instr_t [US2_C-1:0]                    us2_fill_instr,
  input  logic [US2_C-1:0]                      us2_squash,
  output logic                                  us2_busy,
  output logic                                  us2_retire,
  output logic [US2_C-1:0]                      us2_st_valid,
  output logic [US2_C-1:0]                      us2_st_done,
  output logic [US2_C-1:0]                      us2_mispredict,
  output rv_t  [L-1:0]                          us2_commit_regs,
  output logic [US2_C-1:0]                      us2_mem_req,
  output logic [US2_C-1:0]                      us2_mem_we,
  output logic [US2_C-1:0][XLEN-1:0]            us2_mem_addr,
  output logic [US2_C-1:0][XLEN-1:0]            us2_mem_wdata,
  input  logic [US2_C-1:0]                      us2_mem_ack,
  input  logic [US2_C-1:0][XLEN-1:0]            us2_mem_rdata
);
  us1_core #(.N(US1_N), .L(L)) u_us1 (
    .clk, .rst_n,
    .fill(us1_fill), .fill_instr(us1_fill_instr), .squash(us1_squash),
    .valid(us1_valid), .oldest(us1_oldest), .done(us1_done), .retire(us1_retire),
    .mispredict(us1_mispredict), .commit_regs(us1_commit_regs),
    .mem_req(us1_mem_req), .mem_we(us1_mem_we), .mem_addr(us1_mem_addr),
    .mem_wdata(us1_mem_wdata), .mem_ack(us1_mem_ack), .mem_rdata(us1_mem_rdata));

  hybrid_core #(.K(HYB_K), .C(HYB_C), .L(L)) u_hyb (
    .clk, .rst_n,
    .fill(hyb_fill), .fill_instr(hyb_fill_instr), .squash(hyb_squash),
    .busy(hyb_busy), .oldest(hyb_oldest), .retire(hyb_retire),
    .st_valid(hyb_st_valid), .st_done(hyb_st_done), .mispredict(hyb_mispredict),
    .commit_regs(hyb_commit_regs),
    .mem_req(hyb_mem_req), .mem_we(hyb_mem_we), .mem_addr(hyb_mem_addr),
    .mem_wdata(hyb_mem_wdata), .mem_ack(hyb_mem_ack), .mem_rdata(hyb_mem_rdata));

  us2_core #(.C(US2_C), .L(L)) u_us2 (
    .clk, .rst_n,
    .fill(us2_fill), .fill_instr(us2_fill_instr), .squash(us2_squash),
    .busy(us2_busy), .retire(us2_retire), .st_valid(us2_st_valid),
    .st_done(us2_st_done), .mispredict(us2_mispredict), .commit_regs(us2_commit_regs),
    .mem_req(us2_mem_req), .mem_we(us2_mem_we), .mem_addr(us2_mem_addr),
    .mem_wdata(us2_mem_wdata), .mem_ack(us2_mem_ack), .mem_rdata(us2_mem_rdata));
endmodule
