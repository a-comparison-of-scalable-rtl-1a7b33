// us1_station: one Ultrascalar I execution station.
//
// The station keeps a full register file: all L logical registers, each a
// value with a ready bit. At every clock edge a station that is not the
// oldest latches the values and ready bits arriving from the register
// datapath (the CSPP outputs) into its register file; the oldest station
// keeps its file, which is then the committed register state. The station
// reads its two arguments from its register file, computes with us_exec, and
// drives the outgoing datapath: the result replaces its destination register,
// every other register comes from the register file. The decode logic raises
// one modified bit per register: only the destination register normally,
// every register when the station is oldest, so that the oldest station
// inserts the committed values into every register's CSPP.
//
// latch_all overrides the oldest station's hold for the one cycle in which
// every station has finished and the whole window retires (this
// implementation's way of handling that case; see us1_core). A station that
// is not the oldest issues at the earliest in the second cycle after it is
// filled, when its register file holds what the earlier stations inserted
// (a one-cycle delay this implementation adds; the timing example of the
// design counts cycles from the point where the window is in place).
// Reset: every register value 0 and ready.
module us1_station
  import us_pkg::*;
#(
  parameter int unsigned L = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            oldest,
  input  logic            latch_all,
  input  rv_t [L-1:0]     reg_in,     // incoming register values and ready bits
  output rv_t [L-1:0]     reg_out,    // outgoing register values and ready bits
  output logic [L-1:0]    modified,   // modified bits (CSPP segment bits)
  output rv_t [L-1:0]     rf,         // this station's register file
  // instruction delivery
  input  logic            fill,
  input  instr_t          fill_instr,
  input  logic            dealloc,
  input  logic            squash,
  output logic            valid,
  // sequencing
  input  logic            prev_stores_done,
  input  logic            prev_loads_done,
  input  logic            prev_committed,
  output logic            done,
  output logic            store_ok,
  output logic            load_ok,
  output logic            commit_ok,
  output logic            mispredict,
  // memory port
  output logic            mem_req,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic            mem_ack,
  input  logic [XLEN-1:0] mem_rdata
);
  instr_t instr;
  rv_t    arg_a, arg_b, result;
  logic   writes;

  // fresh: the first cycle after a fill. The register file was latched at the
  // fill edge, before stations filled at the same edge inserted their results
  // and ready bits, so a station that is not the oldest waits one cycle.
  logic fresh;

  always_ff @(posedge clk) begin
    if (!rst_n) fresh <= 1'b0;
    else        fresh <= fill && !dealloc && !squash;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < L; r++) rf[r] <= '{ready: 1'b1, value: '0};
    end else if (!oldest || latch_all) begin
      rf <= reg_in;
    end
  end

  // Argument multiplexers (register numbers beyond L read register 0).
  always_comb begin
    arg_a = rf[0];
    arg_b = rf[0];
    for (int r = 0; r < L; r++) begin
      if (instr.rs1 == RIDX_W'(r)) arg_a = rf[r];
      if (instr.rs2 == RIDX_W'(r)) arg_b = rf[r];
    end
  end

  us_exec u_exec (
    .clk, .rst_n, .fill, .fill_instr, .dealloc, .squash, .valid, .instr,
    .arg_a, .arg_b, .args_current(oldest || !fresh), .prev_stores_done, .prev_loads_done, .prev_committed,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .writes, .result, .result_q(), .done, .store_ok, .load_ok, .commit_ok, .mispredict);

  // Decode logic and outgoing multiplexers.
  always_comb begin
    for (int r = 0; r < L; r++) begin
      logic hit;
      hit         = writes && (instr.rd == RIDX_W'(r));
      modified[r] = oldest || hit;
      reg_out[r]  = hit ? result : rf[r];
    end
  end
endmodule
