// us_exec: execution core of one station (instruction register, functional
// unit timing, memory access and branch check).
//
// The datapath around the core (Ultrascalar I register file, or Ultrascalar
// II grid) supplies the two arguments, each a value with a ready bit. Once
// the arguments an instruction reads are ready, the core runs its operation:
// ALU operations take the latency us_alu reports (add 1, multiply 3, divide
// 10 cycles) and the result, with a high ready bit, appears combinationally
// in the last of those cycles, so a dependent instruction computes in the
// next cycle when the consumer reads it through a register (the Ultrascalar
// I register file, a hybrid cluster's register file). result_q is the same
// result one cycle later, for consumers that read it combinationally (the
// argument columns of an Ultrascalar II grid). The result is then held in a register until the station is
// deallocated.
//
// Memory ordering follows the rules of the design: a load waits for all
// earlier stores (prev_stores_done); a store waits for all earlier loads and
// stores and for all earlier branches to be confirmed (prev_committed). The
// request is held until mem_ack; a load's data is taken with the ack and is
// visible from the next cycle. A branch resolves as soon as rs1 is ready; if
// its outcome differs from the prediction it raises `mispredict` and does
// not commit, which keeps every later station from writing memory until the
// fetch unit squashes them. `done`, which lets a station retire, is also
// held low while an earlier branch is unconfirmed, so wrong-path results
// never retire; the fetch unit must squash the wrong path no later than the
// cycle in which it sees `mispredict`, since the branch itself may retire
// at the end of that cycle. The handshake and the branch form are this
// implementation's choices.
//
// args_current low holds the station back for a cycle in which its argument
// source is known to be out of date (a register file latched before the
// earlier stations filled in the same cycle had inserted their results).
//
// fill loads a new instruction (fill_instr.valid tells whether the slot is
// used); dealloc and squash empty the station and take priority over fill.
// Reset (rst_n low, synchronous) empties the station.
module us_exec
  import us_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fill,
  input  instr_t          fill_instr,
  input  logic            dealloc,
  input  logic            squash,
  output logic            valid,
  output instr_t          instr,
  // arguments from the register datapath
  input  rv_t             arg_a,
  input  rv_t             arg_b,
  input  logic            args_current, // arguments reflect all earlier stations
  // sequencing: every earlier station has ...
  input  logic            prev_stores_done,
  input  logic            prev_loads_done,
  input  logic            prev_committed,
  // memory port
  output logic            mem_req,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic            mem_ack,
  input  logic [XLEN-1:0] mem_rdata,
  // results and status
  output logic            writes,      // instruction writes register instr.rd
  output rv_t             result,      // ready from the finishing cycle on
  output rv_t             result_q,    // ready from the cycle after
  output logic            done,        // finished, and no earlier branch unconfirmed
  output logic            store_ok,    // no unfinished store here
  output logic            load_ok,     // no unfinished load here
  output logic            commit_ok,   // no unconfirmed branch here
  output logic            mispredict
);
  logic            done_q, misp_q;
  logic [XLEN-1:0] res_q;
  logic [3:0]      cnt_q;

  logic [XLEN-1:0] alu_y;
  logic            alu_taken;
  logic [3:0]      alu_lat;

  us_alu u_alu (
    .op(instr.op), .a(arg_a.value), .b(arg_b.value), .imm(instr.imm),
    .y(alu_y), .taken(alu_taken), .latency(alu_lat));

  logic args_ok, is_load, is_store, is_br, is_mem, running, finish_now;

  always_comb begin
    is_load  = instr.op == OP_LOAD;
    is_store = instr.op == OP_STORE;
    is_br    = instr.op == OP_BR;
    is_mem   = is_load | is_store;
    args_ok  = args_current &&
               (!op_reads_a(instr.op) || arg_a.ready) &&
               (!op_reads_b(instr.op) || arg_b.ready);
    running    = valid && !done_q && args_ok && !is_mem;
    finish_now = running && (cnt_q == alu_lat - 4'd1);
    writes     = valid && op_writes(instr.op);

    mem_addr  = alu_y;
    mem_wdata = arg_b.value;
    mem_we    = is_store;
    mem_req   = valid && !done_q && args_ok &&
                ((is_load  && prev_stores_done) ||
                 (is_store && prev_stores_done && prev_loads_done && prev_committed));

    result.ready = done_q || (finish_now && !is_br);
    result.value = done_q ? res_q : alu_y;
    result_q     = '{ready: done_q, value: res_q};

    done       = valid && done_q && prev_committed;
    store_ok   = !(valid && is_store && !done_q);
    load_ok    = !(valid && is_load  && !done_q);
    commit_ok  = !(valid && is_br && !(done_q && !misp_q));
    mispredict = valid && is_br && done_q && misp_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      instr  <= '0;
      done_q <= 1'b0;
      misp_q <= 1'b0;
      res_q  <= '0;
      cnt_q  <= '0;
    end else if (dealloc || squash) begin
      valid  <= 1'b0;
      done_q <= 1'b0;
      misp_q <= 1'b0;
      cnt_q  <= '0;
    end else if (fill) begin
      valid  <= fill_instr.valid;
      instr  <= fill_instr;
      done_q <= 1'b0;
      misp_q <= 1'b0;
      cnt_q  <= '0;
    end else if (valid && !done_q) begin
      if (finish_now) begin
        done_q <= 1'b1;
        res_q  <= alu_y;
        misp_q <= is_br && (alu_taken != instr.pred_taken);
      end else if (running) begin
        cnt_q <= cnt_q + 4'd1;
      end
      if (mem_req && mem_ack) begin
        done_q <= 1'b1;
        if (is_load) res_q <= mem_rdata;
      end
    end
  end

  // A memory acknowledge only answers a pending request.
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_ack |-> mem_req);
endmodule
