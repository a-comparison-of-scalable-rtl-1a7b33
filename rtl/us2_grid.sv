// us2_grid: the Ultrascalar II register datapath of one cluster.
//
// Rows carry register bindings (register number, value, ready bit): first
// the L rows of the register file (row r binds register r), then one row per
// station for the register it writes. Columns carry requests: two argument
// columns per station (rs1, rs2) and one outgoing column per logical
// register. At each crossing a comparator checks whether the row binds the
// column's register; the column returns the value and ready bit of the latest
// matching row. A station's argument columns see only the register-file rows
// and the rows of earlier stations, so an instruction reads the nearest
// earlier writer and ignores earlier writes that are shadowed, even when they
// are unfinished. The outgoing columns see every row and give the final value
// of each register after the cluster's instructions.
//
// TREE = 0: each column is a chain of multiplexers searched from the oldest
//   row to the newest (linear gate delay, the form the hybrid uses).
// TREE = 1: each column is a segmented reduction tree (seg_reduce) with the
//   comparison as segment bit (logarithmic gate delay); the fan-out trees of
//   buffers that feed it are plain wires in RTL.
// Both forms compute the same function. Combinational.
//
// Each station row offers its result twice: st_res, ready from the cycle
// after the result is computed, to the argument columns, and st_res_now,
// ready in the computing cycle, to the outgoing columns. A dependent
// instruction in the same cluster therefore computes in the next cycle, as
// it does when the value crosses to another cluster through that cluster's
// register file; ALU operations never chain within one cycle. This split is
// this implementation's choice.
// `written[r]` is the OR over the station rows of "this row binds register
// r": the cluster's modified bits.
module us2_grid
  import us_pkg::*;
#(
  parameter int unsigned C    = 32,
  parameter int unsigned L    = 32,
  parameter bit          TREE = 1'b0
) (
  input  rv_t  [L-1:0]             rf,        // register-file rows
  input  logic [C-1:0]             st_writes, // station rows: binding present
  input  logic [C-1:0][RIDX_W-1:0] st_rd,
  input  rv_t  [C-1:0]             st_res,    // result for argument columns
  input  rv_t  [C-1:0]             st_res_now,// result for outgoing columns
  input  logic [C-1:0][RIDX_W-1:0] st_rs1,    // station argument requests
  input  logic [C-1:0][RIDX_W-1:0] st_rs2,
  output rv_t  [C-1:0]             arg_a,
  output rv_t  [C-1:0]             arg_b,
  output rv_t  [L-1:0]             reg_out,   // outgoing register values
  output logic [L-1:0]             written
);
  localparam int unsigned RW = $bits(rv_t);
  localparam int unsigned NROWS = L + C;

  // Rows in order oldest (register file) to newest (last station).
  logic [NROWS-1:0]             row_v;
  logic [NROWS-1:0][RIDX_W-1:0] row_num;
  rv_t  [NROWS-1:0]             row_val;   // seen by argument columns
  rv_t  [NROWS-1:0]             row_now;   // seen by outgoing columns

  always_comb begin
    for (int r = 0; r < L; r++) begin
      row_v[r]   = 1'b1;
      row_num[r] = RIDX_W'(r);
      row_val[r] = rf[r];
      row_now[r] = rf[r];
    end
    for (int j = 0; j < C; j++) begin
      row_v[L+j]   = st_writes[j];
      row_num[L+j] = st_rd[j];
      row_val[L+j] = st_res[j];
      row_now[L+j] = st_res_now[j];
    end
  end

  always_comb begin
    for (int r = 0; r < L; r++) begin
      written[r] = 1'b0;
      for (int j = 0; j < C; j++)
        written[r] = written[r] | (st_writes[j] && st_rd[j] == RIDX_W'(r));
    end
  end

  if (!TREE) begin : g_linear
    always_comb begin
      for (int i = 0; i < C; i++) begin
        arg_a[i] = rf[0];
        arg_b[i] = rf[0];
        for (int k = 0; k < L + i; k++) begin
          if (row_v[k] && row_num[k] == st_rs1[i]) arg_a[i] = row_val[k];
          if (row_v[k] && row_num[k] == st_rs2[i]) arg_b[i] = row_val[k];
        end
      end
      for (int r = 0; r < L; r++) begin
        reg_out[r] = rf[r];
        for (int k = L; k < NROWS; k++)
          if (row_v[k] && row_num[k] == RIDX_W'(r)) reg_out[r] = row_now[k];
      end
    end
  end else begin : g_tree
    for (genvar i = 0; i < C; i++) begin : g_col
      localparam int unsigned NR = L + i;
      logic [NR-1:0]         hit_a, hit_b;
      logic [NR-1:0][RW-1:0] vals;
      logic                  any_a, any_b;
      logic [RW-1:0]         ya, yb;
      for (genvar k = 0; k < NR; k++) begin : g_cmp
        assign hit_a[k] = row_v[k] && row_num[k] == st_rs1[i];
        assign hit_b[k] = row_v[k] && row_num[k] == st_rs2[i];
        assign vals[k]  = row_val[k];
      end
      seg_reduce #(.N(NR), .W(RW)) u_a (.hit(hit_a), .val(vals), .any(any_a), .y(ya));
      seg_reduce #(.N(NR), .W(RW)) u_b (.hit(hit_b), .val(vals), .any(any_b), .y(yb));
      assign arg_a[i] = any_a ? ya : rf[0];
      assign arg_b[i] = any_b ? yb : rf[0];
    end
    for (genvar r = 0; r < L; r++) begin : g_out
      logic [NROWS-1:0]         hit;
      logic                     any_hit;
      logic [RW-1:0]            y;
      for (genvar k = 0; k < NROWS; k++) begin : g_cmp
        assign hit[k] = row_v[k] && row_num[k] == RIDX_W'(r);
      end
      seg_reduce #(.N(NROWS), .W(RW)) u_o (.hit(hit), .val(row_now), .any(any_hit), .y(y));
      assign reg_out[r] = any_hit ? y : rf[r];
    end
  end
endmodule
