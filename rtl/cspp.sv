// cspp: cyclic, segmented parallel-prefix (CSPP) circuit.
//
// The Ultrascalar I replaces each ring of multiplexers by one of these. Leaf
// i (an execution station, or a cluster in the hybrid) raises seg[i] when it
// inserts a new value val[i]; out[i] is what reaches leaf i from the stations
// before it, wrapping around the ring. The circuit is a segmented prefix tree
// (cspp_tree) whose data lines are tied together at the root: the root
// summary is fed back as the prefix entering the leftmost leaf, and the top
// segment bit is discarded. Gate delay is O(log N).
//
// OP_AND = 0: operator a (x) b = a; out[i] is the value of the nearest
//   preceding leaf with a raised segment bit (register value and ready bit).
// OP_AND = 1: operator a (x) b = a & b on W = 1; with the oldest station
//   raising its segment bit, out[i] is high when every station from the
//   oldest up to i-1 meets the condition. The value seen by the oldest leaf
//   itself is the AND over all leaves; users substitute 1 for it when they
//   need "all earlier stations".
// Combinational; no clock.
module cspp #(
  parameter int unsigned N      = 8,
  parameter int unsigned W      = 33,
  parameter bit          OP_AND = 1'b0
) (
  input  logic [N-1:0]        seg,
  input  logic [N-1:0][W-1:0] val,
  output logic [N-1:0][W-1:0] out
);
  logic         root_seg;
  logic [W-1:0] root_val;

  cspp_tree #(.N(N), .W(W), .OP_AND(OP_AND)) u_tree (
    .seg(seg), .val(val), .pre(root_val),
    .out(out), .tot_seg(root_seg), .tot_val(root_val));

  // The top segment bit has no use in the cyclic circuit.
  logic unused_root_seg;
  assign unused_root_seg = root_seg;
endmodule
