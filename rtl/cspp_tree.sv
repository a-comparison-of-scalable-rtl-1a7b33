// cspp_tree: one subtree of a segmented parallel-prefix circuit (helper of
// cspp and seg_reduce).
//
// Each leaf i supplies a segment bit seg[i] and a value val[i]. Going up, a
// node combines its two children into the subtree summary (any segment bit,
// value accumulated since the last raised segment bit). Going down, a node
// passes the prefix `pre` arriving from everything before the subtree to its
// left child, and to its right child the prefix extended by the left child:
// the left summary alone if the left child holds a raised segment bit. Leaf i
// receives in out[i] the combination of all leaves before it back to and
// including the nearest one with a raised segment bit (exclusive prefix).
// OP_AND = 0 gives the operator a (x) b = a (keep the earlier value);
// OP_AND = 1 gives a (x) b = a & b. The tree is built by recursion and has
// ceil(log2 N) levels; it is combinational.
//
// Lint note: verilator's lint also reports the recursive step's child
// outputs (and, for the tree root, `out`) as undriven. The report refers to
// the module's unelaborated template, not to an instance: in every
// elaborated instance the g_leaf or g_node branch drives each of these nets,
// as simulation of every configuration confirms. The recursion is kept
// because it states the tree directly. The same holds for seg_reduce.
module cspp_tree #(
  parameter int unsigned N      = 8,
  parameter int unsigned W      = 1,
  parameter bit          OP_AND = 1'b0
) (
  input  logic [N-1:0]        seg,
  input  logic [N-1:0][W-1:0] val,
  input  logic [W-1:0]        pre,
  output logic [N-1:0][W-1:0] out,
  output logic                tot_seg,
  output logic [W-1:0]        tot_val
);
  function automatic logic [W-1:0] comb_op(logic [W-1:0] x, logic [W-1:0] y);
    return OP_AND ? (x & y) : x;
  endfunction

  if (N == 1) begin : g_leaf
    assign out[0]  = pre;
    assign tot_seg = seg[0];
    assign tot_val = val[0];
  end else begin : g_node
    localparam int unsigned NL = N / 2;
    localparam int unsigned NR = N - NL;
    logic          l_seg, r_seg;
    logic [W-1:0]  l_val, r_val, r_pre;

    cspp_tree #(.N(NL), .W(W), .OP_AND(OP_AND)) u_left (
      .seg(seg[NL-1:0]), .val(val[NL-1:0]), .pre(pre),
      .out(out[NL-1:0]), .tot_seg(l_seg), .tot_val(l_val));

    assign r_pre = l_seg ? l_val : comb_op(pre, l_val);

    cspp_tree #(.N(NR), .W(W), .OP_AND(OP_AND)) u_right (
      .seg(seg[N-1:NL]), .val(val[N-1:NL]), .pre(r_pre),
      .out(out[N-1:NL]), .tot_seg(r_seg), .tot_val(r_val));

    assign tot_seg = l_seg | r_seg;
    assign tot_val = r_seg ? r_val : comb_op(l_val, r_val);
  end
endmodule
