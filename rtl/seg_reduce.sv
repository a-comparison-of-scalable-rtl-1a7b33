// seg_reduce: segmented reduction tree of one Ultrascalar II column in its
// log-depth (mesh-of-trees) form.
//
// Row i offers a value val[i] and the result hit[i] of its comparator (does
// this row bind the register the column asks for). The tree applies the
// operator a (x) b = a with the comparison as segment bit, so the root gives
// the value of the latest (highest-numbered) matching row, and `any` tells
// whether any row matched. Gate delay is O(log N). Combinational.
//
// Lint note: verilator's lint reports the children's outputs l_any, r_any,
// l_y and r_y as undriven. The report refers to the module's unelaborated
// template: in every elaborated instance the child instances drive them,
// as the simulations confirm. The recursion is kept because it states the
// tree directly.
module seg_reduce #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 33
) (
  input  logic [N-1:0]        hit,
  input  logic [N-1:0][W-1:0] val,
  output logic                any,
  output logic [W-1:0]        y
);
  if (N == 1) begin : g_leaf
    assign any = hit[0];
    assign y   = val[0];
  end else begin : g_node
    localparam int unsigned NL = N / 2;
    localparam int unsigned NR = N - NL;
    logic         l_any, r_any;
    logic [W-1:0] l_y, r_y;
    seg_reduce #(.N(NL), .W(W)) u_l (.hit(hit[NL-1:0]), .val(val[NL-1:0]), .any(l_any), .y(l_y));
    seg_reduce #(.N(NR), .W(W)) u_r (.hit(hit[N-1:NL]), .val(val[N-1:NL]), .any(r_any), .y(r_y));
    assign any = l_any | r_any;
    assign y   = r_any ? r_y : l_y;
  end
endmodule
