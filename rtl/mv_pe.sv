// mv_pe: processing element of the matrix-vector dependence graph, c = A*b.
//
// One PE is one node (i,j) of the DG and evaluates one statement of the locally recursive
// loop body
//     b[i][j] = b[i-1][j];
//     c[i][j] = c[i][j-1] + a[i][j] * b[i][j];
// The element a[i][j] is the node's own primary input. The vector element b arrives from
// the node above (i-1) and is passed on unchanged to the node below (i+1), which replaces
// a broadcast of b[j] to every row. The partial sum c arrives from the node to the left
// (j-1), gets this node's product added, and leaves to the right (j+1).
//
// The PE is purely combinational, as a DG node has no notion of time: registers are placed
// by whoever maps the graph onto hardware (see dg_top). Operands are signed DATA_W-bit
// values and the product is sign-extended to the ACC_W-bit partial sum; the widths and the
// signed representation are this design's choice.
module mv_pe #(
  parameter int unsigned DATA_W = dg_pkg::DG_DATA_W,
  parameter int unsigned ACC_W  = dg_pkg::DG_ACC_W
) (
  input  logic signed [DATA_W-1:0] a,      // a[i][j], primary input of this node
  input  logic signed [DATA_W-1:0] b_in,   // b[i-1][j], from the node above
  input  logic signed [ACC_W-1:0]  c_in,   // c[i][j-1], from the node to the left
  output logic signed [DATA_W-1:0] b_out,  // b[i][j], to the node below
  output logic signed [ACC_W-1:0]  c_out   // c[i][j], to the node to the right
);

  logic signed [2*DATA_W-1:0] product;

  always_comb begin
    product = a * b_in;
    b_out   = b_in;
    c_out   = c_in + ACC_W'(product);
  end

endmodule
