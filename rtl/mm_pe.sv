// mm_pe: processing element of the matrix-matrix dependence graph, C = A*B.
//
// One PE is one node (i,j,k) of the three-dimensional DG and evaluates one pass of the
// locally recursive loop body
//     a[i][j][k] = a[i][j-1][k];
//     b[i][j][k] = b[i-1][j][k];
//     c[i][j][k] = c[i][j][k-1] + a[i][j][k] * b[i][j][k];
// Element a arrives from the neighbour at j-1 and is passed on to j+1, element b arrives
// from the neighbour at i-1 and is passed on to i+1 (these two transmissions replace the
// broadcasts of a[i][k] along j and of b[k][j] along i), and the partial sum c arrives
// from k-1, gets this node's product added, and leaves towards k+1.
//
// The function and the arcs follow the published method. The PE is purely
// combinational, as a DG node has no notion of time. Operands are signed
// DATA_W-bit values and the product is sign-extended to the ACC_W-bit partial sum; the
// widths and the signed representation are this design's choice.
module mm_pe #(
  parameter int unsigned DATA_W = dg_pkg::DG_DATA_W,
  parameter int unsigned ACC_W  = dg_pkg::DG_ACC_W
) (
  input  logic signed [DATA_W-1:0] a_in,   // a[i][j-1][k]
  input  logic signed [DATA_W-1:0] b_in,   // b[i-1][j][k]
  input  logic signed [ACC_W-1:0]  c_in,   // c[i][j][k-1]
  output logic signed [DATA_W-1:0] a_out,  // a[i][j][k], towards j+1
  output logic signed [DATA_W-1:0] b_out,  // b[i][j][k], towards i+1
  output logic signed [ACC_W-1:0]  c_out   // c[i][j][k], towards k+1
);

  logic signed [2*DATA_W-1:0] product;

  always_comb begin
    product = a_in * b_in;
    a_out   = a_in;
    b_out   = b_in;
    c_out   = c_in + ACC_W'(product);
  end

endmodule
