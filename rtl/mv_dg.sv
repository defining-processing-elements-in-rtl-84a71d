// mv_dg: shift-invariant dependence graph for the matrix-vector product c = A*b.
//
// An N x N grid of mv_pe nodes, node (i,j) evaluating
//     b[i][j] = b[i-1][j];   c[i][j] = c[i][j-1] + a[i][j]*b[i][j].
// Arcs join neighbours only: b flows down each column j (from row i-1 to row i) and the
// partial sum c flows along each row i (from column j-1 to column j). The boundary
// surfaces are the primary inputs: the vector element b[j] enters the top of column j
// (b[-1][j] = b[j]), each a[i][j] enters its own node, and every row starts from
// c[i][-1] = 0. Row i delivers c[i] = c[i][N-1] at its right edge; the copies of b that
// leave the bottom row (b[N-1][j]) are brought out as well.
//
// The graph is combinational: all N*N products and sums are evaluated in one pass, and the
// longest path runs through one multiplier and N adders. The grid follows the published
// construction; element widths and the signed representation are this design's choice.
module mv_dg #(
  parameter int unsigned N      = dg_pkg::DG_N,
  parameter int unsigned DATA_W = dg_pkg::DG_DATA_W,
  parameter int unsigned ACC_W  = dg_pkg::acc_width(DATA_W, N)
) (
  input  logic signed [DATA_W-1:0] a     [N][N],  // a[i][j]
  input  logic signed [DATA_W-1:0] b     [N],     // b[j], enters column j at the top
  output logic signed [ACC_W-1:0]  c     [N],     // c[i] = c[i][N-1]
  output logic signed [DATA_W-1:0] b_out [N]      // b[N-1][j], leaves the bottom row
);

  // Each node owns the two signals it drives (b_o towards i+1, c_o towards j+1) and
  // reads its inputs from the neighbour that drives them, or from the boundary.
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic signed [DATA_W-1:0] b_i, b_o;
      logic signed [ACC_W-1:0]  c_i, c_o;

      if (i == 0) begin : g_b_edge
        assign b_i = b[j];                         // b[-1][j] = b[j]
      end else begin : g_b_link
        assign b_i = g_row[i-1].g_col[j].b_o;      // b[i-1][j]
      end

      if (j == 0) begin : g_c_edge
        assign c_i = '0;                           // c[i][-1] = 0
      end else begin : g_c_link
        assign c_i = g_row[i].g_col[j-1].c_o;      // c[i][j-1]
      end

      mv_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
        .a    (a[i][j]),
        .b_in (b_i),
        .c_in (c_i),
        .b_out(b_o),
        .c_out(c_o)
      );
    end
    assign c[i] = g_row[i].g_col[N-1].c_o;          // c[i] = c[i][N-1]
  end

  for (genvar j = 0; j < N; j++) begin : g_bottom
    assign b_out[j] = g_row[N-1].g_col[j].b_o;       // b[N-1][j]
  end

endmodule
