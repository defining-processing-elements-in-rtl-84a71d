// mm_dg: shift-invariant dependence graph for the matrix-matrix product C = A*B.
//
// An N x N x N lattice of mm_pe nodes, node (i,j,k) evaluating
//     a[i][j][k] = a[i][j-1][k];  b[i][j][k] = b[i-1][j][k];
//     c[i][j][k] = c[i][j][k-1] + a[i][j][k]*b[i][j][k].
// Arcs join neighbours only: a flows along j, b flows along i, and the partial sum c flows
// along k, the recursion index. The boundary surfaces are the primary inputs: element
// a[i][k] enters at the j = 0 face (a[i][-1][k] = a[i][k]), element b[k][j] enters at the
// i = 0 face (b[-1][j][k] = b[k][j]), and every chain starts from c[i][j][-1] = 0. The
// nodes with k = N-1 deliver the results c[i][j]. The copies of A leaving the j = N-1 face
// and of B leaving the i = N-1 face are brought out as well.
//
// The graph is combinational: all N^3 products and sums are evaluated in one pass, and the
// longest path runs through one multiplier and N adders. The lattice follows the published
// construction; element widths and the signed representation are this design's choice.
module mm_dg #(
  parameter int unsigned N      = dg_pkg::DG_N,
  parameter int unsigned DATA_W = dg_pkg::DG_DATA_W,
  parameter int unsigned ACC_W  = dg_pkg::acc_width(DATA_W, N)
) (
  input  logic signed [DATA_W-1:0] a     [N][N],  // a[i][k]
  input  logic signed [DATA_W-1:0] b     [N][N],  // b[k][j]
  output logic signed [ACC_W-1:0]  c     [N][N],  // c[i][j] = c[i][j][N-1]
  output logic signed [DATA_W-1:0] a_out [N][N],  // a[i][N-1][k], indexed [i][k]
  output logic signed [DATA_W-1:0] b_out [N][N]   // b[N-1][j][k], indexed [k][j]
);

  // Each node owns the three signals it drives (a_o towards j+1, b_o towards i+1, c_o
  // towards k+1) and reads its inputs from the neighbour that drives them, or from the
  // boundary face.
  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      for (genvar k = 0; k < N; k++) begin : g_k
        logic signed [DATA_W-1:0] a_i, a_o, b_i, b_o;
        logic signed [ACC_W-1:0]  c_i, c_o;

        if (j == 0) begin : g_a_edge
          assign a_i = a[i][k];                          // a[i][-1][k] = a[i][k]
        end else begin : g_a_link
          assign a_i = g_i[i].g_j[j-1].g_k[k].a_o;       // a[i][j-1][k]
        end

        if (i == 0) begin : g_b_edge
          assign b_i = b[k][j];                          // b[-1][j][k] = b[k][j]
        end else begin : g_b_link
          assign b_i = g_i[i-1].g_j[j].g_k[k].b_o;       // b[i-1][j][k]
        end

        if (k == 0) begin : g_c_edge
          assign c_i = '0;                               // c[i][j][-1] = 0
        end else begin : g_c_link
          assign c_i = g_i[i].g_j[j].g_k[k-1].c_o;       // c[i][j][k-1]
        end

        mm_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
          .a_in (a_i),
          .b_in (b_i),
          .c_in (c_i),
          .a_out(a_o),
          .b_out(b_o),
          .c_out(c_o)
        );
      end
      assign c[i][j] = g_i[i].g_j[j].g_k[N-1].c_o;        // c[i][j] = c[i][j][N-1]
    end
  end

  for (genvar x = 0; x < N; x++) begin : g_exit
    for (genvar y = 0; y < N; y++) begin : g_exit_y
      assign a_out[x][y] = g_i[x].g_j[N-1].g_k[y].a_o;   // a[i][N-1][k], x = i, y = k
      assign b_out[x][y] = g_i[N-1].g_j[y].g_k[x].b_o;   // b[N-1][j][k], x = k, y = j
    end
  end

endmodule
