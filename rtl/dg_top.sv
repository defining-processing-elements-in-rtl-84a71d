// dg_top: the two dependence graphs, matrix-matrix (C = A*B) and matrix-vector (c = A*b),
// side by side, each wrapped in a small registered interface.
//
// The graphs themselves (mm_dg, mv_dg) are combinational arrays of processing elements.
// To give them a defined timing, each half of this top captures its operands in registers
// on a start pulse and captures the graph's results one clock later:
//     cycle t   : *_start = 1 with the operands on the *_a / *_b ports
//     cycle t+1 : operands held in registers, graph evaluates
//     cycle t+2 : *_done = 1 for one cycle, results valid on *_c and held until the next
//                 operation completes
// A new start may be given in every cycle, so each half accepts one complete product per
// clock with a latency of two clocks. The two halves are independent. The registered
// wrapper, the start/done handshake and the synchronous active-low reset are this
// design's own choices; the graphs follow the published
// dependence-graph construction for these loop nests.
module dg_top #(
  parameter int unsigned N      = dg_pkg::DG_N,
  parameter int unsigned DATA_W = dg_pkg::DG_DATA_W,
  parameter int unsigned ACC_W  = dg_pkg::acc_width(DATA_W, N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // matrix-matrix product
  input  logic                     mm_start,
  input  logic signed [DATA_W-1:0] mm_a [N][N],   // A[i][k]
  input  logic signed [DATA_W-1:0] mm_b [N][N],   // B[k][j]
  output logic                     mm_done,
  output logic signed [ACC_W-1:0]  mm_c [N][N],   // C[i][j]
  // matrix-vector product
  input  logic                     mv_start,
  input  logic signed [DATA_W-1:0] mv_a [N][N],   // A[i][j]
  input  logic signed [DATA_W-1:0] mv_b [N],      // b[j]
  output logic                     mv_done,
  output logic signed [ACC_W-1:0]  mv_c [N]       // c[i]
);

  // ---------------- matrix-matrix half ----------------
  logic                     mm_busy;
  logic signed [DATA_W-1:0] mm_a_q [N][N];
  logic signed [DATA_W-1:0] mm_b_q [N][N];
  logic signed [ACC_W-1:0]  mm_c_dg [N][N];
  logic signed [DATA_W-1:0] mm_a_exit [N][N];
  logic signed [DATA_W-1:0] mm_b_exit [N][N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mm_busy <= 1'b0;
      mm_done <= 1'b0;
      mm_a_q  <= '{default: '0};
      mm_b_q  <= '{default: '0};
      mm_c    <= '{default: '0};
    end else begin
      mm_busy <= mm_start;
      mm_done <= mm_busy;
      if (mm_start) begin
        mm_a_q <= mm_a;
        mm_b_q <= mm_b;
      end
      if (mm_busy) mm_c <= mm_c_dg;
    end
  end

  mm_dg #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_mm_dg (
    .a    (mm_a_q),
    .b    (mm_b_q),
    .c    (mm_c_dg),
    .a_out(mm_a_exit),
    .b_out(mm_b_exit)
  );

  // ---------------- matrix-vector half ----------------
  logic                     mv_busy;
  logic signed [DATA_W-1:0] mv_a_q [N][N];
  logic signed [DATA_W-1:0] mv_b_q [N];
  logic signed [ACC_W-1:0]  mv_c_dg [N];
  logic signed [DATA_W-1:0] mv_b_exit [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mv_busy <= 1'b0;
      mv_done <= 1'b0;
      mv_a_q  <= '{default: '0};
      mv_b_q  <= '{default: '0};
      mv_c    <= '{default: '0};
    end else begin
      mv_busy <= mv_start;
      mv_done <= mv_busy;
      if (mv_start) begin
        mv_a_q <= mv_a;
        mv_b_q <= mv_b;
      end
      if (mv_busy) mv_c <= mv_c_dg;
    end
  end

  mv_dg #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_mv_dg (
    .a    (mv_a_q),
    .b    (mv_b_q),
    .c    (mv_c_dg),
    .b_out(mv_b_exit)
  );

  // The copies of A and B that leave the far faces of the graphs must be the operands that
  // entered them: the transmitted values are never altered on the way through.
  for (genvar x = 0; x < N; x++) begin : g_chk
    for (genvar y = 0; y < N; y++) begin : g_chk_y
      a_mm_a_intact: assert property (@(posedge clk) mm_a_exit[x][y] == mm_a_q[x][y]);
      a_mm_b_intact: assert property (@(posedge clk) mm_b_exit[x][y] == mm_b_q[x][y]);
    end
    a_mv_b_intact: assert property (@(posedge clk) mv_b_exit[x] == mv_b_q[x]);
  end

  // done follows start by exactly two clocks
  a_mm_done: assert property (@(posedge clk) disable iff (!rst_n)
                              mm_start |=> ##1 mm_done);
  a_mv_done: assert property (@(posedge clk) disable iff (!rst_n)
                              mv_start |=> ##1 mv_done);

endmodule
