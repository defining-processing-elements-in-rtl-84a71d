// tb_mm_dg: self-checking test of the matrix-matrix dependence graph, C = A*B.
//
// Applies directed operand patterns (zeros, identity times B, all most-negative, mixed
// extremes, a single non-zero element of A at each position) and random ones to mm_dg at
// its default order, and compares each C[i][j] with sum_k A[i][k]*B[k][j] computed here in
// 64-bit integers. It also checks that the copies of A leaving the j = N-1 face and of B
// leaving the i = N-1 face equal the operands, i.e. that the transmitted values reached
// every node unchanged. The graph is combinational; the clock only paces the stimulus.
module tb_mm_dg;
  localparam int unsigned N      = dg_pkg::DG_N;
  localparam int unsigned DATA_W = dg_pkg::DG_DATA_W;
  localparam int unsigned ACC_W  = dg_pkg::acc_width(DATA_W, N);
  localparam int unsigned NRAND  = 300;
  localparam logic signed [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};
  localparam logic signed [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] a [N][N];
  logic signed [DATA_W-1:0] b [N][N];
  logic signed [ACC_W-1:0]  c [N][N];
  logic signed [DATA_W-1:0] a_out [N][N];
  logic signed [DATA_W-1:0] b_out [N][N];

  int checks = 0, failures = 0;

  mm_dg #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.a, .b, .c, .a_out, .b_out);

  task automatic check_now(string tag);
    longint sum;
    @(posedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        sum = 0;
        for (int k = 0; k < N; k++) sum += longint'(a[i][k]) * longint'(b[k][j]);
        checks++;
        if (c[i][j] !== ACC_W'(sum)) begin
          failures++;
          $display("FAIL %s: c[%0d][%0d] = %0d, expected %0d", tag, i, j, c[i][j], sum);
        end
      end
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        checks++;
        if (a_out[x][y] !== a[x][y] || b_out[x][y] !== b[x][y]) begin
          failures++;
          $display("FAIL %s: exit copies at [%0d][%0d]: a %0d/%0d b %0d/%0d", tag, x, y,
                   a_out[x][y], a[x][y], b_out[x][y], b[x][y]);
        end
      end
  endtask

  task automatic random_b();
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) b[k][j] = DATA_W'($urandom);
  endtask

  initial begin
    a = '{default: '0}; b = '{default: '0};
    check_now("zero");
    // identity * B = B
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) a[i][k] = (i == k) ? DATA_W'(1) : '0;
    random_b();
    check_now("identity");
    a = '{default: MINV}; b = '{default: MINV};
    check_now("min*min");
    a = '{default: MAXV};
    check_now("max*min");
    // one non-zero element of A at each position in turn
    for (int p = 0; p < N * N; p++) begin
      a = '{default: '0};
      a[p / N][p % N] = DATA_W'(-(p + 2));
      random_b();
      check_now("single");
    end
    for (int n = 0; n < NRAND; n++) begin
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) a[i][k] = DATA_W'($urandom);
      random_b();
      check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + N * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
