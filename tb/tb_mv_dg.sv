// tb_mv_dg: self-checking test of the matrix-vector dependence graph, c = A*b.
//
// Applies a set of directed operand patterns (zeros, identity, all most-negative, all
// most-positive, a single non-zero element) and random ones to mv_dg at its default order,
// and compares each c[i] with sum_j a[i][j]*b[j] computed here in 64-bit integers. It also
// checks that the copies of b leaving the bottom row equal b, i.e. that each b[j] reached
// every row unchanged. The graph is combinational; the clock only paces the stimulus.
module tb_mv_dg;
  localparam int unsigned N      = dg_pkg::DG_N;
  localparam int unsigned DATA_W = dg_pkg::DG_DATA_W;
  localparam int unsigned ACC_W  = dg_pkg::acc_width(DATA_W, N);
  localparam int unsigned NRAND  = 500;
  localparam logic signed [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};
  localparam logic signed [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] a [N][N];
  logic signed [DATA_W-1:0] b [N];
  logic signed [ACC_W-1:0]  c [N];
  logic signed [DATA_W-1:0] b_out [N];

  int checks = 0, failures = 0;

  mv_dg #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.a, .b, .c, .b_out);

  task automatic check_now(string tag);
    longint sum;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      sum = 0;
      for (int j = 0; j < N; j++) sum += longint'(a[i][j]) * longint'(b[j]);
      checks++;
      if (c[i] !== ACC_W'(sum)) begin
        failures++;
        $display("FAIL %s: c[%0d] = %0d, expected %0d", tag, i, c[i], sum);
      end
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (b_out[j] !== b[j]) begin
        failures++;
        $display("FAIL %s: b_out[%0d] = %0d, expected %0d", tag, j, b_out[j], b[j]);
      end
    end
  endtask

  initial begin
    // zeros
    a = '{default: '0}; b = '{default: '0};
    check_now("zero");
    // identity matrix: c must equal b
    for (int i = 0; i < N; i++) begin
      b[i] = DATA_W'(i * 7 - 11);
      for (int j = 0; j < N; j++) a[i][j] = (i == j) ? DATA_W'(1) : '0;
    end
    check_now("identity");
    // largest positive sums: (-2^(W-1))^2 * N
    a = '{default: MINV}; b = '{default: MINV};
    check_now("min*min");
    // largest negative sums
    a = '{default: MAXV}; b = '{default: MINV};
    check_now("max*min");
    // one non-zero element at each position in turn: tests every node separately
    for (int p = 0; p < N * N; p++) begin
      a = '{default: '0};
      a[p / N][p % N] = DATA_W'(p + 3);
      for (int j = 0; j < N; j++) b[j] = DATA_W'(j + 1) * DATA_W'(j % 2 ? -5 : 9);
      check_now("single");
    end
    // random operands
    for (int n = 0; n < NRAND; n++) begin
      for (int i = 0; i < N; i++) begin
        b[i] = DATA_W'($urandom);
        for (int j = 0; j < N; j++) a[i][j] = DATA_W'($urandom);
      end
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
