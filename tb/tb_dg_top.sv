// tb_dg_top: end-to-end test of dg_top at its default parameters (4x4 operands, 16-bit
// elements), both dependence graphs at once.
//
// A stimulus process issues matrix-matrix and matrix-vector products on the two start
// inputs, at random and in directed phases: isolated operations, back-to-back operations
// in consecutive clocks, both halves started in the same clock, and extreme operands
// (all most-negative or most-positive elements). A monitor keeps a queue of expected
// results per half, computed here with 64-bit integers, and checks that every done pulse
// arrives exactly two clocks after its start, carries the right product, and that results
// stay unchanged while no done pulse is present. Each mechanism is counted, and a
// mechanism that never occurred counts as a failure.
module tb_dg_top;
  localparam int unsigned N      = dg_pkg::DG_N;
  localparam int unsigned DATA_W = dg_pkg::DG_DATA_W;
  localparam int unsigned ACC_W  = dg_pkg::acc_width(DATA_W, N);
  localparam int unsigned LAT    = 2;
  localparam int unsigned NCYC   = 600;
  localparam logic signed [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};
  localparam logic signed [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef struct {
    int   due;            // cycle in which done must be seen
    acc_t c [N][N];
  } mm_exp_t;
  typedef struct {
    int   due;
    acc_t c [N];
  } mv_exp_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                     mm_start, mm_done, mv_start, mv_done;
  logic signed [DATA_W-1:0] mm_a [N][N], mm_b [N][N], mv_a [N][N], mv_b [N];
  acc_t                     mm_c [N][N], mv_c [N];

  dg_top dut (.*);

  int checks = 0, failures = 0;
  int n_mm = 0, n_mv = 0, n_b2b = 0, n_both = 0, n_extreme = 0, n_hold = 0;

  mm_exp_t mm_q [$];
  mv_exp_t mv_q [$];
  int cyc = 0;
  logic mm_start_d = 1'b0, mv_start_d = 1'b0;
  acc_t mm_c_prev [N][N], mv_c_prev [N];

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      // operands presented with a start are captured in this edge: record the expectation
      if (mm_start) begin
        mm_exp_t e;
        e.due = cyc + LAT;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            longint s;
            s = 0;
            for (int k = 0; k < N; k++) s += longint'(mm_a[i][k]) * longint'(mm_b[k][j]);
            e.c[i][j] = ACC_W'(s);
          end
        mm_q.push_back(e);
        n_mm++;
        if (mm_start_d) n_b2b++;
        if (mv_start) n_both++;
      end
      if (mv_start) begin
        mv_exp_t e;
        e.due = cyc + LAT;
        for (int i = 0; i < N; i++) begin
          longint s;
          s = 0;
          for (int j = 0; j < N; j++) s += longint'(mv_a[i][j]) * longint'(mv_b[j]);
          e.c[i] = ACC_W'(s);
        end
        mv_q.push_back(e);
        n_mv++;
        if (mv_start_d) n_b2b++;
      end
      if (mm_start && mm_a[0][0] == MINV && mm_b[0][0] == MINV) n_extreme++;
      if (mv_start && mv_a[0][0] == MAXV && mv_b[0] == MINV) n_extreme++;

      // results: done must match the head of the queue exactly on its due cycle
      checks++;
      if (mm_done) begin
        if (mm_q.size() == 0 || mm_q[0].due != cyc) begin
          failures++;
          $display("FAIL mm: unexpected done at cycle %0d", cyc);
        end else begin
          if (mm_c != mm_q[0].c) begin
            failures++;
            $display("FAIL mm: wrong product at cycle %0d", cyc);
          end
          void'(mm_q.pop_front());
        end
      end else begin
        if (mm_q.size() != 0 && mm_q[0].due <= cyc) begin
          failures++;
          $display("FAIL mm: done missing at cycle %0d", cyc);
          void'(mm_q.pop_front());
        end
        if (mm_c != mm_c_prev) begin
          failures++;
          $display("FAIL mm: result changed without done at cycle %0d", cyc);
        end
        n_hold++;
      end
      checks++;
      if (mv_done) begin
        if (mv_q.size() == 0 || mv_q[0].due != cyc) begin
          failures++;
          $display("FAIL mv: unexpected done at cycle %0d", cyc);
        end else begin
          if (mv_c != mv_q[0].c) begin
            failures++;
            $display("FAIL mv: wrong product at cycle %0d", cyc);
          end
          void'(mv_q.pop_front());
        end
      end else begin
        if (mv_q.size() != 0 && mv_q[0].due <= cyc) begin
          failures++;
          $display("FAIL mv: done missing at cycle %0d", cyc);
          void'(mv_q.pop_front());
        end
        if (mv_c != mv_c_prev) begin
          failures++;
          $display("FAIL mv: result changed without done at cycle %0d", cyc);
        end
        n_hold++;
      end
    end
    mm_c_prev  = mm_c;
    mv_c_prev  = mv_c;
    mm_start_d = rst_n && mm_start;
    mv_start_d = rst_n && mv_start;
    cyc++;
  end

  // ---------------- stimulus ----------------
  task automatic rand_operands();
    for (int i = 0; i < N; i++) begin
      mv_b[i] = DATA_W'($urandom);
      for (int j = 0; j < N; j++) begin
        mm_a[i][j] = DATA_W'($urandom);
        mm_b[i][j] = DATA_W'($urandom);
        mv_a[i][j] = DATA_W'($urandom);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; mm_start = 1'b0; mv_start = 1'b0;
    mm_a = '{default: '0}; mm_b = '{default: '0}; mv_a = '{default: '0}; mv_b = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // after reset the results read zero
    checks++;
    if (mm_c != '{default: '0} || mv_c != '{default: '0}) begin
      failures++;
      $display("FAIL: results not cleared by reset");
    end
    // phase 1: isolated operations, one half at a time
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      rand_operands();
      mm_start = n[0]; mv_start = !n[0];
      @(negedge clk);
      mm_start = 1'b0; mv_start = 1'b0;
      repeat (3) @(negedge clk);
    end
    // phase 2: extreme operands
    @(negedge clk);
    mm_a = '{default: MINV}; mm_b = '{default: MINV};
    mv_a = '{default: MAXV}; mv_b = '{default: MINV};
    mm_start = 1'b1; mv_start = 1'b1;
    @(negedge clk);
    mm_start = 1'b0; mv_start = 1'b0;
    // phase 3: back-to-back, both halves, new operands every clock
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      rand_operands();
      mm_start = 1'b1; mv_start = 1'b1;
    end
    // phase 4: random mix
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      rand_operands();
      mm_start = ($urandom % 3) == 0;
      mv_start = ($urandom % 2) == 0;
    end
    @(negedge clk);
    mm_start = 1'b0; mv_start = 1'b0;
    repeat (LAT + 2) @(negedge clk);

    checks++;
    if (mm_q.size() != 0 || mv_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d products never completed", mm_q.size(), mv_q.size());
    end
    $display("mechanisms: mm_products=%0d mv_products=%0d back_to_back=%0d both_halves=%0d extreme=%0d hold=%0d",
             n_mm, n_mv, n_b2b, n_both, n_extreme, n_hold);
    checks++; if (n_mm == 0)      begin failures++; $display("FAIL: no mm product"); end
    checks++; if (n_mv == 0)      begin failures++; $display("FAIL: no mv product"); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL: no back-to-back starts"); end
    checks++; if (n_both == 0)    begin failures++; $display("FAIL: halves never started together"); end
    checks++; if (n_extreme < 2)  begin failures++; $display("FAIL: extreme operands not applied"); end
    checks++; if (n_hold == 0)    begin failures++; $display("FAIL: results never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
