// tb_mv_pe: self-checking test of the matrix-vector processing element.
//
// Drives random and corner-case operands (most negative, most positive, zero) into one
// mv_pe and checks, against a 64-bit integer model computed here, that
//     c_out = c_in + a*b_in   (exact, in ACC_W bits)   and   b_out = b_in.
// The PE is combinational; a free-running clock only paces the stimulus and the watchdog.
module tb_mv_pe;
  localparam int unsigned DATA_W = dg_pkg::DG_DATA_W;
  localparam int unsigned ACC_W  = dg_pkg::DG_ACC_W;
  localparam int unsigned NVEC   = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] a, b_in, b_out;
  logic signed [ACC_W-1:0]  c_in, c_out;

  int checks = 0, failures = 0;

  mv_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  function automatic logic signed [DATA_W-1:0] pick(int sel);
    case (sel % 4)
      0: return {1'b1, {(DATA_W-1){1'b0}}};   // most negative
      1: return {1'b0, {(DATA_W-1){1'b1}}};   // most positive
      2: return '0;
      default: return DATA_W'($urandom);
    endcase
  endfunction

  task automatic apply(logic signed [DATA_W-1:0] ta, tb, logic signed [ACC_W-1:0] tc);
    longint expect_c;
    a = ta; b_in = tb; c_in = tc;
    @(posedge clk);
    expect_c = longint'(tc) + longint'(ta) * longint'(tb);
    checks++;
    if (c_out !== ACC_W'(expect_c)) begin
      failures++;
      $display("FAIL c: a=%0d b=%0d c_in=%0d got %0d expected %0d", ta, tb, tc, c_out, expect_c);
    end
    checks++;
    if (b_out !== tb) begin
      failures++;
      $display("FAIL b pass-through: b_in=%0d b_out=%0d", tb, b_out);
    end
  endtask

  initial begin
    // c_in kept within +/- 2^(ACC_W-2) so that adding one product cannot overflow
    for (int s = 0; s < 16; s++)
      apply(pick(s / 4), pick(s), ACC_W'(longint'($urandom % 1000) - 500));
    for (int n = 0; n < NVEC; n++)
      apply(DATA_W'($urandom), DATA_W'($urandom),
            ACC_W'((longint'($urandom) <<< 1) - longint'(64'h1_0000_0000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
