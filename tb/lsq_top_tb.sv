// lsq_top_tb: end-to-end self-checking test of the approximate square /
// square-root unit at its default size (32-bit operand, 12-bit logarithm
// fraction, Q64.12 result); the top is instantiated without parameter
// overrides.
//
// Every operand is applied in both modes. The result is compared with
//   * a reference chain built from the testbench's own models (leading one by
//     arithmetic, segment lines by multiplication, the log-domain shift as
//     2L or floor(L/2)), bit for bit, and
//   * the exact A^2 or sqrt(A), within the error band of the method:
//     square -0.5 % .. +0.11 %, square root -0.2 % .. +0.11 %.
// Operands: zero, 1..2000, every power of two and its neighbours, all-ones,
// and random operands of every bit length. The worked example A = 3 is checked
// explicitly (square 9.0078125; square root 0x1BBC / 4096 = 1.7334).
// The testbench counts how often each mechanism occurs: both modes, the zero
// operand, each of the eight logarithm and eight antilogarithm segments, a
// square whose doubled fraction carries into the characteristic, and a square
// root of an odd characteristic; a mechanism that never occurs is a failure.
module lsq_top_tb;
  import lsq_pkg::*;
  import lsq_ref_pkg::*;
  localparam int N  = 32;
  localparam int FW = 12;
  localparam int OW = 2 * N + FW;

  logic [N-1:0]  a;
  mode_e         mode;
  logic [OW-1:0] y;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;
  int            n_square = 0, n_sqrt = 0, n_zero = 0, n_carry = 0, n_odd = 0;
  int            n_lseg [8];
  int            n_aseg [8];
  real           worst_sq_lo = 0.0, worst_sq_hi = 0.0, worst_rt_lo = 0.0, worst_rt_hi = 0.0;

  lsq_top dut (.a(a), .mode(mode), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference result (Q(2N).FW) of the whole chain for operand v.
  function automatic logic [OW-1:0] ref_chain(logic [N-1:0] v, mode_e md);
    longint xv, p, fr, lf, l, l2, f2, m;
    int     kk, k2;
    xv = longint'(v);
    if (xv == 0) return '0;
    kk = 0;
    p  = 1;
    while (p * 2 <= xv) begin p = p * 2; kk++; end
    fr = ((xv - p) <<< FW) / p;
    lf = log_frac_ref(fr, FW);
    l  = (longint'(kk) <<< FW) + lf;
    l2 = (md == MODE_SQUARE) ? 2 * l : l / 2;
    k2 = int'(l2 >>> FW);
    f2 = l2 & ((longint'(1) <<< FW) - 1);
    m  = alog_frac_ref(f2, FW);
    n_lseg[seg_of(fr, FW)]++;
    n_aseg[seg_of(f2, FW)]++;
    if (md == MODE_SQUARE && lf >= (longint'(1) <<< (FW - 1))) n_carry++;
    if (md == MODE_SQRT && (kk % 2) == 1) n_odd++;
    return OW'(m) << k2;
  endfunction

  task automatic apply(logic [N-1:0] v, mode_e md);
    logic [OW-1:0] exp_y;
    real           exact, err;
    @(posedge clk);
    a    = v;
    mode = md;
    #1;
    exp_y = ref_chain(v, md);
    if (md == MODE_SQUARE) n_square++; else n_sqrt++;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL a=%0d mode=%s y=%h expected %h", v, md.name(), y, exp_y);
    end
    if (v == 0) begin
      n_zero++;
      return;
    end
    exact = (md == MODE_SQUARE) ? real'(v) * real'(v) : $sqrt(real'(v));
    err   = (real'(y) / 4096.0) / exact - 1.0;
    checks++;
    if (md == MODE_SQUARE) begin
      if (err < worst_sq_lo) worst_sq_lo = err;
      if (err > worst_sq_hi) worst_sq_hi = err;
      if (err < -0.005 || err > 0.0011) begin
        failures++;
        $display("FAIL accuracy square a=%0d err=%g", v, err);
      end
    end else begin
      if (err < worst_rt_lo) worst_rt_lo = err;
      if (err > worst_rt_hi) worst_rt_hi = err;
      if (err < -0.002 || err > 0.0011) begin
        failures++;
        $display("FAIL accuracy sqrt a=%0d err=%g", v, err);
      end
    end
  endtask

  task automatic both(logic [N-1:0] v);
    apply(v, MODE_SQUARE);
    apply(v, MODE_SQRT);
  endtask

  initial begin
    foreach (n_lseg[i]) n_lseg[i] = 0;
    foreach (n_aseg[i]) n_aseg[i] = 0;

    // worked example, A = 3
    apply(3, MODE_SQUARE);
    checks++;
    if (y != OW'('h9020)) begin failures++; $display("FAIL example square y=%h", y); end
    apply(3, MODE_SQRT);
    checks++;
    if (y != OW'('h1BBC)) begin failures++; $display("FAIL example sqrt y=%h", y); end

    both('0);
    for (int i = 1; i <= 2000; i++) both(N'(i));
    for (int i = 0; i < N; i++) begin
      both(N'(1) << i);
      both((N'(1) << i) - 1);
      both((N'(1) << i) + 1);
    end
    both('1);
    for (int i = 0; i < 8000; i++) both(N'($urandom) >> ($urandom % N));

    $display("square rel. error %g .. %g, sqrt rel. error %g .. %g",
             worst_sq_lo, worst_sq_hi, worst_rt_lo, worst_rt_hi);
    $display("mechanisms: square=%0d sqrt=%0d zero=%0d carry=%0d odd_k=%0d",
             n_square, n_sqrt, n_zero, n_carry, n_odd);
    checks++;
    if (n_square == 0 || n_sqrt == 0 || n_zero == 0 || n_carry == 0 || n_odd == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int s = 0; s < 8; s++) begin
      $display("segment %0d: log %0d antilog %0d", s, n_lseg[s], n_aseg[s]);
      checks++;
      if (n_lseg[s] == 0 || n_aseg[s] == 0) begin
        failures++;
        $display("FAIL segment %0d never used", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
