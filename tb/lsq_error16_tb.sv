// lsq_error16_tb: exhaustive accuracy evaluation of the 16-bit configuration of
// the approximate square / square-root unit (N = 16, FW = 12, result Q32.12).
//
// Every operand 1..65535 is applied in both modes. Each result must match the
// testbench's reference chain bit for bit, and the run reports, per mode, the
// error metrics used to rate approximate arithmetic over all N possible inputs:
//   MAE  = max |exact - approx| / exact (maximum relative error)
//   MRED = (1/N) * sum |approx - exact| / exact
//   MSE  = (1/N) * sum ((approx - exact) / exact)^2
// and checks them against the bounds that follow from the converter errors:
// square MAE <= 0.5 %, MRED <= 0.25 %; square root MAE <= 0.2 %,
// MRED <= 0.1 %. One operand per clock of the testbench clock.
module lsq_error16_tb;
  import lsq_pkg::*;
  import lsq_ref_pkg::*;
  localparam int N  = 16;
  localparam int FW = 12;
  localparam int OW = 2 * N + FW;

  logic [N-1:0]  a;
  mode_e         mode;
  logic [OW-1:0] y;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  lsq_top #(.N(N), .FW(FW)) dut (.a(a), .mode(mode), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OW-1:0] ref_chain(logic [N-1:0] v, mode_e md);
    longint xv, p, fr, l, l2;
    int     kk;
    xv = longint'(v);
    kk = 0;
    p  = 1;
    while (p * 2 <= xv) begin p = p * 2; kk++; end
    fr = ((xv - p) <<< FW) / p;
    l  = (longint'(kk) <<< FW) + log_frac_ref(fr, FW);
    l2 = (md == MODE_SQUARE) ? 2 * l : l / 2;
    return OW'(alog_frac_ref(l2 & ((longint'(1) <<< FW) - 1), FW)) << (l2 >>> FW);
  endfunction

  task automatic sweep(mode_e md, real mae_lim, real mred_lim);
    real exact, rel, mae, sum_abs, sum_sq, mred, mse;
    int  cnt;
    mae = 0.0; sum_abs = 0.0; sum_sq = 0.0; cnt = 0;
    for (int v = 1; v < (1 << N); v++) begin
      @(posedge clk);
      a    = N'(v);
      mode = md;
      #1;
      checks++;
      if (y !== ref_chain(N'(v), md)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d mode=%s y=%h", v, md.name(), y);
      end
      exact = (md == MODE_SQUARE) ? real'(v) * real'(v) : $sqrt(real'(v));
      rel   = (real'(y) / 4096.0 - exact) / exact;
      if (rel < 0.0) rel = -rel;
      if (rel > mae) mae = rel;
      sum_abs += rel;
      sum_sq  += rel * rel;
      cnt++;
    end
    mred = sum_abs / cnt;
    mse  = sum_sq / cnt;
    $display("%s over %0d operands: max rel. error %.4f %%, MRED %.4f %%, MSE %g",
             md.name(), cnt, 100.0 * mae, 100.0 * mred, mse);
    checks++;
    if (mae > mae_lim || mred > mred_lim) begin
      failures++;
      $display("FAIL %s error metrics out of bounds", md.name());
    end
  endtask

  initial begin
    sweep(MODE_SQUARE, 0.005, 0.0025);
    sweep(MODE_SQRT,   0.002, 0.001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
