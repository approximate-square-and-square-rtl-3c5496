// antilog_frac_tb: exhaustive self-checking test of the eight-segment 2^f
// approximation at FW = 12. Every fraction is applied; the mantissa must equal
// the multiplication-based reference bit for bit and its relative error against
// 2^f must lie within -0.0067 % - 2^-12 .. +0.0975 %. Also checks the worked
// value f = 0x2B8 -> 1.0010 0000 0100. Combinational block, sampled 1 time
// unit after each input change.
module antilog_frac_tb;
  import lsq_ref_pkg::*;
  localparam int FW = 12;

  logic [FW-1:0] f;
  logic [FW:0]   m;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;
  real           err, emin = 1.0, emax = -1.0;

  antilog_frac #(.FW(FW)) dut (.f(f), .m(m));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << FW); i++) begin
      @(posedge clk);
      f = FW'(i);
      #1;
      checks++;
      if (longint'(m) != alog_frac_ref(longint'(i), FW)) begin
        failures++;
        $display("FAIL f=%h m=%h expected %h", f, m, alog_frac_ref(longint'(i), FW));
      end
      err = (real'(m) / 4096.0) / pow2r(real'(i) / 4096.0) - 1.0;
      if (err < emin) emin = err;
      if (err > emax) emax = err;
      checks++;
      if (err < -0.0000668 - 1.0 / 4096.0 || err > 0.000975) begin
        failures++;
        $display("FAIL accuracy f=%h err=%g", f, err);
      end
    end
    @(posedge clk);
    f = 12'h2B8;
    #1;
    checks++;
    if (m != 13'h1204) begin failures++; $display("FAIL example m=%h", m); end
    $display("antilog_frac relative error range %g .. %g", emin, emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
