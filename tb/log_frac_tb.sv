// log_frac_tb: exhaustive self-checking test of the eight-segment log2(1+f)
// approximation at FW = 12. Every one of the 4096 fractions is applied; the
// output must equal the multiplication-based reference bit for bit and lie
// within -2.5e-3 - 2^-12 .. +2e-5 of the exact log2(1+f). Also checks the
// worked value f = 0.5 -> 0x95C. Combinational block, sampled 1 time unit
// after each input change.
module log_frac_tb;
  import lsq_ref_pkg::*;
  localparam int FW = 12;

  logic [FW-1:0] f, y;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;
  real           err, emin = 1.0, emax = -1.0;

  log_frac #(.FW(FW)) dut (.f(f), .y(y));

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
      if (longint'(y) != log_frac_ref(longint'(i), FW)) begin
        failures++;
        $display("FAIL f=%h y=%h expected %h", f, y, log_frac_ref(longint'(i), FW));
      end
      err = real'(y) / 4096.0 - log2r(1.0 + real'(i) / 4096.0);
      if (err < emin) emin = err;
      if (err > emax) emax = err;
      checks++;
      if (err < -2.5e-3 - 1.0 / 4096.0 || err > 2.0e-5) begin
        failures++;
        $display("FAIL accuracy f=%h err=%g", f, err);
      end
    end
    // worked example: f = 0.5 lies in segment 5 and maps to 1001 0101 1100
    @(posedge clk);
    f = 12'h800;
    #1;
    checks++;
    if (y != 12'h95C) begin failures++; $display("FAIL example y=%h", y); end
    $display("log_frac absolute error range %g .. %g", emin, emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
