// antilog_conv_tb: self-checking test of the logarithm-to-binary converter at
// N = 32, FW = 12 (result Q64.12). For every characteristic 0..63 and random
// fractions it checks the result against reference mantissa * 2^k, computed
// with a multiplication, and against 2^(k+f) within the converter's error
// band; it also checks that a low nz forces zero, and the worked value
// 3.2B8 -> 1001.0000 0010 0000 (9.0078125).
module antilog_conv_tb;
  import lsq_ref_pkg::*;
  localparam int N   = 32;
  localparam int FW  = 12;
  localparam int KW2 = $clog2(N) + 1;
  localparam int OW  = 2 * N + FW;

  logic [KW2-1:0] k;
  logic [FW-1:0]  f;
  logic           nz;
  logic [OW-1:0]  y;
  logic           clk = 1'b0;
  int             checks = 0, failures = 0;

  antilog_conv #(.N(N), .FW(FW)) dut (.k(k), .f(f), .nz(nz), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int kv, int fv, bit nzv);
    logic [OW-1:0] exp_y;
    real           err;
    @(posedge clk);
    k  = KW2'(kv);
    f  = FW'(fv);
    nz = nzv;
    #1;
    exp_y = nzv ? (OW'(alog_frac_ref(fv, FW)) << kv) : '0;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL k=%0d f=%h nz=%b y=%h expected %h", kv, fv, nzv, y, exp_y);
    end
    if (nzv) begin
      checks++;
      err = (real'(y) / 4096.0) / pow2r(real'(kv) + real'(fv) / 4096.0) - 1.0;
      if (err < -0.0000668 - 1.0 / 4096.0 || err > 0.000975) begin
        failures++;
        $display("FAIL accuracy k=%0d f=%h err=%g", kv, fv, err);
      end
    end
  endtask

  initial begin
    for (int kv = 0; kv < 2 * N; kv++) begin
      for (int j = 0; j < 40; j++) apply(kv, int'($urandom % (1 << FW)), 1'b1);
      apply(kv, 0, 1'b1);
      apply(kv, (1 << FW) - 1, 1'b1);
      apply(kv, int'($urandom % (1 << FW)), 1'b0);
    end
    apply(3, 'h2B8, 1'b1);
    checks++;
    if (y != OW'(76'h9020)) begin failures++; $display("FAIL example y=%h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
