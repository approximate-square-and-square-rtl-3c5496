// log_conv_tb: self-checking test of the binary-to-logarithm converter at
// N = 32, FW = 12. For zero, powers of two, small integers and random operands
// of every magnitude it checks the characteristic against the leading-one
// position, the fraction against the reference model applied to the first 12
// bits after the leading one (computed arithmetically as (x-2^k)*2^12/2^k),
// and the whole logarithm against log2(x). Also checks the worked value
// x = 3 -> 0001.1001 0101 1100. Combinational block.
module log_conv_tb;
  import lsq_ref_pkg::*;
  localparam int N  = 32;
  localparam int FW = 12;
  localparam int KW = $clog2(N);

  logic [N-1:0]  x;
  logic [KW-1:0] lg_k;
  logic [FW-1:0] lg_f;
  logic          nz;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  log_conv #(.N(N), .FW(FW)) dut (.x(x), .lg_k(lg_k), .lg_f(lg_f), .nz(nz));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] v);
    longint xv, p, fr;
    int     kk;
    real    err;
    @(posedge clk);
    x = v;
    #1;
    xv = longint'(v);
    checks++;
    if (xv == 0) begin
      if (nz !== 1'b0) begin failures++; $display("FAIL zero nz=%b", nz); end
      return;
    end
    kk = 0;
    p  = 1;
    while (p * 2 <= xv) begin p = p * 2; kk++; end
    fr = ((xv - p) <<< FW) / p;
    if (nz !== 1'b1 || int'(lg_k) != kk || longint'(lg_f) != log_frac_ref(fr, FW)) begin
      failures++;
      $display("FAIL x=%h k=%0d f=%h expected k=%0d f=%h", v, lg_k, lg_f, kk,
               log_frac_ref(fr, FW));
    end
    checks++;
    err = real'(lg_k) + real'(lg_f) / 4096.0 - log2r(real'(xv));
    if (err < -2.5e-3 - 3.0 / 4096.0 || err > 2.0e-5) begin
      failures++;
      $display("FAIL accuracy x=%h err=%g", v, err);
    end
  endtask

  initial begin
    apply('0);
    for (int i = 1; i < 300; i++) apply(N'(i));
    for (int i = 0; i < N; i++) apply(N'(1) << i);
    apply('1);
    for (int i = 0; i < 3000; i++) apply(N'($urandom) >> ($urandom % N));
    @(posedge clk);
    x = 3;
    #1;
    checks++;
    if ({lg_k, lg_f} != {5'd1, 12'h95C}) begin
      failures++;
      $display("FAIL example %h.%h", lg_k, lg_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
