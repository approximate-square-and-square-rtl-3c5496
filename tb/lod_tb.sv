// lod_tb: self-checking test of the leading-one detector.
// Drives zero, every single-bit value, every "leading one plus random tail"
// value and random words at N = 32, and compares k and nz with a reference that
// finds the leading one by repeated halving. Combinational block: inputs change
// on a testbench clock and outputs are sampled one time unit later.
module lod_tb;
  localparam int N  = 32;
  localparam int KW = $clog2(N);

  logic [N-1:0]  x;
  logic [KW-1:0] k;
  logic          nz;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0, cycles = 0;

  lod #(.N(N)) dut (.x(x), .k(k), .nz(nz));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_k(logic [N-1:0] v);
    int r = 0;
    while (v > 1) begin v = v >> 1; r++; end
    return r;
  endfunction

  task automatic apply(logic [N-1:0] v);
    @(posedge clk);
    x = v;
    #1;
    checks++;
    if (nz !== (v != 0) || (v != 0 && int'(k) != ref_k(v))) begin
      failures++;
      $display("FAIL x=%h k=%0d nz=%0b expected k=%0d", v, k, nz, ref_k(v));
    end
  endtask

  initial begin
    apply('0);
    for (int i = 0; i < N; i++) apply(N'(1) << i);
    for (int i = 0; i < N; i++) apply((N'(1) << i) | (N'($urandom) & ((N'(1) << i) - 1)));
    apply('1);
    for (int i = 0; i < 2000; i++) apply(N'($urandom) >> ($urandom % N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
