// log_shift_tb: self-checking test of the logarithm-domain shift. Treats
// {k, f} as the integer L = k*2^FW + f and checks that the square mode gives
// 2L and the square-root mode gives floor(L/2), for every k and random f in
// both modes, and for the worked values 1.95C -> 3.2B8 and 0.CAE.
module log_shift_tb;
  import lsq_pkg::*;
  localparam int KW = 5;
  localparam int FW = 12;

  mode_e         mode;
  logic [KW-1:0] k;
  logic [FW-1:0] f;
  logic [KW:0]   k2;
  logic [FW-1:0] f2;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;

  log_shift #(.KW(KW), .FW(FW)) dut (.mode(mode), .k(k), .f(f), .k2(k2), .f2(f2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(mode_e md, int kv, int fv);
    longint l, exp_l, got_l;
    @(posedge clk);
    mode = md;
    k    = KW'(kv);
    f    = FW'(fv);
    #1;
    l     = longint'(kv) * (1 << FW) + longint'(fv);
    exp_l = (md == MODE_SQUARE) ? 2 * l : l / 2;
    got_l = longint'(k2) * (1 << FW) + longint'(f2);
    checks++;
    if (got_l != exp_l) begin
      failures++;
      $display("FAIL mode=%s k=%0d f=%h -> %0d.%h expected %0d", md.name(), kv, fv, k2, f2, exp_l);
    end
  endtask

  initial begin
    for (int kv = 0; kv < (1 << KW); kv++) begin
      for (int j = 0; j < 50; j++) begin
        apply(MODE_SQUARE, kv, int'($urandom % (1 << FW)));
        apply(MODE_SQRT,   kv, int'($urandom % (1 << FW)));
      end
      apply(MODE_SQUARE, kv, (1 << FW) - 1);
      apply(MODE_SQRT,   kv, (1 << FW) - 1);
    end
    apply(MODE_SQUARE, 1, 'h95C);
    checks++;
    if ({k2, f2} != {6'd3, 12'h2B8}) begin failures++; $display("FAIL example square"); end
    apply(MODE_SQRT, 1, 'h95C);
    checks++;
    if ({k2, f2} != {6'd0, 12'hCAE}) begin failures++; $display("FAIL example sqrt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
