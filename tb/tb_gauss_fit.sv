// tb_gauss_fit: compares g for distances from 0 to far beyond 4 sigma with
// 65536 * exp(-(d/H)^2 / (2 (0.15 W)^2)) computed here in floating point, at
// the default 72x512 ROI and at a small 8x64 one. Tolerance 24 LSB (0.04%).
module tb_gauss_fit;
  int checks = 0, failures = 0;
  logic [23:0] d1, d2;
  logic [16:0] g1, g2;

  gauss_fit #(.W(512), .H(72), .SIGMA_F_PCT(15)) dut1 (.distance(d1), .g(g1));
  gauss_fit #(.W(64),  .H(8),  .SIGMA_F_PCT(15)) dut2 (.distance(d2), .g(g2));

  function automatic real ref_g(real d, real h, real w);
    real s, m;
    s = 0.15 * w; m = d / h;
    return 65536.0 * $exp(-(m * m) / (2.0 * s * s));
  endfunction

  function automatic real absr(real a);
    return a < 0.0 ? -a : a;
  endfunction

  task automatic check(int d);
    real r1, r2;
    d1 = 24'(d); d2 = 24'(d / 16);
    #1;
    r1 = ref_g(real'(d), 72.0, 512.0);
    r2 = ref_g(real'(d / 16), 8.0, 64.0);
    checks += 2;
    if (absr(real'(g1) - r1) > 24.0) begin failures++; $display("FAIL d=%0d g=%0d exp %f", d, g1, r1); end
    if (absr(real'(g2) - r2) > 24.0) begin failures++; $display("FAIL small d=%0d g=%0d exp %f", d / 16, g2, r2); end
  endtask

  initial begin
    for (int d = 0; d < 40000; d += 97) check(d);
    for (int i = 0; i < 300; i++) check($urandom_range(0, 100000));
    check(0); check(24'hFFFFFF);
    // monotonic decrease
    d1 = 24'd5000; #1; begin
      logic [16:0] a; a = g1; d1 = 24'd6000; #1;
      checks++; if (!(g1 < a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
