// tb_gauss_rng: draws 40000 samples (with random backpressure) and checks
// the statistics of a standard normal distribution: mean 0, variance 1,
// about 68.3% within one and 95.4% within two standard deviations, no value
// beyond the method's bound, enough samples beyond three standard
// deviations and beyond 3.5, and the acceptance rate (Leva's method accepts
// about 73% of the pairs, minus the rejected band). Also checks that a
// sample is held while out_ready is low.
module tb_gauss_rng;
  logic clk = 0, rst_n = 0;
  logic out_ready = 0;
  logic out_valid;
  logic signed [15:0] out_z;
  int checks = 0, failures = 0;
  int n = 0, cycles = 0, in1 = 0, in2 = 0, tail3 = 0, tail35 = 0;
  real s = 0.0, s2 = 0.0, zmax = 0.0;
  logic signed [15:0] held;
  bit hold;

  logic rng_load = 0;
  logic [63:0] rng_seed = '0;
  always #5 clk = ~clk;

  gauss_rng #(.SEED(64'h0000_0003_1357_9BDF)) dut (.*);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real z, mean, var_;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (n < 40000) begin
      out_ready = ($urandom_range(0, 9) != 0);
      #1;
      hold = out_valid && !out_ready;
      if (hold) held = out_z;
      if (out_valid && out_ready) begin
        z = real'(out_z) / 256.0;
        s += z; s2 += z * z; n++;
        if (z < 0 ? -z > zmax : z > zmax) zmax = z < 0 ? -z : z;
        if (z > -1.0 && z < 1.0) in1++;
        if (z > -2.0 && z < 2.0) in2++;
        if (z < -3.0 || z > 3.0) tail3++;
        if (z < -3.5 || z > 3.5) tail35++;
      end
      if (out_ready) cycles++;
      @(negedge clk);
      if (hold) begin
        checks++;
        if (out_z !== held) failures++;
      end
    end
    mean = s / n;
    var_ = s2 / n - mean * mean;
    $display("mean %f var %f p1 %f p2 %f max %f rate %f", mean, var_, real'(in1) / n, real'(in2) / n, zmax, real'(n) / cycles);
    chk(mean > -0.03 && mean < 0.03, "mean");
    chk(var_ > 0.97 && var_ < 1.03, "variance");
    // P(|z| > 3) = 0.0027: about 108 of 40000 samples
    chk(tail3 > 70 && tail3 < 150, "three sigma tail");
    chk(real'(in1) / n > 0.67 && real'(in1) / n < 0.70, "one sigma");
    chk(real'(in2) / n > 0.945 && real'(in2) / n < 0.962, "two sigma");
    // P(|z| > 3.5) = 0.000465: about 19 of 40000; these come only from the
    // band between the two quadratic bounds, so this checks the exact test
    chk(tail35 >= 6, "tail beyond 3.5");
    chk(zmax < 6.7, "bound");
    chk(real'(n) / cycles > 0.65 && real'(n) / cycles < 0.76, "acceptance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
