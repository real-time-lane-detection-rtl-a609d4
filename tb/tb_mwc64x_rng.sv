// tb_mwc64x_rng: compares the generator's output stream with a reference
// multiply-with-carry model (A = 4294883355, x' = low(A*x+c), c' = high,
// output x ^ c) for the reset seed and for a loaded seed, including cycles
// where next is low (state must hold). Also checks the mean of the outputs.
module tb_mwc64x_rng;
  logic clk = 0, rst_n = 0;
  logic load = 0, next = 0;
  logic [63:0] seed = '0;
  logic [31:0] rnd;
  int checks = 0, failures = 0;
  logic [31:0] rx, rc;
  real sum = 0.0;

  always #5 clk = ~clk;

  mwc64x_rng #(.SEED_D(64'h0000_0001_DEAD_BEEF)) dut (.*);

  task automatic ref_step();
    logic [63:0] p;
    p = 64'd4294883355 * {32'd0, rx} + {32'd0, rc};
    rx = p[31:0]; rc = p[63:32];
  endtask

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      next = ($urandom_range(0, 4) != 0);
      #1;
      checks++;
      if (rnd !== (rx ^ rc)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: %h exp %h", i, rnd, rx ^ rc);
      end
      sum += real'(rnd) / 4294967296.0;
      @(negedge clk);
      if (next) ref_step();
    end
  endtask

  initial begin
    rx = 32'hDEAD_BEEF; rc = 32'h1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3000);
    load = 1; seed = 64'h0000_1234_0BAD_F00D; next = 1;
    @(negedge clk);
    load = 0;
    rx = 32'h0BAD_F00D; rc = 32'h0000_1234;
    run(3000);
    checks++;
    if (sum / 6000.0 < 0.47 || sum / 6000.0 > 0.53) begin
      failures++;
      $display("FAIL mean %f", sum / 6000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
