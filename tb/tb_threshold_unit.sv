// tb_threshold_unit: sweeps gradient values around several thresholds
// (including the tuned value 50) and checks 0 below, MAX_VAL at or above.
module tb_threshold_unit;
  logic [10:0] grad, threshold;
  logic [7:0]  pix;
  int checks = 0, failures = 0;

  threshold_unit #(.GRAD_W(11), .MAX_VAL(255)) dut (.*);

  task automatic check(int g, int t);
    grad = 11'(g); threshold = 11'(t);
    #1;
    checks++;
    if (pix !== ((g >= t) ? 8'd255 : 8'd0)) begin
      failures++;
      $display("FAIL g=%0d t=%0d pix=%0d", g, t, pix);
    end
  endtask

  initial begin
    for (int g = 0; g < 2048; g += 7) check(g, 50);
    check(49, 50); check(50, 50); check(51, 50);
    check(0, 0); check(2047, 2047); check(2046, 2047);
    for (int i = 0; i < 500; i++) check($urandom_range(0, 2047), $urandom_range(0, 2047));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
