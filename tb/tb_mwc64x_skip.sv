// tb_mwc64x_skip: checks the MWC64X jump-ahead two ways.
//   - With short substreams (2^3 = 8 steps) the result for stream k must equal
//     the state reached by stepping a reference generator 8*k times from the
//     base state.
//   - With the default 2^40-step substreams the result must equal
//     v * (A^(2^40))^k mod (A*2^32 - 1), worked out here with plain 128-bit
//     multiplication and remainder (no shift-and-add), then split into
//     x = v / A and c = v mod A.
// Random bases and stream indices, including k = 0 (the base itself). Each
// result must arrive within the stated bound of 130*(KW+1) clocks.
module tb_mwc64x_skip;
  localparam int KW = 8;
  localparam logic [63:0] A = 64'd4294883355;
  localparam logic [63:0] M = (A << 32) - 64'd1;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [63:0] base = '0;
  logic [KW-1:0] k = '0;
  logic busy_s, done_s, busy_l, done_l;
  logic [63:0] state_s, state_l;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mwc64x_skip #(.KW(KW), .LOG2_DIST(3)) dut_s (
    .clk, .rst_n, .start, .base, .k, .busy(busy_s), .done(done_s), .state(state_s));
  mwc64x_skip #(.KW(KW)) dut_l (
    .clk, .rst_n, .start, .base, .k, .busy(busy_l), .done(done_l), .state(state_l));

  function automatic logic [63:0] ref_step(logic [63:0] s, int n);
    logic [31:0] x, c;
    logic [63:0] p;
    {c, x} = s;
    for (int i = 0; i < n; i++) begin
      p = A * {32'd0, x} + {32'd0, c};
      x = p[31:0]; c = p[63:32];
    end
    return {c, x};
  endfunction

  function automatic logic [63:0] ref_jump40(logic [63:0] s, int kk);
    logic [127:0] cc, e, v;
    cc = 128'(A);
    for (int i = 0; i < 40; i++) cc = (cc * cc) % 128'(M);
    e = 128'd1;
    for (int i = 0; i < kk; i++) e = (e * cc) % 128'(M);
    v = 128'(s[31:0]) * 128'(A) + 128'(s[63:32]);
    v = (v * e) % 128'(M);
    return {32'(v % 128'(A)), 32'(v / 128'(A))};
  endfunction

  task automatic run(logic [63:0] b, int kk);
    int t;
    base = b; k = KW'(kk); start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (!(done_s && done_l) && t < 130 * (KW + 1)) begin @(negedge clk); t++; end
    checks += 3;
    if (!(done_s && done_l)) begin failures++; $display("FAIL k=%0d: no done within %0d clocks", kk, t); end
    if (state_s !== ref_step(b, 8 * kk)) begin
      failures++; $display("FAIL short k=%0d: %h, expected %h", kk, state_s, ref_step(b, 8 * kk));
    end
    if (state_l !== ref_jump40(b, kk)) begin
      failures++; $display("FAIL 2^40 k=%0d: %h, expected %h", kk, state_l, ref_jump40(b, kk));
    end
    @(negedge clk);
  endtask

  initial begin
    logic [63:0] b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(64'h0000_0001_DEAD_BEEF, 0);
    run(64'h0000_0001_DEAD_BEEF, 1);
    run(64'h0000_0001_DEAD_BEEF, 2);
    run(64'h0000_0001_DEAD_BEEF, 255);
    for (int i = 0; i < 16; i++) begin
      b = {32'($urandom_range(0, 32'hFFFF_0000)), $urandom()};
      run(b, $urandom_range(0, 40));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * 130 * (KW + 2)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
