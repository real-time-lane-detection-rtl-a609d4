// mwc64x_skip: jump-ahead for the MWC64X generator, to split one random
// stream into non-overlapping substreams.
//
// An MWC64X state (x, c) corresponds to the number v = x*A + c modulo
// M = A*2^32 - 1, and one generator step multiplies v by A modulo M. Jumping
// d steps ahead is therefore v' = v * A^d mod M, after which x' = v' / A and
// c' = v' mod A. Substream k of a base state starts k * 2^LOG2_DIST steps
// after it, so v_k = v * C^k mod M with the constant C = A^(2^LOG2_DIST)
// mod M, worked out at elaboration by LOG2_DIST modular squarings.
// Splitting one stream into substreams of 2^40 numbers follows the design;
// this sequential datapath is this implementation's.
//
// The datapath is one shift-and-add modular multiplier (one multiplier bit
// per clock, 64 clocks per product) and a restoring divider by A (64 clocks).
// C^k is formed by square-and-multiply over the KW bits of k.
//
// Interface: start pulse with base = {c, x} (a valid state: c < A) and the
// stream index k; done pulses with state = {c', x'} valid until the next
// start; busy is high in between. Timing: 1 + KW*64 + 64*popcount(k) + 64
// + 64 clocks plus one clock per phase change, at most about
// 130*(KW+1) clocks.
module mwc64x_skip #(
  parameter int unsigned KW        = 8,     // width of the stream index
  parameter int unsigned LOG2_DIST = 40     // substream length 2^LOG2_DIST
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [63:0]   base,     // {c, x}
  input  logic [KW-1:0] k,
  output logic          busy,
  output logic          done,
  output logic [63:0]   state     // {c, x} of substream k
);
  localparam logic [63:0] A = 64'd4294883355;
  localparam logic [63:0] M = (A << 32) - 64'd1;

  // one step of the shift-and-add product: r = (2r + (bit ? a : 0)) mod M,
  // with r, a < M
  function automatic logic [63:0] mm_step(logic [63:0] r, logic [63:0] a, logic bit_);
    logic [64:0] t;
    t = {r, 1'b0};
    if (t >= {1'b0, M}) t = t - {1'b0, M};
    if (bit_) t = t + {1'b0, a};
    if (t >= {1'b0, M}) t = t - {1'b0, M};
    return t[63:0];
  endfunction

  function automatic logic [63:0] mulmod(logic [63:0] a, logic [63:0] b);
    logic [63:0] r;
    r = '0;
    for (int i = 63; i >= 0; i--) r = mm_step(r, a, b[i]);
    return r;
  endfunction

  function automatic logic [63:0] jump_const(int unsigned n);
    logic [63:0] c;
    c = A;
    for (int unsigned i = 0; i < n; i++) c = mulmod(c, c);
    return c;
  endfunction

  localparam logic [63:0] CK = jump_const(LOG2_DIST);

  typedef enum logic [2:0] {P_IDLE, P_SQ, P_MUL, P_APPLY, P_DIV} phase_t;
  phase_t phase;

  logic [63:0]           v_q, ma, mb, acc, acc_n;
  logic [5:0]            cnt;
  logic [KW-1:0]         k_q;
  logic [$clog2(KW)-1:0] bi;
  logic [32:0]           rem, rem_sh;
  logic [63:0]           quo;

  assign acc_n  = mm_step(acc, ma, mb[cnt]);
  assign rem_sh = {rem[31:0], v_q[cnt]};
  assign busy   = (phase != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE; done <= 1'b0; state <= '0;
      v_q <= '0; ma <= '0; mb <= '0; acc <= '0; cnt <= '0;
      k_q <= '0; bi <= '0; rem <= '0; quo <= '0;
    end else begin
      done <= 1'b0;
      case (phase)
        P_IDLE: if (start) begin
          v_q   <= {32'd0, base[31:0]} * A + {32'd0, base[63:32]};
          k_q   <= k;
          bi    <= ($clog2(KW))'(KW - 1);
          ma    <= 64'd1; mb <= 64'd1; acc <= '0; cnt <= 6'd63;
          phase <= P_SQ;
        end
        P_SQ, P_MUL: begin
          acc <= acc_n;
          cnt <= cnt - 6'd1;
          if (cnt == 6'd0) begin
            acc <= '0; cnt <= 6'd63;
            if (phase == P_SQ && k_q[bi]) begin
              ma <= acc_n; mb <= CK; phase <= P_MUL;
            end else if (bi == '0) begin
              ma <= v_q; mb <= acc_n; phase <= P_APPLY;
            end else begin
              bi <= bi - 1'b1;
              ma <= acc_n; mb <= acc_n; phase <= P_SQ;
            end
          end
        end
        P_APPLY: begin
          acc <= acc_n;
          cnt <= cnt - 6'd1;
          if (cnt == 6'd0) begin
            v_q <= acc_n;
            rem <= '0; quo <= '0; cnt <= 6'd63;
            phase <= P_DIV;
          end
        end
        P_DIV: begin
          // restoring division of v_q by A, one quotient bit per clock
          if (rem_sh >= A[32:0]) begin
            rem      <= rem_sh - A[32:0];
            quo[cnt] <= 1'b1;
          end else begin
            rem <= rem_sh;
          end
          cnt <= cnt - 6'd1;
          if (cnt == 6'd0) begin
            state <= {(rem_sh >= A[32:0]) ? 32'(rem_sh - A[32:0]) : rem_sh[31:0],
                      quo[31:1], (rem_sh >= A[32:0])};
            done  <= 1'b1;
            phase <= P_IDLE;
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end
endmodule
