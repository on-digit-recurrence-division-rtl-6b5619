// srt_divider: radix-2 SRT divider with quotient digit prediction, a
// bit-reduced top residual slice and an optional linear sequential array
// (LSA) for the low-order residual bits.
//
// It computes q = x/d for a divisor d in [1/2, 1) and a dividend with
// |x| < d, one quotient digit in {-1, 0, +1} per clock, using
//   w[0] = x,  w[j+1] = 2 w[j] - q_{j+1} d.
// The digit q_{j+2} is selected while w[j+1] is being formed (prediction),
// so the digit that drives every residual bit comes straight from a register.
// The residual is split into
//   - srt_msb_slice: positions 0..3 kept partly assimilated (w0.w1 s2 s3 plus
//     one carry c1), with the selection folded into the same logic;
//   - srt_conv_residual: carry-save positions 4..L-1 with broadcast digit;
//   - srt_lsa_array: LSA_MODULES modules of 4 positions each below L, the
//     digit pipelined from module to module (absent when LSA_MODULES = 0).
// Default sizes: N = 32 with a 20-bit conventional part and three LSA
// modules, the extended configuration the source design reports; N = 24
// with LSA_MODULES = 0 is its single-precision configuration.  ITER = N
// digits per division is this design's choice.
//
// Interface (this design's choice): assert start for one clock while busy is
// low; the operands are sampled then.  dividend is signed with N fraction
// bits (x = dividend * 2^-N), divisor unsigned with N fraction bits and its
// top bit set.  done pulses for one clock after the ITER-th rising edge that
// follows the edge accepting start; quotient = q * 2^ITER (two's complement)
// is then valid and holds until the next start.  |x/d - q| <= 2^-ITER.
// Some outputs of the sub-blocks (the F1F2 code, the upper carry-save bits)
// are left unconnected here; they exist for observation and testing.
// rst_n is also used as the disable condition of the operand assertions, so
// lint may report it as both an asynchronous reset and a synchronous signal;
// only the flip-flops use it as a reset.
module srt_divider
  import srt_pkg::*;
#(
  parameter int N           = 32,       // residual / operand precision
  parameter int LSA_MODULES = 3,        // 4-bit LSA modules below the seam
  parameter int ITER        = N         // quotient digits per division
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [N:0]      dividend,
  input  logic        [N-1:0]    divisor,
  output logic                   busy,
  output logic                   done,
  output logic signed [ITER+1:0] quotient
);

  localparam int L     = N - 4 * LSA_MODULES; // seam position
  localparam int CNT_W = $clog2(ITER);
  localparam logic [CNT_W-1:0] LAST = CNT_W'(ITER - 1);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t                 state_q;
  logic [CNT_W-1:0]       cnt_q;
  logic                   load, en;

  logic [N-1:0] d_q;                        // divisor operand register
  logic [N:1]   dp;                         // divisor bits, index = position
  logic [N-1:0] tx;                         // 2*dividend, index = position

  // top slice registers and the digit register
  logic    w0_q, w1_q, c1_q, s2_q, s3_q;
  qdigit_t q_q;
  logic    w0_n, w1_n, c1_n, s2_n, s3_n;
  qdigit_t q_n, q_init;
  logic [1:0] f_code;

  logic [L-1:4] s_q;
  logic [L-2:4] c_q;
  logic         seam_s, seam_cm1, seam_c;

  always_comb begin
    for (int p = 1; p <= N; p++)     dp[p] = d_q[N-p];
    for (int p = 0; p <= N - 1; p++) tx[p] = dividend[N-1-p];
  end

  // Initial digit q_1 from 2x truncated to one fraction bit.
  logic signed [3:0] x_top;
  assign x_top  = 4'(dividend >>> (N - 2));
  assign q_init = select_digit(x_top);

  // ---------------------------------------------------------------- control
  assign load = start && state_q == S_IDLE;
  assign en   = state_q == S_RUN;
  assign busy = state_q == S_RUN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
      d_q     <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        state_q <= S_RUN;
        cnt_q   <= '0;
        d_q     <= divisor;
      end else if (en) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == LAST) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------- top slice
  srt_msb_slice u_msb (
    .q      (q_q),
    .w0     (w0_q), .w1 (w1_q), .c1 (c1_q), .s2 (s2_q), .s3 (s3_q),
    .s4     (s_q[4]), .c4 (c_q[4]), .s5 (s_q[5]), .c5 (c_q[5]),
    .d      (dp[5:2]),
    .w0_n   (w0_n), .w1_n (w1_n), .c1_n (c1_n), .s2_n (s2_n), .s3_n (s3_n),
    .q_n    (q_n),
    .f_code (f_code)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {w0_q, w1_q, c1_q, s2_q, s3_q} <= '0;
      q_q <= Q_ZERO;
    end else if (load) begin
      {w0_q, w1_q, c1_q, s2_q, s3_q} <= {tx[0], tx[1], 1'b0, tx[2], tx[3]};
      q_q <= q_init;
    end else if (en) begin
      {w0_q, w1_q, c1_q, s2_q, s3_q} <= {w0_n, w1_n, c1_n, s2_n, s3_n};
      q_q <= q_n;
    end
  end

  // ------------------------------------------------ lower residual bits
  srt_conv_residual #(.L(L)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .en       (en),
    .init_s   (tx[L-1:4]),
    .q        (q_q),
    .d        (dp[L:4]),
    .seam_s   (seam_s),
    .seam_cm1 (seam_cm1),
    .seam_c   (seam_c),
    .s_q      (s_q),
    .c_q      (c_q)
  );

  if (LSA_MODULES > 0) begin : g_lsa
    srt_lsa_array #(.L(L), .K(LSA_MODULES)) u_lsa (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .en       (en),
      .tx       (tx),
      .q_in     (q_q),
      .d        (dp[N:L+1]),
      .seam_s   (seam_s),
      .seam_cm1 (seam_cm1),
      .seam_c   (seam_c)
    );
  end else begin : g_no_lsa
    // L = N: nothing below the LSB except the +1 of a q = +1 subtraction.
    assign seam_s   = 1'b0;
    assign seam_cm1 = 1'b0;
    assign seam_c   = ulp_term(q_q);
  end

  // ------------------------------------------------------------ quotient
  srt_quotient_acc #(.M(ITER)) u_qacc (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (load),
    .en       (en),
    .q        (q_q),
    .quotient (quotient)
  );

  // ---------------------------------------------------------- assertions
  // Operand rules: normalised divisor, |dividend| < divisor.
  a_norm_divisor: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> divisor[N-1]);
  a_dividend_range: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> ((dividend < 0 ? -dividend : dividend) < $signed({1'b0, divisor})));

  initial begin
    assert (N >= 4 * LSA_MODULES + 8) else $error("seam position L must be >= 8");
    assert (ITER >= 2) else $error("ITER must be >= 2");
  end

endmodule
