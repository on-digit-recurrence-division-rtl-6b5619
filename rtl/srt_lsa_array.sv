// srt_lsa_array: linear sequential array of K modules extending the SRT
// residual from the seam position L down to position N = L + 4K.
//
// Module k covers positions L+4k+1 .. L+4k+4 and runs k+1 iterations behind
// the part of the residual above the seam.  The quotient digit travels down
// the chain one register per module (srt_lsa_module.q_out), so no signal has
// a fanout that grows with the precision, and neighbouring modules exchange
// only three residual bits per step.  This organisation is the source
// design's linear sequential array.
//
// Start-up (this design's choice; the source only mentions initialisation
// logic): load gives module k the residual of step -(k+1), i.e. the shifted
// dividend 2x scaled by 2^-(k+1), with zero carries and a zero digit.  The
// lowest module then needs, for K clocks, the dividend bits that this
// scaling pushed below position N; a K-bit shift register feeds them in as
// its s_N, after which s_N is 0.  The completion bit of q = +1 enters as c_N
// using the digit held by the lowest module.
//
// Interface: tx[p] is bit p of 2x (index = position); d is indexed by
// position; seam_* go to the conventional residual above (srt_conv_residual).
module srt_lsa_array
  import srt_pkg::*;
#(
  parameter int L = 20,                 // seam position above the array
  parameter int K = 3                   // number of 4-bit modules
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                en,
  input  logic [L+4*K-1:0]    tx,       // 2*dividend, index = position
  input  qdigit_t             q_in,     // q_{j+1} of the part above the seam
  input  logic [L+4*K:L+1]    d,        // divisor bits, index = position
  output logic                seam_s,   // s_L
  output logic                seam_cm1, // c_{L-1}
  output logic                seam_c    // c_L
);

  localparam int N = L + 4 * K;

  logic    [K:0] up_s, up_cm1, up_c;    // index k: outputs of module k
  qdigit_t       qd [K+1];              // qd[k]: digit entering module k
  logic    [K-1:0] feed_q;              // low dividend bits for module K-1

  assign qd[0] = q_in;

  for (genvar k = 0; k < K; k++) begin : g_mod
    localparam int B = L + 4 * k;
    logic [3:1] init;
    for (genvar t = 1; t <= 3; t++) begin : g_init
      assign init[t] = tx[B + t - (k + 1)];
    end
    srt_lsa_module u_mod (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (load),
      .en     (en),
      .init_s (init),
      .q_in   (qd[k]),
      .d      (d[B+4:B+1]),
      .dn_s   (up_s[k+1]),
      .dn_cm1 (up_cm1[k+1]),
      .dn_c   (up_c[k+1]),
      .up_s   (up_s[k]),
      .up_cm1 (up_cm1[k]),
      .up_c   (up_c[k]),
      .q_out  (qd[k+1])
    );
  end

  // Bottom of the chain: dividend feed, no carry above the completion bit.
  assign up_s[K]   = feed_q[0];
  assign up_cm1[K] = 1'b0;
  assign up_c[K]   = ulp_term(qd[K]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    feed_q <= '0;
    else if (load) feed_q <= tx[N-1:N-K];
    else if (en)   feed_q <= feed_q >> 1;
  end

  assign seam_s   = up_s[0];
  assign seam_cm1 = up_cm1[0];
  assign seam_c   = up_c[0];

endmodule
