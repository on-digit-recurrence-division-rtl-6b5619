// srt_lsa_module: one module of the linear sequential array (LSA) that
// extends the carry-save SRT residual by four bit weights, B+1..B+4, where B
// is the position of the seam above it.
//
// Each module runs one iteration behind the neighbour above it, so the
// quotient digit reaches it through one register per module instead of a
// wide broadcast.  When this module holds the residual of step j it stores
//   s_{B+1} s_{B+2} s_{B+3},  c_{B+1} c_{B+2},  D_{B+1} D_{B+2}  (and q_{j+1})
// and works in two levels per clock:
//   level 1 (for the upper neighbour, which is at step j+1):
//       s_B, c_{B-1}, c_B of step j+1 from positions B+1, B+2;
//     in parallel D_{B+3}, D_{B+4} of step j from the stored digit;
//   level 2 (own next state, step j+1): full adders at positions B+2..B+4,
//       using s_{B+4}, c_{B+3}, c_{B+4} of step j delivered by the module
//       below out of its own level 1, and D_{B+1}, D_{B+2} for step j+1
//       formed from the digit arriving from above (q_{j+2}).
// The register placement and the two-level split are the source design's;
// the reset and load behaviour are this design's choice.
//
// Interface: index k of the local vectors is position B+k.  load puts the
// module at its starting step (initial sum bits, zero carries, zero digit).
module srt_lsa_module
  import srt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       en,
  input  logic [3:1] init_s,     // starting s_{B+1..B+3}
  input  qdigit_t    q_in,       // digit of the upper neighbour (one step ahead)
  input  logic [4:1] d,          // divisor bits d_{B+1..B+4}
  input  logic       dn_s,       // s_{B+4} of own step, from module below
  input  logic       dn_cm1,     // c_{B+3}
  input  logic       dn_c,       // c_{B+4}
  output logic       up_s,       // s_B of the next step, to module above
  output logic       up_cm1,     // c_{B-1}
  output logic       up_c,       // c_B
  output qdigit_t    q_out       // own digit, passed down
);

  logic [3:1] s_q;
  logic [2:1] c_q;
  logic [2:1] dl_q;               // latched D_{B+1}, D_{B+2}
  qdigit_t    q_q;

  logic       d3, d4;
  logic [3:1] s_nxt;
  logic [2:1] c_nxt;
  logic [2:1] dl_nxt;

  always_comb begin
    // level 1
    up_s   = fa_sum  (s_q[1], c_q[1], dl_q[1]);
    up_cm1 = fa_carry(s_q[1], c_q[1], dl_q[1]);
    up_c   = fa_carry(s_q[2], c_q[2], dl_q[2]);
    d3     = d_term(q_q, d[3]);
    d4     = d_term(q_q, d[4]);
    // level 2
    s_nxt[1] = fa_sum  (s_q[2], c_q[2], dl_q[2]);
    s_nxt[2] = fa_sum  (s_q[3], dn_cm1, d3);
    s_nxt[3] = fa_sum  (dn_s,   dn_c,   d4);
    c_nxt[1] = fa_carry(s_q[3], dn_cm1, d3);
    c_nxt[2] = fa_carry(dn_s,   dn_c,   d4);
    dl_nxt[1] = d_term(q_in, d[1]);
    dl_nxt[2] = d_term(q_in, d[2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      c_q  <= '0;
      dl_q <= '0;
      q_q  <= Q_ZERO;
    end else if (load) begin
      s_q  <= init_s;
      c_q  <= '0;
      dl_q <= '0;
      q_q  <= Q_ZERO;
    end else if (en) begin
      s_q  <= s_nxt;
      c_q  <= c_nxt;
      dl_q <= dl_nxt;
      q_q  <= q_in;
    end
  end

  assign q_out = q_q;

endmodule
