// srt_msb_slice: combinational next-state logic of the bit-reduced most
// significant part of the SRT residual, together with the prediction of the
// quotient digit one step ahead.
//
// State of the shifted residual 2w[j] kept above position 4:
//   w0 . w1 s2 s3      assimilated bits (weights 1, 1/2, 1/4, 1/8)
//        c1            one carry bit of weight 1/2
// The bits of weight 2 and higher are not stored: the estimate y[j] that
// selected q_{j+1} is congruent to w0.w1 modulo 2, and q_{j+1} tells which of
// the windows [0,3/2], {-1/2} or [-5/2,-1] y[j] lies in, so the dropped top bit
// follows from (q_{j+1}, w0, w1).  Below position 3 the residual is carry-save
// (s4,c4, s5,c5, ... supplied by the lower slice).
//
// One step w[j+1] = 2w[j] - q_{j+1} d is done in two lookup levels:
//   level 1:  m1 = w1^c1^D1;  k1 k2 k3 = s2 s3 + D2 D3;  2p3+p4 = s4+c4+D4;
//             u4 = carry(s5,c5,D5);  F1F2 = code of (q, w0, w1, c1)
//   level 2:  w0'' = m1^k1;  w1'' = k2;  c1'' s2'' s3'' = 2k3+u4+2p3+p4;
//             q_{j+2} = f(F1, F2, k1, k2)
// F1F2 codes the top bits h of c1/2 + (y[j] - q_{j+1} d) truncated at weight
// 1/2: 00 for h in {0, 1/2}, 01 for -1/2, 10 for -1, 11 for {-2, -3/2}.
// The whole structure and this coding follow the source design; the
// normalised divisor is assumed (d1 = 1), which is why d1 is not an input.
//
// Interface: purely combinational; the registers are in srt_divider.
module srt_msb_slice
  import srt_pkg::*;
(
  input  qdigit_t    q,       // q_{j+1}, applied in this step
  input  logic       w0,
  input  logic       w1,
  input  logic       c1,
  input  logic       s2,
  input  logic       s3,
  input  logic       s4,
  input  logic       c4,
  input  logic       s5,
  input  logic       c5,
  input  logic [5:2] d,       // divisor bits d_2..d_5 (index = position)
  output logic       w0_n,
  output logic       w1_n,
  output logic       c1_n,
  output logic       s2_n,
  output logic       s3_n,
  output qdigit_t    q_n,     // predicted q_{j+2}
  output logic [1:0] f_code   // F1F2, exposed for observation
);

  logic [5:1] dd;             // D_i of -q*d, i = 1..5
  logic       m1, k1, k2, k3, p3, p4, u4;
  logic       wm1;            // the eliminated top bit (weight 2) of 2w[j]
  logic [2:0] h;              // h_{-1} h_0 h_1 in units of 1/2, modulo 8
  logic       dsgn;           // D_{-1} = D_0: sign extension of -q*d

  always_comb begin
    dd[1] = d_term(q, 1'b1);
    for (int i = 2; i <= 5; i++) dd[i] = d_term(q, d[i]);
    dsgn = ulp_term(q);

    // Level 1
    m1 = w1 ^ c1 ^ dd[1];
    {k1, k2, k3} = {1'b0, s2, s3} + {1'b0, dd[2], dd[3]};
    {p3, p4} = {1'b0, s4} + {1'b0, c4} + {1'b0, dd[4]};
    u4 = fa_carry(s5, c5, dd[5]);

    // Eliminated bit: q=+1 -> y in [0,3/2]; q=0 -> y=-1/2; q=-1 -> y in
    // [-5/2,-1]; taken modulo 4 only the case y=-5/2 has weight-2 bit 0.
    if (!q.m)     wm1 = 1'b1;
    else if (q.s) wm1 = ~(w0 & w1);
    else          wm1 = 1'b0;
    h = {wm1, w0, w1} + {2'b00, c1} + {dsgn, dsgn, dd[1]};
    unique case (h)
      3'b000, 3'b001: f_code = 2'b00;
      3'b111:         f_code = 2'b01;
      3'b110:         f_code = 2'b10;
      default:        f_code = 2'b11;   // 100, 101 (010, 011 cannot occur)
    endcase

    // Level 2
    w0_n = m1 ^ k1;
    w1_n = k2;
    {c1_n, s2_n, s3_n} = {1'b0, k3, 1'b0} + {2'b00, u4} + {1'b0, p3, p4};
    unique case (f_code)
      2'b00: q_n = Q_POS;
      2'b01: q_n = k1 ? Q_POS : (k2 ? Q_ZERO : Q_NEG);
      2'b10: q_n = (k1 & k2) ? Q_ZERO : Q_NEG;
      default: q_n = Q_NEG;
    endcase
  end

endmodule
