// srt_conv_residual: conventional carry-save part of the SRT residual below
// the bit-reduced top slice, from position 4 down to the seam position L.
//
// Every step all positions use the same, broadcast quotient digit q_{j+1}.
// A full adder per position adds s_p + c_p + D_p; its sum goes to position
// p-1 and its carry to position p-2 of the shifted residual 2w[j+1].
// Position 4 and the carry out of position 5 are consumed by srt_msb_slice,
// so the register holds s_4..s_{L-1} and c_4..c_{L-2}.  The three bits
// s_L, c_{L-1}, c_L are not stored here but arrive on the seam inputs: from a
// linear sequential array (srt_lsa_array) attached below, or, when none is
// attached (L = N), as the constants 0, 0 and the +1 completion bit of q = +1.
// This register placement at the seam is the one the source design derives
// for attaching the array; the per-bit structure is its conventional module.
//
// Timing: one step per clock when en = 1; load takes the initial residual
// (the dividend shifted left, carries zero).  Position p is index p of the
// vectors.
module srt_conv_residual
  import srt_pkg::*;
#(
  parameter int L = 20                // seam position, first bit not stored
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           en,
  input  logic [L-1:4]   init_s,      // bits of 2*dividend at positions 4..L-1
  input  qdigit_t        q,           // q_{j+1}, broadcast
  input  logic [L:4]     d,           // divisor bits d_4..d_L
  input  logic           seam_s,      // s_L of 2w[j]
  input  logic           seam_cm1,    // c_{L-1} of 2w[j]
  input  logic           seam_c,      // c_L of 2w[j]
  output logic [L-1:4]   s_q,
  output logic [L-2:4]   c_q
);

  logic [L:4]   s_all, c_all, dd;
  logic [L-1:4] s_nxt;
  logic [L-2:4] c_nxt;

  always_comb begin
    s_all = {seam_s, s_q};               // index = position
    c_all = {seam_c, seam_cm1, c_q};
    for (int p = 4; p <= L; p++) dd[p] = d_term(q, d[p]);
    for (int p = 4; p <= L - 1; p++)
      s_nxt[p] = fa_sum(s_all[p+1], c_all[p+1], dd[p+1]);
    for (int p = 4; p <= L - 2; p++)
      c_nxt[p] = fa_carry(s_all[p+2], c_all[p+2], dd[p+2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
    end else if (load) begin
      s_q <= init_s;
      c_q <= '0;
    end else if (en) begin
      s_q <= s_nxt;
      c_q <= c_nxt;
    end
  end

endmodule
