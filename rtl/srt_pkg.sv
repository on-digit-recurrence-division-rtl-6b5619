// srt_pkg: types and small functions shared by the radix-2 SRT divider.
//
// Quotient digits q in {-1, 0, +1} are carried as a sign bit and a magnitude
// bit, the two signals the selection logic is built around (q^s and q^m).
// The residual is updated as w[j+1] = 2w[j] - q_{j+1}*d with d in [1/2, 1).
// The subtraction is done by adding the bits D_i of -q*d in two's complement:
// D_i = d_i when q = -1, ~d_i when q = +1 and 0 when q = 0; for q = +1 the
// missing unit in the last place is injected as a carry at the residual LSB.
// Bit positions follow the usual fractional numbering: position p has weight
// 2^-p, position 0 weight 1, position -1 weight 2.
package srt_pkg;

  // Signed-digit quotient digit: s = sign (1 = negative), m = magnitude.
  typedef struct packed {
    logic s;
    logic m;
  } qdigit_t;

  localparam qdigit_t Q_ZERO = '{s: 1'b0, m: 1'b0};
  localparam qdigit_t Q_POS  = '{s: 1'b0, m: 1'b1};
  localparam qdigit_t Q_NEG  = '{s: 1'b1, m: 1'b1};

  // Bit D_i of -q*d for a divisor bit d_i.
  function automatic logic d_term(qdigit_t q, logic di);
    return q.m & (q.s ? di : ~di);
  endfunction

  // Two's complement completion bit: 1 when q = +1 (subtract d).
  function automatic logic ulp_term(qdigit_t q);
    return q.m & ~q.s;
  endfunction

  // Full adder parts used by the carry-save residual.
  function automatic logic fa_sum(logic a, logic b, logic c);
    return a ^ b ^ c;
  endfunction

  function automatic logic fa_carry(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // SRT radix-2 selection from the estimate y of the shifted residual,
  // given in units of 1/2 (y_half = 2*y): +1 for y >= 0, 0 for y = -1/2,
  // -1 for y <= -1.
  function automatic qdigit_t select_digit(logic signed [3:0] y_half);
    if (y_half >= 0)       return Q_POS;
    else if (y_half == -1) return Q_ZERO;
    else                   return Q_NEG;
  endfunction

  // Integer value of a digit, for testbenches and assertions.
  function automatic int digit_value(qdigit_t q);
    return q.m ? (q.s ? -1 : 1) : 0;
  endfunction

endpackage
