// tb_srt_msb_slice: exhaustive check of the bit-reduced top residual slice.
//
// For every digit q_{j+1}, every stored top state (w0 w1 c1 s2 s3), the
// carry-save bits s4 c4 s5 c5 and divisor bits d2..d5 that describe a legal
// residual (|2w[j]| <= 2d, consistent with the digit that was selected), the
// slice's outputs are checked by value, in units of 1/16 of 2w[j+1]:
//   y'*16 + 8*c1'' + 4*s2'' + 2*s3''  ==  A - sum5
// where A is the exact sum of all terms of w[j+1] at positions -1..5 and
// sum5 the sum bit left at position 5 for the lower slice; y' is decoded
// from (q_{j+2}, w0'', w1'') by the window rule; q_{j+2} must equal the SRT
// selection of y'; and the carry part must stay below 1 (c1'' s2'' s3'' <= 6).
module tb_srt_msb_slice;
  import srt_pkg::*;

  qdigit_t    q, q_n;
  logic       w0, w1, c1, s2, s3, s4, c4, s5, c5;
  logic [5:2] d;
  logic       w0_n, w1_n, c1_n, s2_n, s3_n;
  logic [1:0] f_code;

  srt_msb_slice dut (.*);

  int checks = 0, failures = 0, legal = 0;


  function automatic int b2i(logic b);
    return b ? 1 : 0;
  endfunction

  // y (units of 1/2) from a digit and the two stored bits
  function automatic int decode_y(int qv, logic b0, logic b1);
    int m;
    m = 2 * b2i(b0) + b2i(b1);                    // y mod 4 in half units
    if (qv == 1) return m;              // [0, 3]
    if (qv == 0) return -1;
    return (m == 3) ? -5 : m - 4;       // [-5, -2]
  endfunction

  initial begin
    for (int qv = -1; qv <= 1; qv++)
    for (int st = 0; st < 512; st++)
    for (int dv = 0; dv < 16; dv++) begin
      int y, r0, dtop, two_w, a, dval, sum5, yn, lhs;
      logic b5;
      q  = (qv == 1) ? Q_POS : (qv == 0) ? Q_ZERO : Q_NEG;
      {w0, w1, c1, s2, s3, s4, c4, s5, c5} = 9'(st);
      d = 4'(dv);
      y = decode_y(qv, w0, w1);
      if (y != 2 * b2i(w0) + b2i(w1) - (qv == 1 ? 0 : 4) && !(qv == -1 && w0 && w1)) continue;
      if (qv == 0 && !(w0 && w1)) continue;
      if (qv == 1 && y < 0) continue;
      // legal state: 2w = y/2 + rest, rest < 1, |2w| <= 2d (in 1/32 units)
      if (4 * b2i(c1) + 2 * b2i(s2) + b2i(s3) > 6) continue;
      r0   = 16 * b2i(c1) + 8 * b2i(s2) + 4 * b2i(s3) + 2 * (b2i(s4) + b2i(c4)) + b2i(s5) + b2i(c5);
      dtop = 16 + 8 * b2i(d[2]) + 4 * b2i(d[3]) + 2 * b2i(d[4]) + b2i(d[5]);
      two_w = 16 * y + r0;
      if (two_w > 2 * dtop || two_w + 2 < -2 * dtop) continue;
      legal++;
      #1;
      dval = (qv == 1) ? -dtop - 1 : (qv == -1) ? dtop : 0;
      a    = two_w + dval;                             // w[j+1] in 1/32
      b5   = (qv == 1) ? ~d[5] : (qv == -1) ? d[5] : 1'b0;
      sum5 = b2i(s5 ^ c5 ^ b5);
      yn   = decode_y(digit_value(q_n), w0_n, w1_n);
      lhs  = 8 * yn + 8 * b2i(c1_n) + 4 * b2i(s2_n) + 2 * b2i(s3_n);
      checks++;
      if (lhs != a - sum5) begin
        failures++;
        if (failures < 10) $display("FAIL value q=%0d st=%h d=%h: %0d vs %0d", qv, st, dv, lhs, a - sum5);
      end
      checks++;
      if (q_n != select_digit(4'(yn))) begin
        failures++;
        if (failures < 10) $display("FAIL select q=%0d st=%h d=%h y'=%0d", qv, st, dv, yn);
      end
      checks++;
      if (4 * b2i(c1_n) + 2 * b2i(s2_n) + b2i(s3_n) > 6) begin
        failures++;
        if (failures < 10) $display("FAIL carry part too large");
      end
    end
    $display("legal states: %0d", legal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
