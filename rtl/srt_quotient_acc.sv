// srt_quotient_acc: collects the signed-digit quotient q = sum q_i 2^-i and
// presents it in two's complement.
//
// The positive and negative digits are shifted into two M-bit registers,
// most significant digit first; the quotient is their difference, formed by
// one subtractor at the output.  Only the digit set and the sum are given by
// the source design; this two-register form is the simplest conversion.
//
// Interface: clear empties both registers; each clock with en = 1 appends
// one digit.  After M digits, quotient = q * 2^M, in [-2^M, 2^M].
module srt_quotient_acc
  import srt_pkg::*;
#(
  parameter int M = 32                  // number of quotient digits
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  qdigit_t             q,
  output logic signed [M+1:0] quotient
);

  logic [M-1:0] qp_q, qn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qp_q <= '0;
      qn_q <= '0;
    end else if (clear) begin
      qp_q <= '0;
      qn_q <= '0;
    end else if (en) begin
      qp_q <= {qp_q[M-2:0], q.m & ~q.s};
      qn_q <= {qn_q[M-2:0], q.m &  q.s};
    end
  end

  assign quotient = signed'({2'b00, qp_q}) - signed'({2'b00, qn_q});

endmodule
