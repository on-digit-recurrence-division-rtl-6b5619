// tb_srt_divider: end-to-end test of the SRT divider at its default size
// (N = 32 with three LSA modules, 32 quotient digits).
//
// Random and corner-case operands are divided; each result is checked
// against the SRT error bound |x/d - q| <= 2^-ITER, evaluated exactly in
// 128-bit integers as |X*2^ITER - Q*D| <= D, and the latency from start to
// done is checked to be ITER clocks.  The test also counts how often each
// mechanism of the design occurs and fails if one never does: each digit
// value, each F1F2 code of the top slice, the +1 completion bit, the LSA
// start-up feed of low dividend bits, negative dividends, a start ignored
// while busy and a back-to-back start on the done cycle.
module tb_srt_divider;
  import srt_pkg::*;

  localparam int N    = 32;
  localparam int ITER = 32;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   start = 1'b0;
  logic signed [N:0]      dividend = '0;
  logic        [N-1:0]    divisor = '0;
  logic                   busy, done;
  logic signed [ITER+1:0] quotient;

  srt_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pos = 0, n_zero = 0, n_neg = 0, n_ulp = 0, n_feed = 0;
  int n_f[4] = '{0, 0, 0, 0};
  int n_negx = 0, n_ignored = 0, n_b2b = 0;

  // mechanism monitors
  always @(posedge clk) if (busy) begin
    case (digit_value(dut.q_q))
      1: n_pos++;
      0: n_zero++;
      default: n_neg++;
    endcase
    n_f[dut.u_msb.f_code]++;
    if (dut.g_lsa.u_lsa.up_c[3]) n_ulp++;
    if (dut.g_lsa.u_lsa.feed_q[0]) n_feed++;
  end

  function automatic void check_result(logic signed [N:0] x, logic [N-1:0] d,
                                       logic signed [ITER+1:0] q);
    logic signed [127:0] lhs, dd;
    lhs = (128'(x) <<< ITER) - 128'(q) * $signed({96'd0, d});
    if (lhs < 0) lhs = -lhs;
    dd = $signed({96'd0, d});
    checks++;
    if (lhs > dd) begin
      failures++;
      $display("FAIL x=%0d d=%0d q=%0d", x, d, q);
    end
  endfunction

  // Runs one division; optionally pokes start while busy and/or issues the
  // next start on the done cycle (returns with start still high then).
  task automatic divide(input logic signed [N:0] x, input logic [N-1:0] d,
                        input bit poke, output logic signed [ITER+1:0] q);
    int cyc;
    // stimulus changes on the falling edge, away from the sampling edge
    @(negedge clk);
    dividend = x;
    divisor  = d;
    start    = 1'b1;
    @(negedge clk);
    start    = 1'b0;
    cyc = 1;
    while (!done && cyc < 3 * ITER) begin
      if (poke && cyc == 5) begin
        start    = 1'b1;             // must be ignored: divider is busy
        dividend = '0;
        divisor  = {1'b1, {(N-1){1'b0}}};
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != ITER + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, ITER + 1);
    end
    q = quotient;
    check_result(x, d, q);
    if (x < 0) n_negx++;
  endtask

  function automatic logic [N-1:0] rand_div();
    return {1'b1, (N-1)'($urandom)};
  endfunction

  function automatic logic signed [N:0] rand_x(logic [N-1:0] d);
    logic [N-1:0] m;
    m = N'($urandom) % d;
    return ($urandom % 2 == 1) ? -$signed({1'b0, m}) : $signed({1'b0, m});
  endfunction

  logic signed [ITER+1:0] q;
  logic [N-1:0] d;
  logic signed [N:0] x;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // corner cases
    divide(0, {1'b1, {(N-1){1'b0}}}, 0, q);
    divide($signed({2'b00, {(N-1){1'b1}}}), {1'b1, {(N-1){1'b0}}}, 0, q);
    divide(-$signed({2'b00, {(N-1){1'b1}}}), {1'b1, {(N-1){1'b0}}}, 0, q);
    divide($signed({1'b0, {(N-1){1'b1}}, 1'b0}), {N{1'b1}}, 0, q);
    divide(-$signed({1'b0, {(N-1){1'b1}}, 1'b0}), {N{1'b1}}, 0, q);
    // x = d/2 exactly: quotient must be exactly 1/2 within the bound
    divide($signed({2'b00, 1'b1, {(N-2){1'b0}}}), {1'b1, {(N-1){1'b0}}}, 0, q);
    // start ignored while busy
    d = rand_div(); x = rand_x(d);
    divide(x, d, 1, q);
    // random operands
    for (int i = 0; i < 300; i++) begin
      d = rand_div(); x = rand_x(d);
      divide(x, d, 0, q);
    end
    // back-to-back: the next start is given in the cycle done is high
    d = rand_div(); x = rand_x(d);
    @(negedge clk);
    dividend = x; divisor = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check_result(x, d, quotient);
    d = rand_div(); x = rand_x(d);
    dividend = x; divisor = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) begin failures++; $display("FAIL back-to-back start not taken"); end
    else n_b2b++;
    while (!done) @(negedge clk);
    check_result(x, d, quotient);

    // every mechanism must have occurred
    foreach (n_f[k]) begin
      checks++;
      if (n_f[k] == 0) begin failures++; $display("FAIL F1F2 code %0d never seen", k); end
    end
    checks++; if (n_pos == 0 || n_zero == 0 || n_neg == 0) begin
      failures++; $display("FAIL digit values not all seen"); end
    checks++; if (n_ulp == 0)     begin failures++; $display("FAIL no completion bit"); end
    checks++; if (n_feed == 0)    begin failures++; $display("FAIL no LSA feed"); end
    checks++; if (n_negx == 0)    begin failures++; $display("FAIL no negative dividend"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back start"); end
    $display("digits +1=%0d 0=%0d -1=%0d  F=%0d/%0d/%0d/%0d  ulp=%0d feed=%0d neg=%0d ignored=%0d b2b=%0d",
             n_pos, n_zero, n_neg, n_f[0], n_f[1], n_f[2], n_f[3], n_ulp, n_feed,
             n_negx, n_ignored, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
