// tb_srt_divider_configs: runs the divider in the configurations the design
// is meant for, side by side on the same operands:
//   sp   : N = 24, no LSA           (single-precision mantissa divider)
//   base : N = 20, no LSA           (the design before extension)
//   ext  : N = 32, three LSA modules (extended by the array)
//   flat : N = 32, no LSA           (same precision, digit broadcast)
// Every result is checked against the bound |X*2^ITER - Q*D| <= D and the
// latency against ITER clocks.  ext and flat must produce identical
// quotients, since the array computes exactly the same residual bits, only
// later.  Operands are random 32-bit values with |x| < d, truncated for the
// narrower configurations.
module tb_srt_divider_configs;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic signed [32:0] x32;
  logic        [31:0] d32;

  logic signed [24:0] x_sp;  logic [23:0] d_sp;
  logic signed [20:0] x_bs;  logic [19:0] d_bs;
  logic busy_sp, done_sp, busy_bs, done_bs, busy_ex, done_ex, busy_fl, done_fl;
  logic signed [25:0] q_sp;
  logic signed [21:0] q_bs;
  logic signed [33:0] q_ex, q_fl;

  assign x_sp = 25'(x32 >>> 8);   assign d_sp = d32[31:8];
  assign x_bs = 21'(x32 >>> 12);  assign d_bs = d32[31:12];

  srt_divider #(.N(24), .LSA_MODULES(0)) u_sp (.clk, .rst_n, .start,
    .dividend(x_sp), .divisor(d_sp), .busy(busy_sp), .done(done_sp), .quotient(q_sp));
  srt_divider #(.N(20), .LSA_MODULES(0)) u_bs (.clk, .rst_n, .start,
    .dividend(x_bs), .divisor(d_bs), .busy(busy_bs), .done(done_bs), .quotient(q_bs));
  srt_divider #(.N(32), .LSA_MODULES(3)) u_ex (.clk, .rst_n, .start,
    .dividend(x32), .divisor(d32), .busy(busy_ex), .done(done_ex), .quotient(q_ex));
  srt_divider #(.N(32), .LSA_MODULES(0)) u_fl (.clk, .rst_n, .start,
    .dividend(x32), .divisor(d32), .busy(busy_fl), .done(done_fl), .quotient(q_fl));

  int checks = 0, failures = 0;

  function automatic void bound(string tag, int iter, logic signed [127:0] x,
                                logic signed [127:0] d, logic signed [127:0] q);
    logic signed [127:0] e;
    e = (x <<< iter) - q * d;
    if (e < 0) e = -e;
    checks++;
    if (e > d) begin
      failures++;
      $display("FAIL %s x=%0d d=%0d q=%0d", tag, x, d, q);
    end
  endfunction

  initial begin
    int cyc, t_sp, t_bs, t_ex, t_fl;
    logic [31:0] m;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d32 = {1'b1, 31'($urandom)};
      m   = $urandom % {12'd0, d32[31:12]};             // keeps |x| < d in every width
      m   = {m[19:0], 12'($urandom)};
      if (m >= d32) m = d32 - 1;
      x32 = ($urandom % 2 == 1) ? -$signed({1'b0, m}) : $signed({1'b0, m});
      if (x_bs >= 0 ? x_bs >= $signed({1'b0, d_bs}) : -x_bs >= $signed({1'b0, d_bs}))
        x32 = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1; t_sp = 0; t_bs = 0; t_ex = 0; t_fl = 0;
      while (cyc < 40) begin
        if (done_sp && t_sp == 0) t_sp = cyc;
        if (done_bs && t_bs == 0) t_bs = cyc;
        if (done_ex && t_ex == 0) t_ex = cyc;
        if (done_fl && t_fl == 0) t_fl = cyc;
        if (done_ex) begin
          checks++;
          if (q_ex != q_fl) begin
            failures++;
            $display("FAIL ext %0d != flat %0d", q_ex, q_fl);
          end
          bound("ext", 32, 128'(x32), $signed({96'd0, d32}), 128'(q_ex));
          bound("sp", 24, 128'(x_sp), $signed({104'd0, d_sp}), 128'(q_sp));
          bound("base", 20, 128'(x_bs), $signed({108'd0, d_bs}), 128'(q_bs));
        end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (t_sp != 25 || t_bs != 21 || t_ex != 33 || t_fl != 33) begin
        failures++;
        $display("FAIL latency %0d %0d %0d %0d", t_sp, t_bs, t_ex, t_fl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
