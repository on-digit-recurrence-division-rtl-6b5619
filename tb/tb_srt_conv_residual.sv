// tb_srt_conv_residual: checks the conventional carry-save residual bits.
//
// After a load, random digits and random seam bits are applied for many
// steps.  Each step must conserve value: with all quantities in units of
// 2^-L,
//   sum_{p=4..L} (s_p + c_p + D_p) 2^(L-p)
//     = (s_4 + c_4 + D_4 + u_4) 2^(L-4) + sum_p (s'_p + c'_p) 2^(L-1-p)
// where u_4 is the carry out of position 5 (taken by the top slice) and s', c'
// the registers after the clock.  The sum bit of position 5 must land in s'_4,
// and load must give the initial sum bits with zero carries.
module tb_srt_conv_residual;
  import srt_pkg::*;

  localparam int L = 20;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [L-1:4] init_s = '0;
  qdigit_t      q = Q_ZERO;
  logic [L:4]   d = '0;
  logic         seam_s = 1'b0, seam_cm1 = 1'b0, seam_c = 1'b0;
  logic [L-1:4] s_q;
  logic [L-2:4] c_q;

  srt_conv_residual #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int b2i(logic b);
    return b ? 1 : 0;
  endfunction

  function automatic logic dbit(qdigit_t qq, logic di);
    if (!qq.m) return 1'b0;
    return qq.s ? di : ~di;
  endfunction

  initial begin
    longint t_before, t_after;
    logic u4, sum5;
    logic [L:4] sa, ca;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      init_s = (L-4)'({$urandom, $urandom});
      d      = {1'b1, (L-4)'($urandom)};
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      checks++;
      if (s_q != init_s || c_q != '0) begin failures++; $display("FAIL load"); end
      en = 1'b1;
      for (int step = 0; step < 40; step++) begin
        case ($urandom % 3) 0: q = Q_POS; 1: q = Q_ZERO; default: q = Q_NEG; endcase
        {seam_s, seam_cm1, seam_c} = 3'($urandom);
        #1;
        sa = {seam_s, s_q};
        ca = {seam_c, seam_cm1, c_q};
        t_before = 0;
        for (int p = 4; p <= L; p++)
          t_before += longint'(int'(b2i(sa[p]) + b2i(ca[p]) + b2i(dbit(q, d[p])))) << (L - p);
        u4   = (sa[5] & ca[5]) | (sa[5] & dbit(q, d[5])) | (ca[5] & dbit(q, d[5]));
        sum5 = sa[5] ^ ca[5] ^ dbit(q, d[5]);
        t_before -= longint'(int'(b2i(sa[4]) + b2i(ca[4]) + b2i(dbit(q, d[4])) + b2i(u4))) << (L - 4);
        @(negedge clk);
        t_after = 0;
        for (int p = 4; p <= L - 1; p++) t_after += longint'(b2i(s_q[p])) << (L - 1 - p);
        for (int p = 4; p <= L - 2; p++) t_after += longint'(b2i(c_q[p])) << (L - 1 - p);
        checks++;
        if (t_after != t_before) begin
          failures++;
          $display("FAIL value %0d vs %0d", t_after, t_before);
        end
        checks++;
        if (s_q[4] != sum5) begin failures++; $display("FAIL s4"); end
      end
      en = 1'b0;
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
