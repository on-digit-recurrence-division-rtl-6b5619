// tb_srt_lsa_module: checks one linear sequential array module.
//
// Random digits and random bits from the module below are applied for many
// steps after a load.  Every step is checked by value, in units of the
// weight of position B+4:
//   sum_{t=1..4} (s_t + c_t + D_t) 2^(4-t)
//     = 16 c_{B-1} + 8 (s_B + c_B) + 4 (s'_1 + c'_1) + 2 (s'_2 + c'_2) + s'_3
// where s_4, c_3, c_4 are the bits from below, D_1, D_2 the stored digit
// terms, D_3, D_4 formed from the module's own digit, the left side read
// before and the right side after the clock.  The stored digit terms must
// come from the digit that arrived from above one step earlier, and that
// digit must reappear on q_out one clock later.
module tb_srt_lsa_module;
  import srt_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [3:1] init_s = '0;
  qdigit_t    q_in = Q_ZERO;
  logic [4:1] d = '0;
  logic       dn_s = 1'b0, dn_cm1 = 1'b0, dn_c = 1'b0;
  logic       up_s, up_cm1, up_c;
  qdigit_t    q_out;

  srt_lsa_module dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int b2i(logic b);
    return b ? 1 : 0;
  endfunction

  function automatic int dbit(qdigit_t qq, logic di);
    logic b;
    if (!qq.m) return 0;
    b = qq.s ? di : !di;
    return b ? 1 : 0;
  endfunction

  initial begin
    int lhs, rhs;
    qdigit_t qown, qprev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 50; run++) begin
      init_s = 3'($urandom);
      d      = 4'($urandom);
      load   = 1'b1;
      @(negedge clk);
      load   = 1'b0;
      en     = 1'b1;
      checks++;
      if (dut.s_q != init_s || dut.c_q != 0 || q_out != Q_ZERO) begin
        failures++; $display("FAIL load");
      end
      qown = Q_ZERO;
      for (int step = 0; step < 30; step++) begin
        case ($urandom % 3) 0: q_in = Q_POS; 1: q_in = Q_ZERO; default: q_in = Q_NEG; endcase
        {dn_s, dn_cm1, dn_c} = 3'($urandom);
        #1;
        lhs = 8 * (b2i(dut.s_q[1]) + b2i(dut.c_q[1]) + b2i(dut.dl_q[1]))
            + 4 * (b2i(dut.s_q[2]) + b2i(dut.c_q[2]) + b2i(dut.dl_q[2]))
            + 2 * (b2i(dut.s_q[3]) + b2i(dn_cm1) + dbit(qown, d[3]))
            +     (b2i(dn_s) + b2i(dn_c) + dbit(qown, d[4]));
        rhs = 16 * b2i(up_cm1) + 8 * (b2i(up_s) + b2i(up_c));
        qprev = q_in;
        @(negedge clk);
        rhs += 4 * (b2i(dut.s_q[1]) + b2i(dut.c_q[1])) + 2 * (b2i(dut.s_q[2]) + b2i(dut.c_q[2])) + b2i(dut.s_q[3]);
        checks++;
        if (lhs != rhs) begin
          failures++;
          if (failures < 10) $display("FAIL value %0d vs %0d", rhs, lhs);
        end
        checks++;
        if (int'(dut.dl_q[1]) != dbit(qprev, d[1]) || int'(dut.dl_q[2]) != dbit(qprev, d[2])) begin
          failures++; $display("FAIL stored D");
        end
        checks++;
        if (q_out != qprev) begin failures++; $display("FAIL q_out"); end
        qown = qprev;
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
