// tb_srt_quotient_acc: checks the signed-digit quotient accumulator.
//
// Random digit strings of length M are shifted in after a clear; the result
// must equal sum q_i 2^(M-i), computed here with a plain integer sum, and a
// clear must return the output to zero.
module tb_srt_quotient_acc;
  import srt_pkg::*;

  localparam int M = 32;

  logic                clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  qdigit_t             q = Q_ZERO;
  logic signed [M+1:0] quotient;

  srt_quotient_acc #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    longint expect_q;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 200; run++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      checks++;
      if (quotient != 0) begin failures++; $display("FAIL clear"); end
      en = 1'b1;
      expect_q = 0;
      for (int i = 1; i <= M; i++) begin
        v = (run == 0) ? 1 : (run == 1) ? -1 : int'($urandom % 3) - 1;
        q = (v == 1) ? Q_POS : (v == 0) ? Q_ZERO : Q_NEG;
        expect_q = expect_q * 2 + longint'(v);
        @(negedge clk);
      end
      en = 1'b0;
      @(negedge clk);
      checks++;
      if (longint'(quotient) != expect_q) begin
        failures++;
        $display("FAIL run %0d: %0d expected %0d", run, quotient, expect_q);
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
