// tb_srt_lsa_array: checks the linear sequential array against a plain
// carry-save model of the same residual positions.
//
// The reference keeps every sum and carry bit of positions L-1..N for the
// current step and applies the digit to all of them at once (the textbook
// broadcast form): s'_p = s_{p+1} ^ c_{p+1} ^ D_{p+1},
// c'_p = carry(s_{p+2}, c_{p+2}, D_{p+2}), with the completion bit of q = +1
// at c_N.  After a load with a random dividend, random digits are fed in;
// on every clock the array's seam bits (s_L, c_{L-1}, c_L) must equal the
// reference's bits of the same step, even though the array computes its low
// positions up to K steps later.
module tb_srt_lsa_array;
  import srt_pkg::*;

  localparam int L = 20, K = 3, N = L + 4 * K;

  logic           clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [N-1:0]   tx = '0;
  qdigit_t        q_in = Q_ZERO;
  logic [N:L+1]   d = '0;
  logic           seam_s, seam_cm1, seam_c;

  srt_lsa_array #(.L(L), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_nonzero = 0;

  logic [N:L-1] rs, rc;                      // reference, index = position

  function automatic logic dbit(qdigit_t qq, logic di);
    if (!qq.m) return 1'b0;
    return qq.s ? di : ~di;
  endfunction

  task automatic ref_step(qdigit_t qq);
    logic [N:L-1] ns, nc;
    logic [N+2:L-1] s_ext, c_ext, d_ext;
    s_ext = {2'b00, rs};
    c_ext = {2'b00, rc};
    d_ext = '0;
    c_ext[N] = qq.m & ~qq.s;
    for (int p = L + 1; p <= N; p++) d_ext[p] = dbit(qq, d[p]);
    ns = '0; nc = '0;
    for (int p = L; p <= N - 1; p++)
      ns[p] = s_ext[p+1] ^ c_ext[p+1] ^ d_ext[p+1];
    for (int p = L - 1; p <= N - 2; p++)
      nc[p] = (s_ext[p+2] & c_ext[p+2]) | (s_ext[p+2] & d_ext[p+2]) |
              (c_ext[p+2] & d_ext[p+2]);
    rs = ns;
    rc = nc;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 30; run++) begin
      tx   = N'({$urandom, $urandom});
      d    = {1'b1, (N-L-1)'($urandom)};
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      en   = 1'b1;
      rs = '0; rc = '0;
      for (int p = L; p <= N - 1; p++) rs[p] = tx[p];
      for (int step = 0; step < 40; step++) begin
        case ($urandom % 3) 0: q_in = Q_POS; 1: q_in = Q_ZERO; default: q_in = Q_NEG; endcase
        #1;
        checks++;
        if ({seam_s, seam_cm1, seam_c} != {rs[L], rc[L-1], rc[L]}) begin
          failures++;
          if (failures < 10)
            $display("FAIL run %0d step %0d: seam %b%b%b expected %b%b%b", run, step,
                     seam_s, seam_cm1, seam_c, rs[L], rc[L-1], rc[L]);
        end
        if (seam_s | seam_cm1 | seam_c) n_nonzero++;
        @(negedge clk);
        ref_step(q_in);
      end
      en = 1'b0;
    end
    checks++;
    if (n_nonzero == 0) begin failures++; $display("FAIL seam never active"); end
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
