// tb_fbs_mac: self-checking test of the complex multiply-accumulate unit: random dot
// products of 1 to 8 terms, with and without conjugation of the first operand, against
// real arithmetic; the result must appear one cycle after the last term.
module tb_fbs_mac;
  import jste_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, conj_a = 0;
  cfp_t op_a, op_b, acc;
  int checks = 0, failures = 0;

  fbs_mac dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp_t rnd();
    return fp_from_fix(24'(int'($urandom_range(0, 60000)) - 30000), 15);
  endfunction

  initial begin
    real er, ei, ar, ai, br, bi, tol;
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      n = $urandom_range(1, 8);
      conj_a = 1'(t % 2);
      er = 0; ei = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        clr = (k == 0); en = 1;
        op_a.re = rnd(); op_a.im = rnd(); op_b.re = rnd(); op_b.im = rnd();
        ar = fp_real(op_a.re); ai = conj_a ? -fp_real(op_a.im) : fp_real(op_a.im);
        br = fp_real(op_b.re); bi = fp_real(op_b.im);
        er += ar * br - ai * bi;
        ei += ar * bi + ai * br;
      end
      @(negedge clk); en = 0; clr = 0;
      tol = 1e-3;
      checks += 2;
      if (fp_real(acc.re) - er > tol || er - fp_real(acc.re) > tol) begin
        failures++; $display("FAIL re got %f exp %f", fp_real(acc.re), er);
      end
      if (fp_real(acc.im) - ei > tol || ei - fp_real(acc.im) > tol) begin
        failures++; $display("FAIL im got %f exp %f", fp_real(acc.im), ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
