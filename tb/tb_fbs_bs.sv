// tb_fbs_bs: self-checking test of the back-substitution unit: (x - s) / d and x * d with
// random complex floats x, s and a random real d, against real arithmetic.
module tb_fbs_bs;
  import jste_pkg::*;
  logic op;
  cfp_t x, s, res;
  fp_t d;
  int checks = 0, failures = 0;

  fbs_bs dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp_t rnd();
    return fp_from_fix(24'(int'($urandom_range(0, 60000)) - 30000), 11 + $urandom_range(0, 4));
  endfunction

  function automatic void chk(input string w, input real got, input real e);
    real tol;
    tol = 1e-4 * (1.0 + (e < 0 ? -e : e));
    checks++;
    if (got - e > tol || e - got > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", w, got, e);
    end
  endfunction

  initial begin
    real er, ei, dv;
    for (int t = 0; t < 400; t++) begin
      x.re = rnd(); x.im = rnd(); s.re = rnd(); s.im = rnd();
      d = fp_from_fix(24'($urandom_range(8000, 40000)), 15);
      op = 1'(t % 2);
      #1;
      dv = fp_real(d);
      if (op) begin
        er = fp_real(x.re) * dv; ei = fp_real(x.im) * dv;
      end else begin
        er = (fp_real(x.re) - fp_real(s.re)) / dv; ei = (fp_real(x.im) - fp_real(s.im)) / dv;
      end
      chk("re", fp_real(res.re), er);
      chk("im", fp_real(res.im), ei);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
