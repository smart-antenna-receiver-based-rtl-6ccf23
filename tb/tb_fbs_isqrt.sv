// tb_fbs_isqrt: self-checking test of the inverse square root unit. Inputs spanning the
// whole exponent range of the float format (random mantissas) are applied and the result is
// compared with 1/sqrt(x) computed in real arithmetic (relative tolerance 2^-12).
module tb_fbs_isqrt;
  import jste_pkg::*;
  fp_t x, res;
  int checks = 0, failures = 0;

  fbs_isqrt dut (.x, .res);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv, exp_v, got;
    for (int e = 2; e < 32; e++)
      for (int t = 0; t < 40; t++) begin
        x.m = 16'(16384 + $urandom_range(0, 16383));
        x.e = 5'(e);
        #1;
        xv = fp_real(x);
        exp_v = 1.0 / $sqrt(xv);
        got = fp_real(res);
        checks++;
        if (got - exp_v > exp_v / 4096.0 || exp_v - got > exp_v / 4096.0) begin
          failures++;
          if (failures < 10) $display("FAIL x=%g got %g exp %g (m=%0d e=%0d)", xv, got, exp_v, res.m, res.e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
