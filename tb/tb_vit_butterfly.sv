// tb_vit_butterfly: self-checking test of the five-cycle add-compare-select butterfly.
// Random metrics, z and ww values are applied; the new metrics and survivor bits are
// compared with a direct computation, and the five-cycle latency is checked.
module tb_vit_butterfly;
  localparam int VW = 16, MW = 24;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [VW-1:0] z = 0, ww0 = 0, ww1 = 0;
  logic signed [MW-1:0] metr0 = 0, metr8 = 0, metr_out0, metr_out1;
  logic done, surv0, surv1;
  int checks = 0, failures = 0;

  vit_butterfly #(.VW(VW), .MW(MW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e00, e01, e10, e11, x0, x1, cyc;
    logic es0, es1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      z = VW'($urandom); ww0 = VW'($urandom); ww1 = VW'($urandom);
      metr0 = MW'(int'($urandom_range(0, 2000000)) - 1000000);
      metr8 = MW'(int'($urandom_range(0, 2000000)) - 1000000);
      e00 = int'(metr0) - (int'(z) - int'(ww0));
      e01 = int'(metr0) + (int'(z) - int'(ww0));
      e10 = int'(metr8) - (int'(z) - int'(ww1));
      e11 = int'(metr8) + (int'(z) - int'(ww1));
      es0 = e10 > e00; es1 = e11 > e01;
      x0 = es0 ? e10 : e00; x1 = es1 ? e11 : e01;
      start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (cyc != 5) begin failures++; $display("FAIL latency %0d", cyc); end
      if (int'(metr_out0) != x0 || int'(metr_out1) != x1) begin
        failures++; $display("FAIL metrics %0d %0d exp %0d %0d", metr_out0, metr_out1, x0, x1);
      end
      if (surv0 != es0 || surv1 != es1) begin failures++; $display("FAIL survivors"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
