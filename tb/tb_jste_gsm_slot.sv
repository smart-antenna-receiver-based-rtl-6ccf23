// tb_jste_gsm_slot: one GSM normal burst through the JSTE receiver at its default sizes, with
// the time the burst takes.
//
// Scenario: 156 symbol slots (one GSM time slot), of which the first 26 carry known training
// symbols (the length of a GSM training sequence) and the remaining 130 run decision-directed.
// The array geometry, channel and interferer are those of tb_jste_chip: a 3-tap channel from
// 20 degrees, an equal-power co-channel interferer from -40 degrees and a little white noise.
// Training is placed at the start of the burst rather than in the middle, so that one
// forward pass covers the burst. Starting from delta*I and h = e0, 26 training slots are
// not enough for the estimates to settle at lambda = 0.9 (about 34 are needed: the
// Cholesky update lags the samples by L slots). The buffered training part is therefore
// first run once on its own (pass 0), and then the trellis is cleared and the whole burst
// is processed (pass 1), again with the first 26 symbols as training.
//
// Checks: every slot of both passes completes and leaves a unit-norm channel estimate; in
// pass 1, after training, at most MAXERR of the decided bits differ from the transmitted
// ones; 156 bits are streamed by the traceback. The testbench prints the clock cycles of the whole burst and the time this
// means at 70 MHz (pass 1 only), for comparison with a 577 us GSM slot.
module tb_jste_gsm_slot;
  import jste_pkg::*;
  localparam int M = 4, L = 5, NT = 26, T = 156, MAXERR = 3;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, init = 0, burst_start = 0, sym_valid = 0;
  logic training = 1, x_train = 0, tb_start = 0;
  logic signed [15:0] y_re [M], y_im [M];
  logic busy, sym_done, bit_valid, bit_out, tb_done;
  cfp_t h_out [L], w_out [M], z_out;
  logic [L-1:0] xhat;
  logic [7:0] nsym;
  int checks = 0, failures = 0;

  jste_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [-2*L:T];
    int it [-2*L:T];
    real c [3];
    real ar [M], ai [M], br [M], bi [M];
    real sr, si, nrm, yr, yi;
    int cyc, errs, nbits, cmp;
    longint total;
    logic got [T];
    c[0] = 1.0; c[1] = 0.6; c[2] = 0.3;
    for (int m = 0; m < M; m++) begin
      ar[m] = $cos(PI * m * $sin(20.0 * PI / 180.0));
      ai[m] = $sin(PI * m * $sin(20.0 * PI / 180.0));
      br[m] = $cos(PI * m * $sin(-40.0 * PI / 180.0));
      bi[m] = $sin(PI * m * $sin(-40.0 * PI / 180.0));
    end
    for (int n = -2 * L; n <= T; n++) begin
      x[n]  = $urandom_range(0, 1) ? 1 : -1;
      it[n] = $urandom_range(0, 1) ? 1 : -1;
    end
    for (int m = 0; m < M; m++) begin y_re[m] = 0; y_im[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    while (busy) @(negedge clk);
    // pass 0: the buffered training part only; pass 1: the whole burst
    for (int pass = 0; pass < 2; pass++)
    for (int n = 0; n < (pass == 0 ? NT : T); n++) begin
      if (n == 0) begin
        @(negedge clk); burst_start = 1; @(negedge clk); burst_start = 0;
        total = 0;
      end
      sr = 0;
      for (int l = 0; l < 3; l++) sr += c[l] * x[n - l];
      for (int m = 0; m < M; m++) begin
        yr = 0.2 * sr * ar[m] + 0.3 * it[n] * br[m] + 0.01 * (real'($urandom_range(0, 200)) - 100.0) / 100.0;
        yi = 0.2 * sr * ai[m] + 0.3 * it[n] * bi[m] + 0.01 * (real'($urandom_range(0, 200)) - 100.0) / 100.0;
        y_re[m] = 16'(int'(yr * 32768.0));
        y_im[m] = 16'(int'(yi * 32768.0));
      end
      training = (n < NT);
      x_train  = (x[n] > 0);
      @(negedge clk); sym_valid = 1; @(negedge clk); sym_valid = 0;
      cyc = 1;
      while (!sym_done) begin @(negedge clk); cyc++; end
      total += cyc + 1;
      nrm = 0;
      for (int l = 0; l < L; l++)
        nrm += fp_real(h_out[l].re) ** 2 + fp_real(h_out[l].im) ** 2;
      checks++;
      if (nrm < 0.98 || nrm > 1.02) begin
        failures++;
        $display("FAIL slot %0d: |h|^2 = %f", n, nrm);
      end
      if (n % 20 == 0)
        $display("slot %0d: %0d cycles, h = %f%s%fj %f %f", n, cyc, fp_real(h_out[0].re),
                 "/", fp_real(h_out[0].im), fp_real(h_out[1].re), fp_real(h_out[2].re));
    end
    @(negedge clk); tb_start = 1; @(negedge clk); tb_start = 0;
    nbits = 0; errs = 0; cmp = 0;
    while (!tb_done) begin
      @(posedge clk); #1;
      if (bit_valid) begin
        got[nbits] = bit_out;
        // step t carries the matched-filter sample of symbol t - (L - 1)
        if (nbits >= NT && nbits < T - (L - 1)) begin
          cmp++;
          if ((bit_out ? 1 : -1) != x[nbits - (L - 1)]) begin
            errs++;
            $display("bit %0d wrong", nbits);
          end
        end
        nbits++;
      end
    end
    checks++;
    if (nbits != T) begin failures++; $display("FAIL %0d bits streamed", nbits); end
    checks++;
    if (errs > MAXERR) begin failures++; $display("FAIL %0d bit errors of %0d", errs, cmp); end
    $display("bit errors %0d of %0d compared", errs, cmp);
    $display("burst of %0d slots: %0d cycles, %f us at 70 MHz", T, total, real'(total) / 70.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
