// tb_jste_chip: end-to-end test of the JSTE receiver at its default sizes (M = 4, L = 5).
//
// Scenario: a +-1 symbol burst reaches a 4-element half-wavelength array from 20 degrees
// through a 3-tap channel; a co-channel interferer of equal power arrives from -40 degrees
// and a little white noise is added. The first NT slots run in training mode (known symbols),
// the rest decision-directed with the receiver's own decisions. At the end the burst is
// traced back and the decided bits are compared with the transmitted ones.
//
// Checks: every slot completes; after every slot the channel estimate has unit norm; the
// decided bits from the end of training on match (at most MAXERR errors); the number of
// decided bits equals the number of slots. Mechanisms that must each occur at least once:
// training-mode update, decision-directed update, the switch between them, both factor
// banks used for reading, the Cholesky and FBS processors busy at the same time (pipelining)
// and the traceback.
module tb_jste_chip;
  import jste_pkg::*;
  localparam int M = 4, L = 5, NT = 40, T = 120, MAXERR = 3;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, init = 0, burst_start = 0, sym_valid = 0;
  logic training = 1, x_train = 0, tb_start = 0;
  logic signed [15:0] y_re [M], y_im [M];
  logic busy, sym_done, bit_valid, bit_out, tb_done;
  cfp_t h_out [L], w_out [M], z_out;
  logic [L-1:0] xhat;
  logic [7:0] nsym;
  int checks = 0, failures = 0;
  int n_train = 0, n_dd = 0, n_switch = 0, n_bank0 = 0, n_bank1 = 0, n_overlap = 0, n_tb = 0;

  jste_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.u_chol.busy && dut.u_fbs.busy) n_overlap++;

  initial begin
    int x [-2*L:T];
    int it [-2*L:T];
    real c [3];
    real ar [M], ai [M], br [M], bi [M];
    real sr, si, nrm, yr, yi;
    int cyc, errs, nbits, cmp;
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
    @(negedge clk); burst_start = 1; @(negedge clk); burst_start = 0;
    for (int n = 0; n < T; n++) begin
      sr = 0;
      for (int l = 0; l < 3; l++) sr += c[l] * x[n - l];
      for (int m = 0; m < M; m++) begin
        yr = 0.2 * sr * ar[m] + 0.3 * it[n] * br[m] + 0.01 * (real'($urandom_range(0, 200)) - 100.0) / 100.0;
        yi = 0.2 * sr * ai[m] + 0.3 * it[n] * bi[m] + 0.01 * (real'($urandom_range(0, 200)) - 100.0) / 100.0;
        y_re[m] = 16'(int'(yr * 32768.0));
        y_im[m] = 16'(int'(yi * 32768.0));
      end
      if (n == NT) n_switch++;
      training = (n < NT);
      x_train  = (x[n] > 0);
      if (training) n_train++; else n_dd++;
      if (dut.bank) n_bank1++; else n_bank0++;
      @(negedge clk); sym_valid = 1; @(negedge clk); sym_valid = 0;
      cyc = 1;
      while (!sym_done) begin @(negedge clk); cyc++; end
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
    n_tb++;
    checks++;
    if (nbits != T) begin failures++; $display("FAIL %0d bits streamed", nbits); end
    checks++;
    if (errs > MAXERR) begin failures++; $display("FAIL %0d bit errors of %0d", errs, cmp); end
    $display("bit errors %0d of %0d compared", errs, cmp);
    $display("mechanisms: training %0d, decision-directed %0d, switch %0d, bank0 %0d, bank1 %0d, overlap cycles %0d, traceback %0d",
             n_train, n_dd, n_switch, n_bank0, n_bank1, n_overlap, n_tb);
    checks += 7;
    if (n_train == 0) begin failures++; $display("FAIL no training update"); end
    if (n_dd == 0) begin failures++; $display("FAIL no decision-directed update"); end
    if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    if (n_bank0 == 0) begin failures++; $display("FAIL bank 0 never read"); end
    if (n_bank1 == 0) begin failures++; $display("FAIL bank 1 never read"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no pipelined overlap"); end
    if (n_tb == 0) begin failures++; $display("FAIL no traceback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
