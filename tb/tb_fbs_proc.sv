// tb_fbs_proc: self-checking test of the FBS processor.
// A random, well-conditioned lower-triangular factor Lbar (positive real diagonal) is
// written into both banks of the two factor memories. Several runs are started with
// random antenna samples; after each, h, w, z and the Viterbi write bus (z and the ww
// table) are compared with the same algorithm computed in real arithmetic in this
// testbench: inverse power step on Ls, normalisation, w = L^-H U^H h, r = w^H y, matched
// filter, autocorrelation and ww table. The run time is checked against the row schedule.
module tb_fbs_proc;
  import jste_pkg::*;
  localparam int M = 4, L = 5, N = M + L, W = 20, NS = 1 << (L - 1);
  localparam int AW = $clog2(2 * N * N);
  localparam real SC = 32768.0;

  logic clk = 0, rst_n = 0, start = 0, bank_rd = 0;
  logic signed [15:0] y_re [M], y_im [M];
  logic busy, done;
  logic [AW-1:0] lram_addr, waddr = 0;
  logic signed [W-1:0] lram_re, lram_im, wre = 0, wim = 0;
  logic we = 0;
  cfp_t h_out [L], w_out [M], z_out;
  logic vit_we;
  logic [$clog2(NS + 1)-1:0] vit_addr;
  logic signed [15:0] vit_data;
  logic signed [W-1:0] unused_re, unused_im;
  int checks = 0, failures = 0;
  real vit_mem [NS + 1];

  fbs_proc #(.M(M), .L(L)) dut (.*);
  chol_ram #(.W(W), .DEPTH(2 * N * N)) u_re (.clk, .we, .waddr, .wdata(wre),
    .raddr_a(lram_addr), .rdata_a(lram_re), .raddr_b('0), .rdata_b(unused_re));
  chol_ram #(.W(W), .DEPTH(2 * N * N)) u_im (.clk, .we, .waddr, .wdata(wim),
    .raddr_a(lram_addr), .rdata_a(lram_im), .raddr_b('0), .rdata_b(unused_im));

  always #5 clk = ~clk;
  always @(posedge clk) if (vit_we) vit_mem[vit_addr] = real'(vit_data) / 1024.0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endfunction

  real lr [N][N], li [N][N];
  real hr [L], hi [L], rhr [L], rhi [L];

  initial begin
    real vr_ [L], vi_ [L], ur [M], ui [M], wr [M], wi [M], sr [L], si [L], yr [M], yi [M];
    real ar, ai, nrm, s, zr, zi, rr, ri_, ww;
    int cyc;
    for (int n = 0; n < L; n++) begin hr[n] = (n == 0) ? 1.0 : 0.0; hi[n] = 0; rhr[n] = 0; rhi[n] = 0; end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        if (c == r) begin
          lr[r][c] = 0.5 + real'($urandom_range(0, 1000)) / 1000.0;
          li[r][c] = 0.0;
        end else if (c < r) begin
          lr[r][c] = (real'($urandom_range(0, 1000)) - 500.0) / 2000.0;
          li[r][c] = (real'($urandom_range(0, 1000)) - 500.0) / 2000.0;
        end else begin
          lr[r][c] = 0.0; li[r][c] = 0.0;
        end
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          we = 1; waddr = AW'(b * N * N + r * N + c);
          wre = W'(int'(lr[r][c] * SC)); wim = W'(int'(li[r][c] * SC));
        end
    @(negedge clk); we = 0;
    // use the quantised values in the reference
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        lr[r][c] = real'(int'(lr[r][c] * SC)) / SC;
        li[r][c] = real'(int'(li[r][c] * SC)) / SC;
      end
    for (int run = 0; run < 6; run++) begin
      for (int m = 0; m < M; m++) begin
        y_re[m] = 16'(int'($urandom_range(0, 40000)) - 20000);
        y_im[m] = 16'(int'($urandom_range(0, 40000)) - 20000);
        yr[m] = real'(y_re[m]) / SC; yi[m] = real'(y_im[m]) / SC;
      end
      bank_rd = 1'(run % 2);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > 240) begin failures++; $display("FAIL cycles %0d", cyc); end
      @(negedge clk);  // the last bus write lands with done
      // reference: Ls v = h_prev
      for (int i = 0; i < L; i++) begin
        ar = hr[i]; ai = hi[i];
        for (int j = 0; j < i; j++) begin
          ar -= lr[M+i][M+j] * vr_[j] - li[M+i][M+j] * vi_[j];
          ai -= lr[M+i][M+j] * vi_[j] + li[M+i][M+j] * vr_[j];
        end
        vr_[i] = ar / lr[M+i][M+i]; vi_[i] = ai / lr[M+i][M+i];
      end
      // Ls^H h = v
      for (int i = L - 1; i >= 0; i--) begin
        ar = vr_[i]; ai = vi_[i];
        for (int j = i + 1; j < L; j++) begin
          ar -= lr[M+j][M+i] * hr[j] + li[M+j][M+i] * hi[j];
          ai -= lr[M+j][M+i] * hi[j] - li[M+j][M+i] * hr[j];
        end
        hr[i] = ar / lr[M+i][M+i]; hi[i] = ai / lr[M+i][M+i];
      end
      nrm = 0;
      for (int i = 0; i < L; i++) nrm += hr[i] * hr[i] + hi[i] * hi[i];
      s = 1.0 / $sqrt(nrm);
      for (int i = 0; i < L; i++) begin hr[i] *= s; hi[i] *= s; end
      // u = U^H h ; L^H w = u
      for (int j = 0; j < M; j++) begin
        ur[j] = 0; ui[j] = 0;
        for (int i = 0; i < L; i++) begin
          ur[j] += lr[M+i][j] * hr[i] + li[M+i][j] * hi[i];
          ui[j] += lr[M+i][j] * hi[i] - li[M+i][j] * hr[i];
        end
      end
      for (int i = M - 1; i >= 0; i--) begin
        ar = ur[i]; ai = ui[i];
        for (int j = i + 1; j < M; j++) begin
          ar -= lr[j][i] * wr[j] + li[j][i] * wi[j];
          ai -= lr[j][i] * wi[j] - li[j][i] * wr[j];
        end
        wr[i] = ar / lr[i][i]; wi[i] = ai / lr[i][i];
      end
      rr = 0; ri_ = 0;
      for (int m = 0; m < M; m++) begin
        rr += wr[m] * yr[m] + wi[m] * yi[m];
        ri_ += wr[m] * yi[m] - wi[m] * yr[m];
      end
      for (int n = L - 1; n > 0; n--) begin rhr[n] = rhr[n-1]; rhi[n] = rhi[n-1]; end
      rhr[0] = rr; rhi[0] = ri_;
      zr = 0; zi = 0;
      for (int l = 0; l < L; l++) begin
        zr += hr[l] * rhr[L-1-l] - hi[l] * rhi[L-1-l];
        zi += hr[l] * rhi[L-1-l] + hi[l] * rhr[L-1-l];
      end
      for (int j = 1; j < L; j++) begin
        sr[j] = 0; si[j] = 0;
        for (int l = 0; l + j < L; l++) begin
          sr[j] += hr[l] * hr[l+j] + hi[l] * hi[l+j];
          si[j] += hi[l] * hr[l+j] - hr[l] * hi[l+j];
        end
      end
      for (int i = 0; i < L; i++) begin
        chk("h.re", fp_real(h_out[i].re), hr[i], 2e-3);
        chk("h.im", fp_real(h_out[i].im), hi[i], 2e-3);
      end
      for (int i = 0; i < M; i++) begin
        chk("w.re", fp_real(w_out[i].re), wr[i], 2e-3 * (1.0 + $sqrt(wr[i] * wr[i] + wi[i] * wi[i])));
        chk("w.im", fp_real(w_out[i].im), wi[i], 2e-3 * (1.0 + $sqrt(wr[i] * wr[i] + wi[i] * wi[i])));
      end
      chk("z.re", fp_real(z_out.re), zr, 5e-3 * (1.0 + $sqrt(zr * zr + zi * zi)));
      chk("z.im", fp_real(z_out.im), zi, 5e-3 * (1.0 + $sqrt(zr * zr + zi * zi)));
      chk("vit z", vit_mem[0], zr, 5e-3 * (1.0 + $sqrt(zr * zr + zi * zi)) + 2.0 / 1024.0);
      for (int st = 0; st < NS; st++) begin
        ww = 0;
        for (int j = 1; j < L; j++) ww += ((st >> (j - 1)) & 1) ? 0.5 * sr[j] : -0.5 * sr[j];
        chk("vit ww", vit_mem[st + 1], ww, 5e-3 + 4.0 / 1024.0);
      end
      $display("run %0d: %0d cycles, |h|^2 before normalisation %f", run, cyc, nrm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
