// tb_cholesky_proc: self-checking test of the Cholesky update processor with its two
// factor memories. After loading delta*I, a series of random vectors g = [y; x] is applied.
// After each update both banks are read back and, in real arithmetic,
//     Lnew Lnew^H  is compared with  lambda * Lold Lold^H + g g^H,
// the diagonal is checked to be real and positive and the cycle count is checked against
// the overlapped schedule ((N+1)(N+2)/2 - 1) * (ITER + 3) + small overhead.
module tb_cholesky_proc;
  localparam int M = 4, L = 5, N = M + L, W = 20, ITER = 16;
  localparam int AW = $clog2(2 * N * N);
  localparam real SC = 32768.0;

  logic clk = 0, rst_n = 0, init = 0, start = 0, bank_rd = 0;
  logic signed [W-1:0] g_re [N], g_im [N];
  logic busy, done;
  logic [AW-1:0] ram_raddr, ram_waddr, tb_addr = 0;
  logic signed [W-1:0] ram_re_rdata, ram_im_rdata, ram_re_wdata, ram_im_wdata;
  logic signed [W-1:0] tb_re, tb_im;
  logic ram_we;
  int checks = 0, failures = 0;

  cholesky_proc #(.M(M), .L(L), .W(W), .ITER(ITER)) dut (.*);
  chol_ram #(.W(W), .DEPTH(2 * N * N)) u_re (.clk, .we(ram_we), .waddr(ram_waddr),
    .wdata(ram_re_wdata), .raddr_a(ram_raddr), .rdata_a(ram_re_rdata), .raddr_b(tb_addr),
    .rdata_b(tb_re));
  chol_ram #(.W(W), .DEPTH(2 * N * N)) u_im (.clk, .we(ram_we), .waddr(ram_waddr),
    .wdata(ram_im_wdata), .raddr_a(ram_raddr), .rdata_a(ram_im_rdata), .raddr_b(tb_addr),
    .rdata_b(tb_im));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real lr [N][N], li [N][N];

  task automatic read_bank(input int b);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        tb_addr = AW'(b * N * N + r * N + c);
        #1;
        lr[r][c] = (c <= r) ? real'(tb_re) / SC : 0.0;
        li[r][c] = (c <= r) ? real'(tb_im) / SC : 0.0;
      end
  endtask

  initial begin
    real rr [N][N], ri [N][N], gr [N], gi [N];
    real lam, pr, pi, tol;
    int cyc, bound;
    lam = (124346.0 / 131072.0) ** 2;
    bound = ((N + 1) * (N + 2) / 2 - 1) * (ITER + 3) + 4 * N;
    for (int n = 0; n < N; n++) begin g_re[n] = 0; g_im[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    while (!done) @(negedge clk);
    read_bank(0);
    checks++;
    if (lr[3][3] != 2048.0 / SC || lr[3][2] != 0.0) begin
      failures++;
      $display("FAIL init");
    end
    for (int u = 0; u < 12; u++) begin
      for (int n = 0; n < N; n++) begin
        if (n < M) begin
          g_re[n] = W'(int'($urandom_range(0, 26000)) - 13000);
          g_im[n] = W'(int'($urandom_range(0, 26000)) - 13000);
        end else begin
          g_re[n] = $urandom_range(0, 1) ? W'(16384) : -W'(16384);
          g_im[n] = 0;
        end
        gr[n] = real'(g_re[n]) / SC;
        gi[n] = real'(g_im[n]) / SC;
      end
      read_bank(u % 2);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          rr[r][c] = gr[r] * gr[c] + gi[r] * gi[c];
          ri[r][c] = gi[r] * gr[c] - gr[r] * gi[c];
          for (int q = 0; q < N; q++) begin
            rr[r][c] += lam * (lr[r][q] * lr[c][q] + li[r][q] * li[c][q]);
            ri[r][c] += lam * (li[r][q] * lr[c][q] - lr[r][q] * li[c][q]);
          end
        end
      bank_rd = 1'(u % 2);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > bound) begin
        failures++;
        $display("FAIL cycles %0d > %0d", cyc, bound);
      end
      read_bank(1 - u % 2);
      for (int r = 0; r < N; r++) begin
        checks++;
        if (lr[r][r] <= 0.0 || li[r][r] != 0.0) begin
          failures++;
          $display("FAIL diag %0d", r);
        end
        for (int c = 0; c <= r; c++) begin
          pr = 0; pi = 0;
          for (int q = 0; q < N; q++) begin
            pr += lr[r][q] * lr[c][q] + li[r][q] * li[c][q];
            pi += li[r][q] * lr[c][q] - lr[r][q] * li[c][q];
          end
          tol = 2.0e-3 + 2.0e-3 * $sqrt(rr[r][r] * rr[c][c]);
          checks++;
          if (pr - rr[r][c] > tol || rr[r][c] - pr > tol ||
              pi - ri[r][c] > tol || ri[r][c] - pi > tol) begin
            failures++;
            $display("FAIL upd %0d R(%0d,%0d) got %f,%f exp %f,%f", u, r, c, pr, pi,
                     rr[r][c], ri[r][c]);
          end
        end
      end
      $display("update %0d took %0d cycles", u, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
