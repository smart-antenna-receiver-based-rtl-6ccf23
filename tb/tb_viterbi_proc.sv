// tb_viterbi_proc: self-checking test of the Viterbi processor.
// A random +-1 symbol burst is passed through a real channel with autocorrelation s_j; the
// testbench forms the matched-filter samples z_k = s0 x_k + sum_j s_j (x_{k+j} + x_{k-j})
// plus a small random disturbance and, for every state, the intersymbol term ww. It writes
// them over the RAM_WW bus, runs one trellis step per symbol (checking the 60-cycle budget),
// then traces back and compares the streamed bits with the transmitted ones (all but the
// last L-1, whose matched-filter samples are incomplete). xhat after the last step must
// equal the last L decided bits.
module tb_viterbi_proc;
  localparam int L = 5, NS = 16, VW = 16, NSYM = 160, T = 120;
  localparam int VAW = $clog2(NS + 1), TW = $clog2(NSYM + 1);
  logic clk = 0, rst_n = 0;
  logic ww_we = 0, burst_start = 0, sym_start = 0, tb_start = 0;
  logic [VAW-1:0] ww_addr = 0;
  logic signed [VW-1:0] ww_data = 0;
  logic busy, step_done, bit_valid, bit_out, tb_done;
  logic [L-1:0] xhat;
  logic [TW-1:0] nsym;
  int checks = 0, failures = 0;

  viterbi_proc #(.L(L), .NSYM(NSYM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk); ww_we = 1; ww_addr = VAW'(a); ww_data = VW'(d);
    @(negedge clk); ww_we = 0;
  endtask

  initial begin
    int x [-8:T+8];
    int s [L];
    int z, ww, cyc, maxcyc, k, nbits, errs;
    logic got [T];
    // channel autocorrelation in units of 2^-10 (h = [0.8 0.5 0.3 0.2 0.1] scaled)
    s[0] = 1060; s[1] = 582; s[2] = 320; s[3] = 178; s[4] = 82;
    for (int i = -8; i <= T + 8; i++) x[i] = $urandom_range(0, 1) ? 1 : -1;
    for (int i = -8; i < 0; i++) x[i] = -1;   // all-zero start state of the metrics is fine
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); burst_start = 1; @(negedge clk); burst_start = 0;
    maxcyc = 0;
    for (k = 0; k < T; k++) begin
      z = s[0] * x[k];
      for (int j = 1; j < L; j++) z += s[j] * (x[k + j] + x[k - j]);
      z += int'($urandom_range(0, 100)) - 50;
      wr(0, z);
      for (int st = 0; st < NS; st++) begin
        ww = 0;
        for (int j = 1; j < L; j++) ww += ((st >> (j - 1)) & 1) ? s[j] : -s[j];
        wr(st + 1, ww);
      end
      @(negedge clk); sym_start = 1; @(negedge clk); sym_start = 0; cyc = 1;
      while (!step_done) begin @(negedge clk); cyc++; end
      if (cyc > maxcyc) maxcyc = cyc;
    end
    checks++;
    if (maxcyc > 60) begin failures++; $display("FAIL step takes %0d cycles", maxcyc); end
    checks++;
    if (int'(nsym) != T) begin failures++; $display("FAIL nsym %0d", nsym); end
    @(negedge clk); tb_start = 1; @(negedge clk); tb_start = 0;
    nbits = 0; errs = 0;
    while (!tb_done) begin
      @(posedge clk); #1;
      if (bit_valid) begin
        got[nbits] = bit_out;
        if (nbits < T - (L - 1)) begin
          checks++;
          if ((bit_out ? 1 : -1) != x[nbits]) begin
            failures++; errs++;
            $display("FAIL bit %0d", nbits);
          end
        end
        nbits++;
      end
    end
    checks++;
    if (nbits != T) begin failures++; $display("FAIL %0d bits streamed", nbits); end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (xhat[l] != got[T - 1 - l]) begin failures++; $display("FAIL xhat[%0d]", l); end
    end
    $display("step cycles %0d, bit errors %0d", maxcyc, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
