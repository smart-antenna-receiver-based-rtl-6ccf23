// vit_butterfly: add-compare-select of one radix-2 trellis butterfly in five clock cycles.
//
// The trellis state holds the last L-1 binary symbols, newest in bit 0. Predecessor states
// j and j + NS/2 (metrics metr0 and metr8) both lead to successors 2j (new bit 0, symbol -1)
// and 2j + 1 (new bit 1, symbol +1). With the matched-filter sample z and, per predecessor,
// the intersymbol term ww (sum of channel autocorrelation times past symbols) the branch
// gain for symbol x is x * (z - ww); metrics are maximised. The survivor bit is 1 when the
// winner is the upper predecessor j + NS/2 (the symbol leaving the state was +1).
// Metrics are modulo-2^MW numbers compared through the sign of their difference, so they
// never need rescaling as long as their spread stays below 2^(MW-1).
//
// Cycles: 1 latch operands, 2 form z - ww, 3 add, 4 compare, 5 select; done is high in the
// fifth cycle after start together with the results. The document gives the five-cycle
// budget and the metric/survivor names; the metric itself is this design's choice.
module vit_butterfly #(
  parameter int unsigned VW = 16,
  parameter int unsigned MW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [VW-1:0] z,
  input  logic signed [VW-1:0] ww0,
  input  logic signed [VW-1:0] ww1,
  input  logic signed [MW-1:0] metr0,
  input  logic signed [MW-1:0] metr8,
  output logic                 done,
  output logic signed [MW-1:0] metr_out0,   // successor 2j
  output logic signed [MW-1:0] metr_out1,   // successor 2j+1
  output logic                 surv0,
  output logic                 surv1
);

  logic [4:0] stage;   // one-hot pipeline position
  logic signed [VW-1:0] zr, w0, w1;
  logic signed [MW-1:0] m0, m8, d0, d1;
  logic signed [MW-1:0] c00, c01, c10, c11;   // c<pred><bit>
  logic                 s0, s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      {zr, w0, w1} <= '0;
      {m0, m8, d0, d1, c00, c01, c10, c11} <= '0;
      {s0, s1} <= '0;
      {metr_out0, metr_out1, surv0, surv1} <= '0;
    end else begin
      stage <= {stage[3:0], start};
      if (start) begin                      // cycle 1
        zr <= z; w0 <= ww0; w1 <= ww1; m0 <= metr0; m8 <= metr8;
      end
      if (stage[0]) begin                   // cycle 2
        d0 <= MW'(zr) - MW'(w0);
        d1 <= MW'(zr) - MW'(w1);
      end
      if (stage[1]) begin                   // cycle 3
        c00 <= m0 - d0; c01 <= m0 + d0;
        c10 <= m8 - d1; c11 <= m8 + d1;
      end
      if (stage[2]) begin                   // cycle 4
        s0 <= (c10 - c00) > 0;
        s1 <= (c11 - c01) > 0;
      end
      if (stage[3]) begin                   // cycle 5
        metr_out0 <= s0 ? c10 : c00;
        metr_out1 <= s1 ? c11 : c01;
        surv0     <= s0;
        surv1     <= s1;
      end
    end
  end

  assign done = stage[4];

endmodule
