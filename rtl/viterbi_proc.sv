// viterbi_proc: MLSE Viterbi demodulator of the JSTE receiver (2^(L-1) states).
//
// Memories: RAM_WW holds the matched-filter sample Re z (address 0) and the intersymbol
// term ww of every state (address 1 + state); it is written over the external bus
// (DATA_VIT / ADDR_VIT) by the FBS processor. RAM_MS holds the state metrics (two banks,
// old and new, swapped every symbol) and the survivor bits (one NS-bit word per symbol,
// NSYM symbols).
//
// One trellis step (sym_start): the controller runs the NS/2 butterflies j = 0 .. NS/2-1
// through the five-cycle BUTTERFLY unit, reading Metr0 = metric(j), Metr8 = metric(j+NS/2),
// ww0 = ww(j), ww1 = ww(j+NS/2) and writing the new metrics of states 2j, 2j+1 and their
// survivor bits. While doing so it tracks the best new state; when the step ends
// (step_done) xhat gives the L symbols of the maximum-likelihood path ending there
// (xhat[0] newest, 1 = +1, 0 = -1): L-1 come from the best state itself and the oldest from
// its survivor bit. These decided symbols feed the decision-directed Cholesky update.
// One step takes NS/2 * 6 + 2 cycles (50 for L = 5).
//
// A step requested when the survivor memory already holds NSYM symbols is acknowledged
// (step_done) without processing.
// burst_start zeroes the metrics and the symbol counter. tb_start traces back from the best
// final state through the stored survivors and then streams the decided bits b_k in time
// order (bit_valid / bit_out, one per clock), ending with tb_done.
//
// The document gives the unit set (data path with BUTTERFLY, AGU, RAM_WW, RAM_MS, program
// controller), the five-cycle butterfly and a 41-bit microcoded controller; the microcode is
// not given, so control here is a hard-wired state machine with address generation folded
// in. Metric definition, memory sizes (NSYM) and the traceback scheme are this design's
// choices.
module viterbi_proc #(
  parameter int unsigned L    = 5,
  parameter int unsigned VW   = 16,
  parameter int unsigned MW   = 24,
  parameter int unsigned NSYM = 160,
  localparam int unsigned NS  = 1 << (L - 1),
  localparam int unsigned VAW = $clog2(NS + 1),
  localparam int unsigned TW  = $clog2(NSYM + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // RAM_WW write bus
  input  logic                 ww_we,
  input  logic [VAW-1:0]       ww_addr,
  input  logic signed [VW-1:0] ww_data,
  // control
  input  logic                 burst_start,
  input  logic                 sym_start,
  input  logic                 tb_start,
  output logic                 busy,
  output logic                 step_done,
  output logic [L-1:0]         xhat,
  output logic [TW-1:0]        nsym,
  output logic                 bit_valid,
  output logic                 bit_out,
  output logic                 tb_done
);

  localparam int unsigned SB = L - 1;          // state bits
  localparam int unsigned HB = NS / 2;

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_STEP_END, S_TB, S_OUT} state_t;
  state_t state;

  logic signed [VW-1:0] ram_ww [NS + 1];
  logic signed [MW-1:0] metr [2][NS];
  logic [NS-1:0]        surv [NSYM];
  logic                 dec [NSYM];
  logic [NS-1:0]        surv_row;
  logic                 cur;                   // bank holding the old metrics
  logic [SB-1:0]        j;
  logic [TW-1:0]        t, tcnt;
  logic [SB-1:0]        best, tbs;
  logic signed [MW-1:0] best_m;
  logic                 best_valid;

  // RAM_WW
  always_ff @(posedge clk) begin
    if (ww_we) ram_ww[ww_addr] <= ww_data;
  end

  // BUTTERFLY
  logic                 bf_done, sv0, sv1;
  logic signed [MW-1:0] mo0, mo1;
  vit_butterfly #(.VW(VW), .MW(MW)) u_bf (
    .clk, .rst_n, .start(state == S_ISSUE), .z(ram_ww[0]),
    .ww0(ram_ww[VAW'(j) + 1'b1]), .ww1(ram_ww[VAW'(j) + VAW'(HB) + 1'b1]),
    .metr0(metr[cur][j]), .metr8(metr[cur][SB'(j + HB)]),
    .done(bf_done), .metr_out0(mo0), .metr_out1(mo1), .surv0(sv0), .surv1(sv1));

  logic [SB-1:0] s_even, s_odd;
  assign s_even = {j[SB-2:0], 1'b0};
  assign s_odd  = {j[SB-2:0], 1'b1};

  // best of the two new metrics against the running best
  logic [SB-1:0]        cand_s;
  logic signed [MW-1:0] cand_m;
  always_comb begin
    if ((mo1 - mo0) > 0) begin cand_s = s_odd;  cand_m = mo1; end
    else                 begin cand_s = s_even; cand_m = mo0; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= 1'b0;
      j          <= '0;
      t          <= '0;
      tcnt       <= '0;
      best       <= '0;
      best_m     <= '0;
      best_valid <= 1'b0;
      tbs        <= '0;
      surv_row   <= '0;
      step_done  <= 1'b0;
      xhat       <= '0;
      bit_valid  <= 1'b0;
      bit_out    <= 1'b0;
      tb_done    <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < NS; s++) metr[b][s] <= '0;
    end else begin
      step_done <= 1'b0;
      bit_valid <= 1'b0;
      tb_done   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (burst_start) begin
            for (int b = 0; b < 2; b++)
              for (int s = 0; s < NS; s++) metr[b][s] <= '0;
            t <= '0;
          end else if (sym_start && t < TW'(NSYM)) begin
            j          <= '0;
            best_valid <= 1'b0;
            state      <= S_ISSUE;
          end else if (sym_start) begin
            step_done <= 1'b1;                 // survivor memory full: step skipped
          end else if (tb_start && t != '0) begin
            tcnt  <= t - 1'b1;
            tbs   <= best;
            state <= S_TB;
          end
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (bf_done) begin
          metr[!cur][s_even] <= mo0;
          metr[!cur][s_odd]  <= mo1;
          surv_row[s_even]   <= sv0;
          surv_row[s_odd]    <= sv1;
          if (!best_valid || (cand_m - best_m) > 0) begin
            best   <= cand_s;
            best_m <= cand_m;
          end
          best_valid <= 1'b1;
          if (j == SB'(HB - 1)) state <= S_STEP_END;
          else begin
            j     <= j + 1'b1;
            state <= S_ISSUE;
          end
        end
        S_STEP_END: begin
          surv[t]   <= surv_row;
          xhat      <= {surv_row[best], best};
          cur       <= !cur;
          t         <= t + 1'b1;
          step_done <= 1'b1;
          state     <= S_IDLE;
        end
        // trace back: the newest bit of the state is the decision of that symbol
        S_TB: begin
          dec[tcnt] <= tbs[0];
          tbs       <= {surv[tcnt][tbs], tbs[SB-1:1]};
          if (tcnt == '0) state <= S_OUT;
          else            tcnt  <= tcnt - 1'b1;
        end
        S_OUT: begin
          bit_valid <= 1'b1;
          bit_out   <= dec[tcnt];
          if (tcnt == t - 1'b1) begin
            tb_done <= 1'b1;
            state   <= S_IDLE;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign nsym = t;

endmodule
