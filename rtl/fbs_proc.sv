// fbs_proc: forward-backward substitution (FBS) processor of the JSTE receiver.
//
// From the Cholesky factor Lbar = [L 0; U Ls] of the previous update (read from the factor
// memories, bank `bank_rd`) and the antenna samples y(n) it computes, in floating point:
//   1. one inverse power iteration for the channel:  Ls v = h_prev  (forward substitution),
//      Ls^H h = v (backward substitution), h = h / ||h|| (MAC + ISQRT + BS scaling);
//   2. the beamformer  w = L^-H U^H h:  u = U^H h (MAC), then L^H w = u (backward subst.);
//   3. the spatial filter r(n) = w^H y(n) and the matched filter
//      z(n-L+1) = sum_l h_l r(n-L+1+l) (MAC);
//   4. for the Viterbi processor: the real parts of the channel autocorrelation
//      s_j = sum_l h_l conj(h_{l+j}), j = 1..L-1, and for each of the 2^(L-1) trellis states
//      the intersymbol term ww(state) = sum_j Re(s_j) x_{-j}(state), with the symbols at
//      the amplitude +-0.5 they have in the covariance vector g.
// z and the ww table are converted to 16-bit fixed point (VFRAC fractional bits) and
// written over the Viterbi write bus: address 0 holds Re z, address 1 + state holds ww.
//
// Structure: an FBS unit made of a complex MAC unit (fbs_mac), a BS unit (fbs_bs:
// subtract, divide by the real diagonal, or scale) and an ISQRT unit (fbs_isqrt); two AGUs
// (fbs_agu), one for the factor memory and one for the working vector memory
// (real and imaginary parts side by side). Every computation is a sequence of "rows": a row
// clears the accumulator, accumulates its terms one per clock and ends with one finishing
// cycle in the BS unit, so a row of k terms takes k + 2 cycles. The whole program takes
// about 230 cycles for M = 4, L = 5.
//
// The document gives the algorithm (eq. 10, 11), the unit set (BS, MAC, ISQRT, two AGUs,
// program controller) and the number format (16-bit mantissa, 5-bit exponent). It does not
// give the 50-bit microcode; here the sequence is a hard-wired phase sequencer. The
// matched-filter delay, the Ungerboeck-style ww table and the memory layout are this
// design's choices. h_prev starts as the unit vector e0 after reset.
module fbs_proc
  import jste_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned L     = 5,
  parameter int unsigned W     = 20,
  parameter int unsigned FRAC  = 15,
  parameter int unsigned YWID  = 16,
  parameter int unsigned OFRAC = 10,
  localparam int unsigned N    = M + L,
  localparam int unsigned AW   = $clog2(2 * N * N),
  localparam int unsigned NS   = 1 << (L - 1),
  localparam int unsigned VAW  = $clog2(NS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   bank_rd,
  input  logic signed [YWID-1:0] y_re [M],
  input  logic signed [YWID-1:0] y_im [M],
  output logic                   busy,
  output logic                   done,
  // factor memory read port (shared address for Re(L) and Im(L))
  output logic [AW-1:0]          lram_addr,
  input  logic signed [W-1:0]    lram_re,
  input  logic signed [W-1:0]    lram_im,
  // results
  output cfp_t                   h_out [L],
  output cfp_t                   w_out [M],
  output cfp_t                   z_out,
  // write bus to the Viterbi processor
  output logic                   vit_we,
  output logic [VAW-1:0]         vit_addr,
  output logic signed [15:0]     vit_data
);

  // working vector memory layout
  localparam int unsigned VB_V = 0;          // forward-substitution result, L words
  localparam int unsigned VB_H = L;          // channel estimate h (and h_prev), L words
  localparam int unsigned VB_U = 2 * L;      // U^H h, M words
  localparam int unsigned VB_W = 2 * L + M;  // beamformer w, M words
  localparam int unsigned VB_S = 2 * L + 2 * M;  // autocorrelation s_j, L words
  localparam int unsigned VD   = 3 * L + 2 * M;
  localparam int unsigned VA   = $clog2(VD + 1);
  localparam int unsigned CI   = (VAW > $clog2(N + 1)) ? VAW + 1 : $clog2(N + 1) + 1;

  typedef enum logic [3:0] {
    P_FWD, P_BWD, P_NRM, P_SCL, P_UH, P_WBW, P_SPAT, P_MF, P_AC, P_WW
  } phase_t;
  typedef enum logic [1:0] {ST_IDLE, ST_ROW, ST_TERM, ST_FIN} step_t;

  phase_t phase;
  step_t  step;
  logic [CI-1:0] ri, tj;      // row and term counters
  logic          bank;
  cfp_t          vr [VD];     // RAM Real / RAM Imag
  cfp_t          rh [L];      // r(n), r(n-1), ..., r(n-L+1)
  fp_t           isq;
  logic [4:0]    hexp;        // largest exponent in h after the backward substitution
  int            hsh;         // prescaling shift for the normalisation

  // Before its norm is taken, h is scaled by 2^-hsh so that its largest element is below 2
  // in magnitude: the unnormalised h grows with the inverse square of the smallest
  // singular value of Ls and its squared norm would leave the exponent range otherwise.
  assign hsh = (hexp > 5'd17) ? int'(hexp) - 17 : 0;

  // ---------------------------------------------------------------- row bookkeeping
  logic [CI-1:0] nrow, nterm, i, jj;
  always_comb begin
    unique case (phase)
      P_FWD:  nrow = CI'(L);
      P_BWD:  nrow = CI'(L);
      P_NRM:  nrow = CI'(1);
      P_SCL:  nrow = CI'(L);
      P_UH:   nrow = CI'(M);
      P_WBW:  nrow = CI'(M);
      P_SPAT: nrow = CI'(1);
      P_MF:   nrow = CI'(1);
      P_AC:   nrow = CI'(L - 1);
      P_WW:   nrow = CI'(NS);
      default: nrow = CI'(1);
    endcase
    // row index: descending for the backward substitutions, 1-based for the autocorrelation
    unique case (phase)
      P_BWD:   i = CI'(L - 1) - ri;
      P_WBW:   i = CI'(M - 1) - ri;
      P_AC:    i = ri + 1'b1;
      default: i = ri;
    endcase
    unique case (phase)
      P_FWD:  nterm = i;
      P_BWD:  nterm = CI'(L - 1) - i;
      P_NRM:  nterm = CI'(L);
      P_SCL:  nterm = '0;
      P_UH:   nterm = CI'(L);
      P_WBW:  nterm = CI'(M - 1) - i;
      P_SPAT: nterm = CI'(M);
      P_MF:   nterm = CI'(L);
      P_AC:   nterm = CI'(L) - i;
      P_WW:   nterm = CI'(L - 1);
      default: nterm = '0;
    endcase
    // term index: the backward substitutions run over j > i
    jj = ((phase == P_BWD) || (phase == P_WBW)) ? i + 1'b1 + tj : tj;
  end

  // ---------------------------------------------------------------- AGUs
  logic [AW-1:0] m_row, m_col;
  logic          m_tr;
  logic [VA-1:0] vb_base, vb_idx, va_addr, vx_addr, vb_addr;

  fbs_agu #(.AW(AW)) u_agu_l (
    .base(bank ? AW'(N * N) : '0), .stride(AW'(N)), .row(m_row), .col(m_col),
    .transpose(m_tr), .addr(lram_addr));

  fbs_agu #(.AW(VA)) u_agu_v (
    .base(vb_base), .stride('0), .row('0), .col(vb_idx), .transpose(1'b0), .addr(vb_addr));

  // ---------------------------------------------------------------- operand selection
  cfp_t lval, op_a, op_b, x, res;
  fp_t  d;
  logic conj_a, bs_op;
  logic mac_clr, mac_en;
  cfp_t acc;

  assign lval.re = fp_from_fix(24'(lram_re), FRAC);
  assign lval.im = fp_from_fix(24'(lram_im), FRAC);

  always_comb begin
    m_row   = '0;
    m_col   = '0;
    m_tr    = 1'b0;
    vb_base = '0;
    vb_idx  = '0;
    va_addr = '0;
    vx_addr = '0;
    conj_a  = 1'b0;
    bs_op   = 1'b0;
    op_a    = vr[va_addr];
    op_b    = '{re: FP_ZERO, im: FP_ZERO};
    unique case (phase)
      P_FWD: begin   // Ls(i,j) v(j), x = h_prev(i)
        m_row = AW'(M) + AW'(i); m_col = AW'(M) + AW'(jj);
        vb_base = VA'(VB_V); vb_idx = VA'(jj);
        vx_addr = VA'(VB_H) + VA'(i);
      end
      P_BWD: begin   // conj(Ls(j,i)) h(j), x = v(i)
        m_row = AW'(M) + AW'(i); m_col = AW'(M) + AW'(jj); m_tr = 1'b1; conj_a = 1'b1;
        vb_base = VA'(VB_H); vb_idx = VA'(jj);
        vx_addr = VA'(VB_V) + VA'(i);
      end
      P_NRM: begin   // conj(h(j)) h(j)
        va_addr = VA'(VB_H) + VA'(jj); conj_a = 1'b1;
        vb_base = VA'(VB_H); vb_idx = VA'(jj);
      end
      P_SCL: begin   // x = h(i)
        vx_addr = VA'(VB_H) + VA'(i); bs_op = 1'b1;
      end
      P_UH: begin    // conj(U(j,i)) h(j)
        m_row = AW'(M) + AW'(jj); m_col = AW'(i); conj_a = 1'b1;
        vb_base = VA'(VB_H); vb_idx = VA'(jj);
      end
      P_WBW: begin   // conj(L(j,i)) w(j), x = u(i)
        m_row = AW'(i); m_col = AW'(jj); m_tr = 1'b1; conj_a = 1'b1;
        vb_base = VA'(VB_W); vb_idx = VA'(jj);
        vx_addr = VA'(VB_U) + VA'(i);
      end
      P_SPAT: begin  // conj(w(m)) y(m)
        va_addr = VA'(VB_W) + VA'(jj); conj_a = 1'b1;
      end
      P_MF: begin    // h(l) r(n-L+1+l)
        va_addr = VA'(VB_H) + VA'(jj);
      end
      P_AC: begin    // conj(h(l+i)) h(l)
        va_addr = VA'(VB_H) + VA'(jj) + VA'(i); conj_a = 1'b1;
        vb_base = VA'(VB_H); vb_idx = VA'(jj);
      end
      P_WW: begin    // s(j+1) * (+-0.5)
        va_addr = VA'(VB_S) + VA'(jj) + 1'b1;
      end
      default: ;
    endcase
    // in the finishing cycle the factor port fetches the diagonal element
    if (step == ST_FIN) begin
      m_row = (phase == P_WBW) ? AW'(i) : AW'(M) + AW'(i);
      m_col = m_row;
      m_tr  = 1'b0;
    end
    op_a = ((phase == P_FWD) || (phase == P_BWD) || (phase == P_UH) || (phase == P_WBW))
           ? lval : vr[va_addr];
    unique case (phase)
      P_SPAT: begin
        op_b.re = fp_from_fix(24'(y_re[jj]), 15);
        op_b.im = fp_from_fix(24'(y_im[jj]), 15);
      end
      P_MF: op_b = rh[CI'(L - 1) - jj];
      P_WW: begin
        op_b.re = ri[jj] ? FP_HALF : fp_neg(FP_HALF);
        op_b.im = FP_ZERO;
      end
      default: op_b = vr[vb_addr];
    endcase
    x = vr[vx_addr];
    if (phase == P_NRM) begin
      op_a = cfp_shr(op_a, hsh);
      op_b = cfp_shr(op_b, hsh);
    end
    if (phase == P_SCL) x = cfp_shr(x, hsh);
    d = (phase == P_SCL) ? isq : lval.re;
    mac_clr = (step == ST_ROW);
    mac_en  = (step == ST_TERM);
  end

  fbs_mac u_mac (.clk, .rst_n, .clr(mac_clr), .en(mac_en), .conj_a, .op_a, .op_b, .acc);
  fbs_bs  u_bs  (.op(bs_op), .x, .s(acc), .d, .res);

  fp_t isq_new;
  fbs_isqrt u_isqrt (.x(acc.re), .res(isq_new));

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_FWD;
      step     <= ST_IDLE;
      ri       <= '0;
      tj       <= '0;
      bank     <= 1'b0;
      isq      <= FP_ONE;
      hexp     <= '0;
      done     <= 1'b0;
      vit_we   <= 1'b0;
      vit_addr <= '0;
      vit_data <= '0;
      z_out    <= '{re: FP_ZERO, im: FP_ZERO};
      for (int n = 0; n < VD; n++) vr[n] <= '{re: FP_ZERO, im: FP_ZERO};
      vr[VB_H] <= '{re: FP_ONE, im: FP_ZERO};
      for (int n = 0; n < L; n++) rh[n] <= '{re: FP_ZERO, im: FP_ZERO};
    end else begin
      done   <= 1'b0;
      vit_we <= 1'b0;
      unique case (step)
        ST_IDLE: if (start) begin
          bank  <= bank_rd;
          hexp  <= '0;
          phase <= P_FWD;
          ri    <= '0;
          step  <= ST_ROW;
        end
        ST_ROW: begin
          tj   <= '0;
          step <= (nterm == '0) ? ST_FIN : ST_TERM;
        end
        ST_TERM: begin
          tj <= tj + 1'b1;
          if (tj == nterm - 1'b1) step <= ST_FIN;
        end
        ST_FIN: begin
          unique case (phase)
            P_FWD:  vr[VB_V + i] <= res;
            P_BWD: begin
              vr[VB_H + i] <= res;
              if (res.re.e > hexp || res.im.e > hexp)
                hexp <= (res.re.e > res.im.e) ? res.re.e : res.im.e;
            end
            P_NRM:  isq <= isq_new;
            P_SCL:  vr[VB_H + i] <= res;
            P_UH:   vr[VB_U + i] <= acc;
            P_WBW:  vr[VB_W + i] <= res;
            P_SPAT: begin
              for (int n = L - 1; n > 0; n--) rh[n] <= rh[n-1];
              rh[0] <= acc;
            end
            P_MF: begin
              z_out    <= acc;
              vit_we   <= 1'b1;
              vit_addr <= '0;
              vit_data <= fp_to_fix(acc.re, OFRAC);
            end
            P_AC:   vr[VB_S + i] <= acc;
            P_WW: begin
              vit_we   <= 1'b1;
              vit_addr <= VAW'(ri) + 1'b1;
              vit_data <= fp_to_fix(acc.re, OFRAC);
            end
            default: ;
          endcase
          if (ri == nrow - 1'b1) begin
            ri <= '0;
            if (phase == P_WW) begin
              step <= ST_IDLE;
              done <= 1'b1;
            end else begin
              phase <= phase_t'(phase + 1'b1);
              step  <= ST_ROW;
            end
          end else begin
            ri   <= ri + 1'b1;
            step <= ST_ROW;
          end
        end
        default: step <= ST_IDLE;
      endcase
    end
  end

  assign busy = (step != ST_IDLE);
  always_comb begin
    for (int n = 0; n < L; n++) h_out[n] = vr[VB_H + n];
    for (int n = 0; n < M; n++) w_out[n] = vr[VB_W + n];
  end

endmodule
