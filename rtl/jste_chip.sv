// jste_chip: joint space-time estimation (JSTE) receiver for GSM/DCS, single-chip top.
//
// Three processors and the factor memories are wired as in the chip's block diagram:
//   * cholesky_proc updates the Cholesky factor of R(n) = lambda R(n-1) + g g^H with
//     g = [y; x] and writes it into the two factor memories (Re(L), Im(L));
//   * fbs_proc reads the previous factor, computes the channel h(n), the beamformer w(n),
//     the matched-filter output z(n) and the Viterbi metric table;
//   * viterbi_proc demodulates and returns the symbols of the maximum-likelihood path x(n),
//     which close the decision-directed loop back to the Cholesky processor.
//
// Symbol timing: each sym_valid (accepted while idle) starts one symbol slot. In the slot
// the Cholesky update and the FBS run concurrently on the two banks of the factor memories
// (the FBS reads the factor of the previous update while the new one is being written);
// when the FBS is done the Viterbi step starts. sym_done pulses when all three have
// finished, and the banks swap.
//
// Alignment (this design's choice): the matched filter delays its output by L-1 symbols and
// the Viterbi decisions of the previous slot are one symbol older still, so the Cholesky
// update in the slot of sample n uses y(n-L) together with x(n-L) = [x_{n-L} ..
// x_{n-2L+1}]. In training mode (`training` high) those symbols come from the training bits
// delivered with each sample (x_train, the symbol belonging to y(n)); otherwise from the
// decisions xhat of the Viterbi processor. Symbols are +-1 mapped to +-0.5 in the
// Cholesky word.
//
// Other controls: init loads delta*I into both factor banks; burst_start clears the trellis;
// tb_start traces back the burst and streams the decided bits on bit_valid / bit_out.
module jste_chip
  import jste_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter int unsigned L    = 5,
  parameter int unsigned ITER = 16,
  parameter int unsigned NSYM = 160,
  localparam int unsigned N   = M + L,
  localparam int unsigned TW  = $clog2(NSYM + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              burst_start,
  input  logic              sym_valid,
  input  logic signed [15:0] y_re [M],
  input  logic signed [15:0] y_im [M],
  input  logic              training,
  input  logic              x_train,
  input  logic              tb_start,
  output logic              busy,
  output logic              sym_done,
  output cfp_t              h_out [L],
  output cfp_t              w_out [M],
  output cfp_t              z_out,
  output logic [L-1:0]      xhat,
  output logic [TW-1:0]     nsym,
  output logic              bit_valid,
  output logic              bit_out,
  output logic              tb_done
);

  localparam int unsigned W   = CW;
  localparam int unsigned AW  = $clog2(2 * N * N);
  localparam int unsigned NS  = 1 << (L - 1);
  localparam int unsigned VAW = $clog2(NS + 1);
  localparam logic signed [W-1:0] XAMP = W'(16384);   // symbol amplitude 0.5

  // ---------------------------------------------------------------- slot control
  typedef enum logic [1:0] {T_IDLE, T_RUN, T_END} tstate_t;
  tstate_t tstate;
  logic    bank;
  logic    ch_done_seen, vit_done_seen;
  logic    ch_start, fbs_start, vit_start;

  logic signed [15:0] yd_re [L+1][M];   // y(n), y(n-1), ..., y(n-L)
  logic signed [15:0] yd_im [L+1][M];
  logic [2*L-1:0]     tr;               // training symbols, tr[d] belongs to y(n-d)
  logic               cur_training;

  // ---------------------------------------------------------------- blocks
  logic                ch_busy, ch_done, ram_we;
  logic [AW-1:0]       ch_raddr, ram_waddr, fbs_addr;
  logic signed [W-1:0] re_a, im_a, re_b, im_b, re_wd, im_wd;
  logic signed [W-1:0] g_re [N], g_im [N];

  cholesky_proc #(.M(M), .L(L), .W(W), .ITER(ITER)) u_chol (
    .clk, .rst_n, .init, .start(ch_start), .bank_rd(bank), .g_re, .g_im,
    .busy(ch_busy), .done(ch_done),
    .ram_raddr(ch_raddr), .ram_re_rdata(re_a), .ram_im_rdata(im_a),
    .ram_we, .ram_waddr, .ram_re_wdata(re_wd), .ram_im_wdata(im_wd));

  chol_ram #(.W(W), .DEPTH(2 * N * N)) u_ram_re (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(re_wd),
    .raddr_a(ch_raddr), .rdata_a(re_a), .raddr_b(fbs_addr), .rdata_b(re_b));

  chol_ram #(.W(W), .DEPTH(2 * N * N)) u_ram_im (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(im_wd),
    .raddr_a(ch_raddr), .rdata_a(im_a), .raddr_b(fbs_addr), .rdata_b(im_b));

  logic                fbs_busy, fbs_done, vit_we;
  logic [VAW-1:0]      vit_addr;
  logic signed [15:0]  vit_data;
  logic signed [15:0]  ycur_re [M], ycur_im [M];

  always_comb begin
    for (int m = 0; m < M; m++) begin
      ycur_re[m] = yd_re[0][m];
      ycur_im[m] = yd_im[0][m];
    end
  end

  fbs_proc #(.M(M), .L(L), .W(W), .FRAC(CFRAC)) u_fbs (
    .clk, .rst_n, .start(fbs_start), .bank_rd(bank), .y_re(ycur_re), .y_im(ycur_im),
    .busy(fbs_busy), .done(fbs_done), .lram_addr(fbs_addr), .lram_re(re_b),
    .lram_im(im_b), .h_out, .w_out, .z_out, .vit_we, .vit_addr, .vit_data);

  logic vit_busy, vit_step_done;
  viterbi_proc #(.L(L), .NSYM(NSYM)) u_vit (
    .clk, .rst_n, .ww_we(vit_we), .ww_addr(vit_addr), .ww_data(vit_data),
    .burst_start, .sym_start(vit_start), .tb_start, .busy(vit_busy),
    .step_done(vit_step_done), .xhat, .nsym, .bit_valid, .bit_out, .tb_done);

  // ---------------------------------------------------------------- g = [y(n-L); x(n-L)]
  always_comb begin
    for (int m = 0; m < M; m++) begin
      g_re[m] = W'(yd_re[L][m]);
      g_im[m] = W'(yd_im[L][m]);
    end
    for (int l = 0; l < L; l++) begin
      if (cur_training) g_re[M + l] = tr[L + l] ? XAMP : -XAMP;
      else              g_re[M + l] = xhat[l] ? XAMP : -XAMP;
      g_im[M + l] = '0;
    end
  end

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate        <= T_IDLE;
      bank          <= 1'b0;
      ch_done_seen  <= 1'b0;
      vit_done_seen <= 1'b0;
      ch_start      <= 1'b0;
      fbs_start     <= 1'b0;
      vit_start     <= 1'b0;
      sym_done      <= 1'b0;
      tr            <= '0;
      cur_training  <= 1'b1;
      for (int d = 0; d <= L; d++)
        for (int m = 0; m < M; m++) begin
          yd_re[d][m] <= '0;
          yd_im[d][m] <= '0;
        end
    end else begin
      ch_start  <= 1'b0;
      fbs_start <= 1'b0;
      vit_start <= 1'b0;
      sym_done  <= 1'b0;
      unique case (tstate)
        T_IDLE: if (sym_valid && !ch_busy) begin
          for (int m = 0; m < M; m++) begin
            yd_re[0][m] <= y_re[m];
            yd_im[0][m] <= y_im[m];
          end
          for (int d = 1; d <= L; d++) begin
            yd_re[d] <= yd_re[d-1];
            yd_im[d] <= yd_im[d-1];
          end
          tr            <= {tr[2*L-2:0], x_train};
          cur_training  <= training;
          ch_start      <= 1'b1;
          fbs_start     <= 1'b1;
          ch_done_seen  <= 1'b0;
          vit_done_seen <= 1'b0;
          tstate        <= T_RUN;
        end
        T_RUN: begin
          if (fbs_done) vit_start <= 1'b1;
          if (ch_done) ch_done_seen <= 1'b1;
          if (vit_step_done) vit_done_seen <= 1'b1;
          if ((ch_done_seen || ch_done) && (vit_done_seen || vit_step_done)) tstate <= T_END;
        end
        T_END: begin
          bank     <= !bank;
          sym_done <= 1'b1;
          tstate   <= T_IDLE;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  assign busy = (tstate != T_IDLE) || ch_busy || fbs_busy || vit_busy;

endmodule
