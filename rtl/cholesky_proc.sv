// cholesky_proc: exponentially weighted rank-one update of the Cholesky factor of the joint
// space-time covariance matrix,
//     Lbar(n) Lbar(n)^H = lambda * Lbar(n-1) Lbar(n-1)^H + g(n) g(n)^H,
// with g(n) = [y(n); x(n)] (M antenna samples followed by L training or decided symbols).
//
// How it works: column k of [sqrt(lambda) Lbar | g] is processed with one complex Givens
// rotation made of two real ones, each done by a CORDIC cell:
//   * theta-CORDIC, vectoring on g(k): cancels the imaginary part of the pivot. The same
//     micro-rotations are then applied (rotation mode) to every g(i), i > k, which multiplies
//     g by a unit phase and leaves g g^H unchanged.
//   * master phi-CORDIC, vectoring on (sqrt(lambda) L(k,k), |g(k)|): cancels the (now real)
//     pivot of g and gives the new, real, positive diagonal element. For every i > k the
//     master rotates (sqrt(lambda) Re L(i,k), Re g(i)) and the slave phi-CORDIC, driven by the
//     master's direction word ("rot"), rotates the imaginary parts. The first results are the
//     new column of Lbar, the second the updated g that feeds back to the theta-CORDIC for the
//     next column.
// After N = M + L columns the factor is completely updated. The factor lives in two external
// memories (real and imaginary part), each with two banks: the previous factor is read from
// bank `bank_rd`, the new one is written to the other bank.
//
// Word format: 20-bit two's complement with 15 fractional bits (16-bit precision extended to
// 20 bits against overflow, as the document specifies). The forgetting factor is applied as
// a multiplication by sqrt(lambda) (SQRT_LAMBDA, Q1.17) when an element is read; its value
// (lambda = 0.9) and the initial factor delta*I (loaded by `init`) are this design's choices.
//
// Timing: every CORDIC operation takes ITER + 2 cycles plus one control cycle. The theta cell
// works one element ahead of the phi pair: the theta rotation of g(k+1) runs beside the phi
// vectoring of column k, and that of g(i+1) beside the phi rotation of element i. Column k
// therefore costs (N - k + 1) operation slots, and an update takes about
// ((N+1)(N+2)/2 - 1) * (ITER + 3) cycles (1026 for N = 9, ITER = 16). The document reports
// 390 cycles for its systolic version; this schedule (the theta vectoring of the next column
// still waits for the last phi rotation of the current one) uses one set of three cells.
module cholesky_proc #(
  parameter int unsigned M           = 4,
  parameter int unsigned L           = 5,
  parameter int unsigned W           = 20,
  parameter int unsigned ITER        = 16,
  parameter logic signed [18:0] SQRT_LAMBDA = 19'sd124346,  // sqrt(0.9) in Q1.17
  parameter logic signed [19:0] DELTA       = 20'sd2048,    // initial diagonal, 1/16
  localparam int unsigned N          = M + L,
  localparam int unsigned AW         = $clog2(2 * N * N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic                start,
  input  logic                bank_rd,
  input  logic signed [W-1:0] g_re [N],
  input  logic signed [W-1:0] g_im [N],
  output logic                busy,
  output logic                done,
  // factor memories (shared address for Re(L) and Im(L))
  output logic [AW-1:0]       ram_raddr,
  input  logic signed [W-1:0] ram_re_rdata,
  input  logic signed [W-1:0] ram_im_rdata,
  output logic                ram_we,
  output logic [AW-1:0]       ram_waddr,
  output logic signed [W-1:0] ram_re_wdata,
  output logic signed [W-1:0] ram_im_wdata
);

  localparam int unsigned CNT = $clog2(N + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_TH_PIV, S_TH_PIV_W, S_PH_PIV, S_PH_PIV_W,
    S_PH_ROT, S_PH_ROT_W, S_DONE
  } state_t;
  state_t state;

  logic [CNT-1:0] k, i;
  logic           bank;
  logic [AW-1:0]  init_addr;
  logic [CNT-1:0] init_r, init_c;
  logic signed [W-1:0] gr [N];
  logic signed [W-1:0] gi [N];
  logic [ITER:0]  dir_th, dir_ph;

  // CORDIC cells
  logic                th_start, th_mode, th_done;
  logic signed [W-1:0] th_x, th_y, th_xo, th_yo;
  logic [ITER:0]       th_dir_o;
  logic                ms_start, ms_mode, ms_done;
  logic signed [W-1:0] ms_x, ms_y, ms_xo, ms_yo;
  logic [ITER:0]       ms_dir_o;
  logic signed [W-1:0] sl_x, sl_y, sl_xo, sl_yo;

  cordic_cell #(.W(W), .ITER(ITER)) u_theta (
    .clk, .rst_n, .start(th_start), .mode(th_mode), .x_in(th_x), .y_in(th_y),
    .dir_in(dir_th), .busy(), .done(th_done), .x_out(th_xo), .y_out(th_yo),
    .dir_out(th_dir_o));

  cordic_cell #(.W(W), .ITER(ITER)) u_master (
    .clk, .rst_n, .start(ms_start), .mode(ms_mode), .x_in(ms_x), .y_in(ms_y),
    .dir_in(dir_ph), .busy(), .done(ms_done), .x_out(ms_xo), .y_out(ms_yo),
    .dir_out(ms_dir_o));

  cordic_cell #(.W(W), .ITER(ITER)) u_slave (
    .clk, .rst_n, .start(ms_start & ms_mode), .mode(1'b1), .x_in(sl_x), .y_in(sl_y),
    .dir_in(dir_ph), .busy(), .done(), .x_out(sl_xo), .y_out(sl_yo),
    .dir_out());

  // sqrt(lambda) scaling of the previous factor
  function automatic logic signed [W-1:0] lam(input logic signed [W-1:0] v);
    logic signed [W+18:0] p;
    p = v * SQRT_LAMBDA;
    return W'(p >>> 17);
  endfunction

  function automatic logic [AW-1:0] addr(input logic b, input logic [CNT-1:0] r,
                                         input logic [CNT-1:0] c);
    return AW'(b ? N * N : 0) + AW'(r) * AW'(N) + AW'(c);
  endfunction

  // element for the overlapped theta rotation: k+1 beside the phi vectoring, i+1 beside
  // the phi rotation of element i (none when that would pass the last element)
  logic [CNT-1:0] tn;
  logic           tn_ok;
  assign tn    = ((state == S_PH_PIV) || (state == S_PH_PIV_W)) ? k + 1'b1 : i + 1'b1;
  assign tn_ok = (tn < CNT'(N));

  // operand selection
  always_comb begin
    ram_raddr = addr(bank, (state == S_PH_PIV) ? k : i, k);
    th_start  = (state == S_TH_PIV) ||
                (((state == S_PH_PIV) || (state == S_PH_ROT)) && tn_ok);
    th_mode   = (state != S_TH_PIV);
    th_x      = (state == S_TH_PIV) ? gr[k] : (tn_ok ? gr[tn] : '0);
    th_y      = (state == S_TH_PIV) ? gi[k] : (tn_ok ? gi[tn] : '0);
    ms_start  = (state == S_PH_PIV) || (state == S_PH_ROT);
    ms_mode   = (state == S_PH_ROT);
    ms_x      = lam(ram_re_rdata);
    ms_y      = (state == S_PH_ROT) ? gr[i] : gr[k];
    sl_x      = lam(ram_im_rdata);
    sl_y      = gi[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      k            <= '0;
      i            <= '0;
      bank         <= 1'b0;
      init_addr    <= '0;
      init_r       <= '0;
      init_c       <= '0;
      dir_th       <= '0;
      dir_ph       <= '0;
      done         <= 1'b0;
      ram_we       <= 1'b0;
      ram_waddr    <= '0;
      ram_re_wdata <= '0;
      ram_im_wdata <= '0;
      for (int n = 0; n < N; n++) begin
        gr[n] <= '0;
        gi[n] <= '0;
      end
    end else begin
      done   <= 1'b0;
      ram_we <= 1'b0;
      case (state)
        S_IDLE: begin
          if (init) begin
            init_addr <= '0;
            init_r    <= '0;
            init_c    <= '0;
            state     <= S_INIT;
          end else if (start) begin
            bank <= bank_rd;
            for (int n = 0; n < N; n++) begin
              gr[n] <= g_re[n];
              gi[n] <= g_im[n];
            end
            k     <= '0;
            state <= S_TH_PIV;
          end
        end
        // load delta * I into both banks
        S_INIT: begin
          ram_we       <= 1'b1;
          ram_waddr    <= init_addr;
          ram_re_wdata <= (init_r == init_c) ? DELTA : '0;
          ram_im_wdata <= '0;
          init_addr    <= init_addr + 1'b1;
          if (init_c == CNT'(N - 1)) begin
            init_c <= '0;
            init_r <= (init_r == CNT'(N - 1)) ? '0 : init_r + 1'b1;
          end else begin
            init_c <= init_c + 1'b1;
          end
          if (init_addr == AW'(2 * N * N - 1)) state <= S_DONE;
        end
        S_TH_PIV:   state <= S_TH_PIV_W;
        S_TH_PIV_W: if (th_done) begin
          dir_th <= th_dir_o;
          gr[k]  <= th_xo;          // |g(k)|
          gi[k]  <= '0;
          state  <= S_PH_PIV;
        end
        S_PH_PIV:   state <= S_PH_PIV_W;
        S_PH_PIV_W: if (ms_done) begin
          dir_ph       <= ms_dir_o;
          ram_we       <= 1'b1;
          ram_waddr    <= addr(!bank, k, k);
          ram_re_wdata <= ms_xo;
          ram_im_wdata <= '0;
          gr[k]        <= '0;
          i            <= k + 1'b1;
          if (tn_ok) begin          // theta rotation of g(k+1) ran alongside
            gr[tn] <= th_xo;
            gi[tn] <= th_yo;
          end
          if (k == CNT'(N - 1)) state <= S_DONE;
          else                  state <= S_PH_ROT;
        end
        S_PH_ROT:   state <= S_PH_ROT_W;
        S_PH_ROT_W: if (ms_done) begin
          ram_we       <= 1'b1;
          ram_waddr    <= addr(!bank, i, k);
          ram_re_wdata <= ms_xo;
          ram_im_wdata <= sl_xo;
          gr[i]        <= ms_yo;
          gi[i]        <= sl_yo;
          if (tn_ok) begin          // theta rotation of g(i+1) ran alongside
            gr[tn] <= th_xo;
            gi[tn] <= th_yo;
          end
          if (i == CNT'(N - 1)) begin
            k     <= k + 1'b1;
            state <= S_TH_PIV;
          end else begin
            i     <= i + 1'b1;
            state <= S_PH_ROT;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
