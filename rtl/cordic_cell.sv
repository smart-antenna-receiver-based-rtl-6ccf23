// cordic_cell: iterative CORDIC used three times in the Cholesky processor (the theta-CORDIC
// and the master and slave phi-CORDICs).
//
// Vectoring mode (mode = 0) rotates (x_in, y_in) onto the positive x axis and reports, in
// dir_out, the sequence of micro-rotation directions it took: bit ITER is a 180-degree
// pre-rotation used when x_in < 0, bit i (i < ITER) is 1 when step i rotated clockwise.
// Rotation mode (mode = 1) applies a direction word given in dir_in to (x_in, y_in), so a
// vector can be turned by exactly the angle a previous vectoring operation found. This is
// how one Givens rotation is shared between the pivot and the rest of a column, and how
// the master phi-CORDIC hands its rotation ("rot") to the slave.
//
// Both outputs are multiplied by 1/K (K = 1.6468, the CORDIC gain) after the last step, so
// the cell is a pure rotation. Internally the word is two bits wider than W for the gain.
//
// Timing: start is sampled while idle; done pulses for one cycle ITER + 2 cycles later with
// x_out, y_out and dir_out valid (they hold until the next start).
// The document gives the three-cell structure and the function of each cell; the iterative
// (one micro-rotation per clock) form and the gain compensation are this design's choices.
module cordic_cell #(
  parameter int unsigned W    = 20,
  parameter int unsigned ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                mode,      // 0 vectoring, 1 rotation
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic [ITER:0]       dir_in,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic [ITER:0]       dir_out
);

  localparam int unsigned IW = W + 2;
  // 1/K in Q1.17 (0.6072529350 * 2^17)
  localparam logic signed [18:0] KINV = 19'sd79595;

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_COMP} state_t;
  state_t state;

  logic signed [IW-1:0] x, y;
  logic [ITER:0]        dirs;
  logic                 md;
  logic [$clog2(ITER+1)-1:0] it;

  logic signed [IW-1:0] xs, ys;
  logic                 cw;
  assign xs = x >>> it;
  assign ys = y >>> it;
  assign cw = md ? dirs[it] : (y >= 0);

  logic signed [IW+18:0] xk, yk;
  assign xk = x * KINV;
  assign yk = y * KINV;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      x       <= '0;
      y       <= '0;
      dirs    <= '0;
      md      <= 1'b0;
      it      <= '0;
      done    <= 1'b0;
      x_out   <= '0;
      y_out   <= '0;
      dir_out <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          md <= mode;
          it <= '0;
          if ((mode && dir_in[ITER]) || (!mode && x_in < 0)) begin
            x <= -IW'(x_in);
            y <= -IW'(y_in);
          end else begin
            x <= IW'(x_in);
            y <= IW'(y_in);
          end
          dirs       <= mode ? dir_in : '0;
          dirs[ITER] <= mode ? dir_in[ITER] : (x_in < 0);
          state      <= S_ITER;
        end
        S_ITER: begin
          if (cw) begin
            x <= x + ys;
            y <= y - xs;
          end else begin
            x <= x - ys;
            y <= y + xs;
          end
          if (!md) dirs[it] <= cw;
          if (it == ($clog2(ITER+1))'(ITER - 1)) state <= S_COMP;
          else it <= it + 1'b1;
        end
        S_COMP: begin
          x_out   <= W'(xk >>> 17);
          y_out   <= W'(yk >>> 17);
          dir_out <= dirs;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
