// tb_cordic_cell: self-checking test of the iterative CORDIC cell.
// Random vectors are vectored (magnitude and zero y checked against sqrt), then a second
// random vector is rotated with the direction word obtained, and compared with a rotation
// by -atan2(y, x) computed in real arithmetic. The latency (ITER + 2 cycles) is checked.
module tb_cordic_cell;
  localparam int W = 20;
  localparam int ITER = 16;
  localparam real SC = 32768.0;

  logic clk = 0, rst_n = 0;
  logic start = 0, mode = 0;
  logic signed [W-1:0] x_in = 0, y_in = 0, x_out, y_out;
  logic [ITER:0] dir_in = 0, dir_out;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic_cell #(.W(W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic md, input int x, input int y, input logic [ITER:0] d,
                     output int cyc);
    @(negedge clk);
    mode = md; x_in = W'(x); y_in = W'(y); dir_in = d; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  function automatic void chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endfunction

  initial begin
    int x, y, a, b, cyc;
    real ang, mag, er, ei, tol;
    logic [ITER:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      x = int'($urandom_range(0, 120000)) - 60000;
      y = int'($urandom_range(0, 120000)) - 60000;
      a = int'($urandom_range(0, 120000)) - 60000;
      b = int'($urandom_range(0, 120000)) - 60000;
      run(1'b0, x, y, '0, cyc);
      d = dir_out;
      mag = $sqrt(real'(x) * x + real'(y) * y);
      chk("vec x", real'(x_out), mag, 8.0);
      chk("vec y", real'(y_out), 0.0, 8.0);
      checks++;
      if (cyc != ITER + 2) begin
        failures++;
        $display("FAIL latency %0d", cyc);
      end
      run(1'b1, a, b, d, cyc);
      ang = $atan2(real'(y), real'(x));
      er = real'(a) * $cos(ang) + real'(b) * $sin(ang);
      ei = -real'(a) * $sin(ang) + real'(b) * $cos(ang);
      // the angle found by vectoring is only as fine as the vector is long
      tol = 8.0 + 16.0 * $sqrt(real'(a) * a + real'(b) * b) / (mag + 1.0);
      chk("rot x", real'(x_out), er, tol);
      chk("rot y", real'(y_out), ei, tol);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
