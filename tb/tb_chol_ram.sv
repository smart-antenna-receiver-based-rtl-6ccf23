// tb_chol_ram: self-checking test of the factor memory: random writes, then reads through
// both read ports are compared with a shadow copy kept by the testbench.
module tb_chol_ram;
  localparam int W = 20, DEPTH = 162, AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic signed [W-1:0] wdata = 0, rdata_a, rdata_b;
  int checks = 0, failures = 0;
  int shadow [DEPTH];

  chol_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = int'(wdata);
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); we = 1; waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom); shadow[waddr] = int'(wdata);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      raddr_a = AW'($urandom_range(0, DEPTH - 1));
      raddr_b = AW'($urandom_range(0, DEPTH - 1));
      #1;
      checks += 2;
      if (int'(rdata_a) != shadow[raddr_a]) begin failures++; $display("FAIL port a %0d", raddr_a); end
      if (int'(rdata_b) != shadow[raddr_b]) begin failures++; $display("FAIL port b %0d", raddr_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
