// tb_fbs_agu: self-checking test of the address generation unit: row-major and transposed
// addressing of a 9 x 9 matrix in two banks, and vector addressing (stride 0).
module tb_fbs_agu;
  localparam int AW = 8;
  logic [AW-1:0] base, stride, row, col, addr;
  logic transpose;
  int checks = 0, failures = 0;

  fbs_agu #(.AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          for (int tr = 0; tr < 2; tr++) begin
            base = AW'(b * 81); stride = 9; row = AW'(r); col = AW'(c); transpose = 1'(tr);
            #1;
            e = b * 81 + (tr ? c * 9 + r : r * 9 + c);
            checks++;
            if (int'(addr) != e) begin failures++; $display("FAIL %0d %0d %0d", r, c, tr); end
          end
    for (int i = 0; i < 20; i++) begin
      base = 8'd5; stride = 0; row = 0; col = AW'(i); transpose = 0;
      #1;
      checks++;
      if (int'(addr) != 5 + i) begin failures++; $display("FAIL vector %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
