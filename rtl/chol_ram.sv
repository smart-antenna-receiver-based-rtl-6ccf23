// chol_ram: storage for one part (real or imaginary) of the Cholesky factor Lbar(n).
//
// Two instances sit between the Cholesky processor and the FBS processor, one for Re(L) and
// one for Im(L). The memory holds two banks of N x N words (element (i,k) of bank b at
// address b*N*N + i*N + k). While the Cholesky processor reads the previous factor from one
// bank and writes the updated factor into the other, the FBS processor reads the previous
// factor from the first bank through its own port; the banks swap roles every update. This
// realises the pipelining between the two processors that the architecture calls for; the
// two-bank organisation and the port count are this design's choices.
//
// Interface: one synchronous write port, two asynchronous (combinational) read ports.
module chol_ram #(
  parameter int unsigned W     = 20,
  parameter int unsigned DEPTH = 162,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr_a,
  output logic signed [W-1:0] rdata_a,
  input  logic [AW-1:0]       raddr_b,
  output logic signed [W-1:0] rdata_b
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
