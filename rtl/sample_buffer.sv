// Block buffer: simple dual-port RAM with one synchronous write port and one
// synchronous read port (read data valid one cycle after the address).
//
// The receiver stores a whole codeword of input samples x[k], and of
// matched-filter outputs q[j], so that the block can be re-processed for
// every timing hypothesis and every decoder iteration. The document names
// the buffers; depth, width and the one-cycle read latency are choices of
// this design.
module sample_buffer #(
  parameter int DEPTH = 8192,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
