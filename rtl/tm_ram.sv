// tm_ram: on-chip block RAM buffer for one matrix (or one half of it).
//
// Simple dual-port memory: one synchronous write port and one synchronous
// read port. The read data appears on rdata in the clock cycle after raddr is
// presented (one cycle of read latency, as in an FPGA block RAM), which is the
// memory-port timing every accelerator of this design expects. The matrices
// are stored row-major: element (r, c) of an R x C matrix is at r*C + c.
// Contents are not reset; every word is written before it is read.
// A complex matrix is stored as {real, imaginary} in one word, so both halves
// are read in the same cycle and processed side by side.
module tm_ram #(
  parameter  int DEPTH = 256,
  parameter  int WIDTH = 64,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
