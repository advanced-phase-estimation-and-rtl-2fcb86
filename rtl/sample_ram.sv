// sample_ram: block RAM holding one block of samples in two's complement.
//
// The document records a block of 2400 8-bit samples in on-chip RAM; every
// later stage (block scan and the iterative phase model) reads the block
// from here. It is a simple dual-port memory: one write port used by the
// read-write controller and one read port, so the RAM maps onto an FPGA
// block RAM.
//
// Interface and timing: `we` writes `wdata` at `waddr` on the clock edge.
// `rdata` shows the word at `raddr` one cycle after the address is applied
// (registered read). Reading an address in the same cycle it is written
// returns the old word. The contents are not reset.
module sample_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 2400
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  logic [WIDTH-1:0]           wdata,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [WIDTH-1:0]           rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
