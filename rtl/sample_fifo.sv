// sample_fifo: synchronous first-in first-out buffer for ADC samples.
//
// Samples captured from the converter are queued here until the read-write
// controller moves them into the sample-block RAM. The document gives the
// buffer as 256x1024; this design reads that as 1024 entries and keeps the
// 8-bit sample width (the document's samples are 8 bits). The storage is a
// plain array with binary read and write pointers one bit wider than the
// address, so full and empty are told apart by the top pointer bit.
//
// Interface and timing: `wr_en` with `wr_data` writes when not full; a write
// while full is dropped and sets the sticky `overflow` flag. `rd_en` when
// not empty pops the head, which appears on `rd_data` one cycle later
// (`rd_valid` marks that cycle). `flush` empties the buffer and clears
// `overflow`; it takes priority over a write and a read in the same cycle.
// `count` is the current fill level.
module sample_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1024   // must be a power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_valid,
  output logic                     full,
  output logic                     empty,
  output logic                     overflow,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign count = wptr - rptr;
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign empty = (wptr == rptr);
  assign do_wr = wr_en && !full && !flush;
  assign do_rd = rd_en && !empty && !flush;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
    if (do_rd) rd_data <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (flush) begin
        wptr     <= '0;
        rptr     <= '0;
        overflow <= 1'b0;
      end else begin
        if (do_wr) wptr <= wptr + 1'b1;
        if (do_rd) rptr <= rptr + 1'b1;
        if (wr_en && full) overflow <= 1'b1;
      end
    end
  end

  // a pop is only legal when something is stored
  assert property (@(posedge clk) disable iff (!rst_n) (rd_valid |-> $past(!empty)));
endmodule
