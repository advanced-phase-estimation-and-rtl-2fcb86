// fsm_ctrl: read-write controller and sequencer of the phase estimator.
//
// The document has a read-write state machine record a block of samples
// from the input FIFO into RAM, converting the converter's unsigned codes
// to two's complement on the way, and then hand the block to the block
// scan. This controller does that and also sequences the later stages, so
// one `start` runs a complete estimate:
//   FLUSH  empty the FIFO so the block holds contiguous fresh samples,
//   FILL   allow capture, pop the FIFO and write M converted samples,
//   SCAN   stop capture, read the block back and stream it to block_scan,
//   AFP    start amplitude/frequency/initial phase generation,
//   ITER   start the iterative phase model (skipped if AFP found no
//          usable transitions, which is then reported as `error`),
//   DONE   pulse `done`.
// Sequencing the later stages from this controller, and the flush before
// each block, are this design's choices.
//
// Conversion: offset binary u to two's complement is u - 2^(W-1), i.e. the
// top bit inverted.
//
// Interface and timing: FIFO reads have one cycle latency (`fifo_rd_valid`),
// RAM reads likewise. FILL pops at most one sample per cycle, so it lasts
// M + 2 cycles when a sample is captured every cycle (one cycle for the
// flushed FIFO to receive its first sample, one of read latency); SCAN
// lasts M + 2 cycles. `scan_owns_ram`
// is high while the controller drives the RAM read address; `scan_valid`
// marks the cycles in which the RAM's read data is the next sample of the
// block, which the block scan takes straight from the RAM.
module fsm_ctrl
  import pe_pkg::*;
#(
  parameter int unsigned M  = BLOCK_M,
  parameter int unsigned SW = SAMPLE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  // FIFO side
  output logic                    fifo_flush,
  output logic                    capture_en,
  output logic                    fifo_rd_en,
  input  logic                    fifo_empty,
  input  logic                    fifo_rd_valid,
  input  logic [SW-1:0]           fifo_rd_data,
  // RAM side
  output logic                    ram_we,
  output logic [$clog2(M)-1:0]    ram_waddr,
  output logic signed [SW-1:0]    ram_wdata,
  output logic                    scan_owns_ram,
  output logic [$clog2(M)-1:0]    ram_raddr,
  // block scan
  output logic                    scan_clear,
  output logic                    scan_valid,
  // A/F/P generation and iterative model
  output logic                    afp_start,
  input  logic                    afp_done,
  input  logic                    afp_valid,
  output logic                    iter_start,
  input  logic                    iter_done,
  // status
  output logic                    busy,
  output logic                    done,
  output logic                    error
);
  localparam int unsigned AW = $clog2(M);

  typedef enum logic [2:0] {S_IDLE, S_FLUSH, S_FILL, S_SCAN, S_AFP, S_ITER, S_DONE} st_e;
  st_e st;

  logic [AW:0] n_pop;      // FIFO reads issued
  logic [AW:0] n_wr;       // RAM writes done
  logic [AW:0] n_rd;       // RAM reads issued during SCAN
  logic        rd_pend;    // RAM read data arrives next cycle

  assign fifo_flush    = (st == S_FLUSH);
  assign capture_en    = (st == S_FILL);
  assign fifo_rd_en    = (st == S_FILL) && !fifo_empty && (32'(n_pop) < M);
  assign scan_owns_ram = (st == S_SCAN);
  assign ram_raddr     = n_rd[AW-1:0];
  assign scan_valid    = rd_pend;
  assign busy          = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      n_pop <= '0; n_wr <= '0; n_rd <= '0; rd_pend <= 1'b0;
      ram_we <= 1'b0; ram_waddr <= '0; ram_wdata <= '0;
      scan_clear <= 1'b0; afp_start <= 1'b0; iter_start <= 1'b0;
      done <= 1'b0; error <= 1'b0;
    end else begin
      ram_we     <= 1'b0;
      scan_clear <= 1'b0;
      afp_start  <= 1'b0;
      iter_start <= 1'b0;
      done       <= 1'b0;
      rd_pend    <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= S_FLUSH;
          error <= 1'b0;
        end
        S_FLUSH: begin
          n_pop <= '0;
          n_wr  <= '0;
          st    <= S_FILL;
        end
        S_FILL: begin
          if (fifo_rd_en) n_pop <= n_pop + 1'b1;
          if (fifo_rd_valid) begin
            ram_we    <= 1'b1;
            ram_waddr <= n_wr[AW-1:0];
            ram_wdata <= {~fifo_rd_data[SW-1], fifo_rd_data[SW-2:0]};
            n_wr      <= n_wr + 1'b1;
            if (32'(n_wr) == M - 1) begin
              st         <= S_SCAN;
              n_rd       <= '0;
              scan_clear <= 1'b1;
            end
          end
        end
        S_SCAN: begin
          // the last RAM write lands on this first SCAN edge; a read of the
          // same address in this cycle would see the old word, so reads
          // start one cycle later
          if (scan_clear) begin
            // wait one cycle
          end else if (32'(n_rd) < M) begin
            rd_pend <= 1'b1;
            n_rd    <= n_rd + 1'b1;
          end else if (!rd_pend) begin
            st        <= S_AFP;
            afp_start <= 1'b1;
          end
        end
        S_AFP: if (afp_done) begin
          if (afp_valid) begin
            st         <= S_ITER;
            iter_start <= 1'b1;
          end else begin
            error <= 1'b1;
            st    <= S_DONE;
          end
        end
        S_ITER: if (iter_done) st <= S_DONE;
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fifo_rd_valid |-> (st == S_FILL));
endmodule
