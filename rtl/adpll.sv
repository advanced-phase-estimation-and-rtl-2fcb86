// adpll: all-digital phase-locked clock divider with a ring-counter DCO.
//
// The converter delivers samples faster than the processing clock, and the
// capture logic must sample the data at a fixed point of the converter's
// frame. This block produces that capture strobe. Following the document it
// is a simplified ADPLL "without a controller": a ring counter acts as the
// digitally controlled oscillator and divides the clock by DIV (four in the
// document), and a phase detector compares the reference edge with the ring
// position. There is no loop filter: on a phase error the detector moves
// the ring straight to the phase the reference demands. The lock counter,
// the strobe position and the direct phase reset are this design's own
// choices; the document only names the ADPLL and its ring-counter DCO.
//
// Interface and timing: `ref_in` is the converter's frame reference,
// synchronous to `clk`, with a rising edge every DIV cycles. The ring is
// one-hot; `clk_div` is the divided clock (high for the first half of the
// ring), `tick` is high for one cycle per ring turn, TICK_POS positions
// after the ring start. `locked` rises after LOCK_COUNT consecutive
// reference edges that find the ring already in place and drops on any
// misaligned edge; `slip` pulses when the ring was moved.
module adpll #(
  parameter int unsigned DIV        = 4,
  parameter int unsigned TICK_POS   = 2,
  parameter int unsigned LOCK_COUNT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_in,
  output logic clk_div,
  output logic tick,
  output logic locked,
  output logic slip
);
  logic [DIV-1:0]                ring;
  logic                          ref_q;
  logic                          ref_edge;
  logic [$clog2(LOCK_COUNT+1):0] good;

  assign ref_edge = ref_in && !ref_q;
  // the ring must be at its last position when the reference edge arrives,
  // so that position 0 coincides with the cycle after the edge
  logic in_phase;
  assign in_phase = ring[DIV-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring   <= DIV'(1);
      ref_q  <= 1'b0;
      good   <= '0;
      locked <= 1'b0;
      slip   <= 1'b0;
    end else begin
      ref_q <= ref_in;
      slip  <= 1'b0;
      if (ref_edge && !in_phase) begin
        // phase error: reset the oscillator phase directly
        ring   <= DIV'(1);
        slip   <= 1'b1;
        good   <= '0;
        locked <= 1'b0;
      end else begin
        ring <= {ring[DIV-2:0], ring[DIV-1]};
        if (ref_edge) begin
          if (32'(good) < LOCK_COUNT) good <= good + 1'b1;
          else                        locked <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    clk_div = 1'b0;
    for (int i = 0; i < int'(DIV / 2); i++) clk_div |= ring[i];
  end
  assign tick = ring[TICK_POS];

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring));
endmodule
