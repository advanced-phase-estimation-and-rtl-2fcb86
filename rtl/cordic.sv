// cordic: iterative rotation-mode CORDIC giving sin and cos of an angle.
//
// The phase refinement needs sin(theta) and cos(theta) for every sample of
// the block; the document names a CORDIC core as their source. This unit
// rotates the vector (K, 0) toward the requested angle with shift-and-add
// micro-rotations, one per clock, where K pre-compensates the CORDIC gain.
//
// Angle format (this design's choice): an unsigned 32-bit fraction of one
// turn, 2^32 = 2*pi, so any phase wraps modulo 2*pi without extra logic.
// Angles in the left half plane are first rotated by half a turn and the
// result negated, so the micro-rotations only have to cover +/-90 degrees.
// Outputs are signed Q2.30 (1.0 = 2^30). The number of micro-rotations
// ITERATIONS (default 30, at most 30) sets the accuracy, about 2^-28.
//
// Timing: pulse `start` with `angle` while `busy` is low; `done` pulses
// ITERATIONS + 1 cycles later with `sin_out`/`cos_out` valid and held.
module cordic
  import pe_pkg::*;
#(
  parameter int unsigned ITERATIONS = 30
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        angle,
  output logic               busy,
  output logic               done,
  output logic signed [31:0] sin_out,
  output logic signed [31:0] cos_out
);

  logic signed [31:0] x, y, z;
  logic               neg;
  logic [4:0]         it;
  logic               run;

  logic signed [31:0] x_sh, y_sh;
  logic [31:0]        atan_i;
  assign x_sh   = x >>> it;
  assign y_sh   = y >>> it;
  assign atan_i = ATAN_TABLE[it];
  assign busy   = run;

  // next micro-rotation; its result is also the output after the last one
  logic signed [31:0] x_next, y_next, z_next;
  always_comb begin
    if (!z[31]) begin
      x_next = x - y_sh;
      y_next = y + x_sh;
      z_next = z - $signed(atan_i);
    end else begin
      x_next = x + y_sh;
      y_next = y - x_sh;
      z_next = z + $signed(atan_i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0;
      neg <= 1'b0; it <= '0; run <= 1'b0;
      done <= 1'b0; sin_out <= '0; cos_out <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          // quadrant fold: angles in [90, 270) degrees are turned by 180
          neg <= angle[31] ^ angle[30];
          z   <= (angle[31] ^ angle[30]) ? $signed({~angle[31], angle[30:0]})
                                         : $signed(angle);
          x   <= CORDIC_K;
          y   <= '0;
          it  <= '0;
          run <= 1'b1;
        end
      end else begin
        x <= x_next;
        y <= y_next;
        z <= z_next;
        if (32'(it) == ITERATIONS - 1) begin
          run     <= 1'b0;
          done    <= 1'b1;
          cos_out <= neg ? -x_next : x_next;
          sin_out <= neg ? -y_next : y_next;
        end
        it <= it + 5'd1;
      end
    end
  end

endmodule
