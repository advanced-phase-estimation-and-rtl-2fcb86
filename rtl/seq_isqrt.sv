// seq_isqrt: integer square root, one result bit per clock.
//
// Helper of the A/F generation stage: root = floor(sqrt(radicand)) for a
// W-bit radicand (W even), by the digit-by-digit method that tries each
// result bit from the top. Pulse `start` while `busy` is low; `done` pulses
// W/2 + 1 cycles later with `root` held.
module seq_isqrt #(
  parameter int unsigned W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  logic [W-1:0]         x;      // remaining radicand
  logic [W/2+2:0]       rem;    // partial remainder
  logic [W/2-1:0]       q;
  logic [$clog2(W):0]   n;
  logic [W/2+2:0]       trial, rem_in;

  assign rem_in = {rem[W/2:0], x[W-1:W-2]};
  assign trial  = {1'b0, q, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; rem <= '0; q <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x    <= radicand;
          rem  <= '0;
          q    <= '0;
          n    <= '0;
          busy <= 1'b1;
        end
      end else begin
        x <= {x[W-3:0], 2'b00};
        if (rem_in >= trial) begin
          rem <= rem_in - trial;
          q   <= {q[W/2-2:0], 1'b1};
        end else begin
          rem <= rem_in;
          q   <= {q[W/2-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (32'(n) == W/2 - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= (rem_in >= trial) ? {q[W/2-2:0], 1'b1} : {q[W/2-2:0], 1'b0};
        end
      end
    end
  end
endmodule
