// seq_div: unsigned restoring divider, one quotient bit per clock.
//
// Helper of the A/F generation stage. Computes quotient = num / den and
// the remainder for W-bit operands. Pulse `start` with the operands while
// `busy` is low; `done` pulses W + 1 cycles later with the results held.
// Division by zero returns an all-ones quotient.
module seq_div #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0]         d;
  logic [W:0]           r;
  logic [W-1:0]         q;
  logic [$clog2(W+1):0] n;
  logic [W:0]           r_shift, r_sub;

  assign r_shift = {r[W-1:0], q[W-1]};
  assign r_sub   = r_shift - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0; r <= '0; q <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0; quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          d    <= den;
          r    <= '0;
          q    <= num;
          n    <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (!r_sub[W]) begin
          r <= r_sub;
          q <= {q[W-2:0], 1'b1};
        end else begin
          r <= r_shift;
          q <= {q[W-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (32'(n) == W - 1) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= (d == '0) ? '1 : (!r_sub[W] ? {q[W-2:0], 1'b1} : {q[W-2:0], 1'b0});
          remainder <= (d == '0) ? '0 : (!r_sub[W] ? r_sub[W-1:0] : r_shift[W-1:0]);
        end
      end
    end
  end
endmodule
