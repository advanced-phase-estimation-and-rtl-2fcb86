// afp_gen: amplitude, frequency and initial-phase generation.
//
// From the block measures of block_scan this stage derives the three
// starting values of the phase estimator:
//   amplitude   A = sqrt(2 * CS[np[N_np]] / np[N_np])            (Eq. 4)
//               (the block holds np[N_np] samples' worth of whole and
//               partial cycles, each of mean square A^2/2),
//   frequency   F/Fs = (N_np - 1) / (np[N_np] - np[1])             (Eq. 5)
//               (N_np - 1 whole periods lie between the first and the
//               last negative-to-positive transition),
//   phase       the phase of sample 0, obtained by running the
//               frequency back from the first transition, where the
//               cosine passes upward through zero (phase -90 degrees).
//               The transition lies between samples np[1]-1 and np[1],
//               so sample np[1] is taken half a sample period past it.
// The amplitude and frequency formulas follow the document; the initial
// phase rule and all number formats are this design's own.
//
// Arithmetic is integer: two sequential dividers run in parallel, then a
// sequential square root. Formats: `amp` unsigned Q16.16; `fnorm` is the
// frequency as a fraction of the sampling rate in 2^-32 units, which is
// also the phase advance per sample in 2^-32 turn units; `phi0` is an
// angle in 2^-32 turn units.
//
// Interface and timing: pulse `start` with the measures stable. `done`
// pulses about 2*CS_W + 2 cycles later (two 66-bit divisions in parallel,
// then a 33-bit root). `valid` is low when fewer than two transitions were
// found or np[N_np] = np[1], in which case the outputs are zero.
module afp_gen
  import pe_pkg::*;
#(
  parameter int unsigned IW = IDX_W,
  parameter int unsigned CW = CS_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] n_np,
  input  logic [IW-1:0] np_first,
  input  logic [IW-1:0] np_last,
  input  logic [CW-1:0] cs_last,
  output logic          done,
  output logic          valid,
  output logic [31:0]   amp,
  output logic [31:0]   fnorm,
  output logic [31:0]   phi0
);
  localparam int unsigned DW = CW + 34;   // holds CS << 33 and (N-1) << 32

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_SQRT, S_PHASE, S_DONE} st_e;
  st_e st;

  logic          da_start, da_done, df_done, sq_start, sq_done;
  logic          da_busy, df_busy, sq_busy;
  logic [DW-1:0] da_q, df_q, unused_ra, unused_rf;
  logic [DW/2-1:0] root;
  logic          got_a, got_f;
  logic [DW-1:0] q_a;
  logic [31:0]   f_q;
  logic [IW-1:0] first_q;

  logic ok;
  assign ok = (n_np >= IW'(2)) && (np_last > np_first);

  assign da_start = (st == S_IDLE) && start && ok;

  seq_div #(.W(DW)) u_div_amp (
    .clk, .rst_n, .start(da_start),
    .num(DW'(cs_last) << 33), .den(DW'(np_last)),
    .busy(da_busy), .done(da_done), .quotient(da_q), .remainder(unused_ra)
  );

  seq_div #(.W(DW)) u_div_frq (
    .clk, .rst_n, .start(da_start),
    .num(DW'(n_np - IW'(1)) << 32), .den(DW'(np_last - np_first)),
    .busy(df_busy), .done(df_done), .quotient(df_q), .remainder(unused_rf)
  );

  seq_isqrt #(.W(DW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(q_a),
    .busy(sq_busy), .done(sq_done), .root(root)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      got_a <= 1'b0; got_f <= 1'b0; q_a <= '0; f_q <= '0; first_q <= '0;
      sq_start <= 1'b0;
      done <= 1'b0; valid <= 1'b0; amp <= '0; fnorm <= '0; phi0 <= '0;
    end else begin
      done     <= 1'b0;
      sq_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          if (ok) begin
            st      <= S_DIV;
            got_a   <= 1'b0;
            got_f   <= 1'b0;
            first_q <= np_first;
          end else begin
            valid <= 1'b0;
            amp   <= '0;
            fnorm <= '0;
            phi0  <= '0;
            done  <= 1'b1;
          end
        end
        S_DIV: begin
          if (da_done) begin q_a <= da_q; got_a <= 1'b1; end
          if (df_done) begin f_q <= df_q[31:0]; got_f <= 1'b1; end
          if ((got_a || da_done) && (got_f || df_done)) begin
            st       <= S_SQRT;
            sq_start <= 1'b1;
          end
        end
        S_SQRT: if (sq_done) begin
          amp <= root[31:0];
          st  <= S_PHASE;
        end
        S_PHASE: begin
          fnorm <= f_q;
          // phase of sample 0 = -90 deg + fnorm/2 - fnorm * np[1]  (mod 1 turn)
          phi0  <= 32'hC000_0000 + (f_q >> 1) - 32'(f_q * 32'(first_q));
          valid <= 1'b1;
          st    <= S_DONE;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
