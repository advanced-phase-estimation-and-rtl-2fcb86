// block_scan: measures a block of samples for the A/F/phase estimators.
//
// While the block is streamed past it, this unit computes the four numbers
// the document's estimators start from:
//   n_np      number of negative-to-positive transitions (N_np),
//   np_first  sample index of the first transition (np[1]),
//   np_last   sample index of the last transition (np[N_np]),
//   cs_last   cumulative sum of squares CS[np[N_np]], the energy of the
//             samples before the last transition.
// A transition is counted at sample i when sample i-1 is negative and
// sample i is zero or positive. Indices are 0-based positions in the block.
// CS[np[N_np]] sums the squares of samples 0 .. np[N_np]-1, i.e. exactly
// np[N_np] samples, which is the count Eq. (4) divides by.
//
// The document's scan keeps whole arrays (samples, running sums); here the
// measures are accumulated on the fly, which needs only registers.
//
// Interface and timing: pulse `clear` before a block. Present the block as
// `in_valid`/`in_sample` (signed, one sample per valid, in order). Results
// are updated the cycle after each sample and are final one cycle after the
// last one. `n_np` saturates at its maximum.
module block_scan
  import pe_pkg::*;
#(
  parameter int unsigned SW = SAMPLE_W,
  parameter int unsigned IW = IDX_W,
  parameter int unsigned CW = CS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_sample,
  output logic [IW-1:0]        n_np,
  output logic [IW-1:0]        np_first,
  output logic [IW-1:0]        np_last,
  output logic [CW-1:0]        cs_last,
  output logic [IW-1:0]        n_samples
);
  logic [CW-1:0]   cs_run;      // sum of squares of samples 0 .. idx-1
  logic            prev_neg;
  logic [2*SW-1:0] sq;
  logic            rise;

  assign sq   = (2*SW)'(in_sample * in_sample);
  assign rise = (n_samples != '0) && prev_neg && !in_sample[SW-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_run    <= '0;
      prev_neg  <= 1'b0;
      n_np      <= '0;
      np_first  <= '0;
      np_last   <= '0;
      cs_last   <= '0;
      n_samples <= '0;
    end else if (clear) begin
      cs_run    <= '0;
      prev_neg  <= 1'b0;
      n_np      <= '0;
      np_first  <= '0;
      np_last   <= '0;
      cs_last   <= '0;
      n_samples <= '0;
    end else if (in_valid) begin
      if (rise) begin
        if (n_np == '0) np_first <= n_samples;
        np_last <= n_samples;
        cs_last <= cs_run;
        if (n_np != '1) n_np <= n_np + 1'b1;
      end
      cs_run    <= cs_run + CW'(sq);
      prev_neg  <= in_sample[SW-1];
      n_samples <= n_samples + 1'b1;
    end
  end
endmodule
