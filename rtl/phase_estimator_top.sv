// phase_estimator_top: block-based milli-degree phase estimator.
//
// Estimates amplitude, frequency and phase of a sampled sinusoid
// x[n] = A cos(2*pi*F/Fs*n + phi) from one block of M = 2400 8-bit samples:
//
//   ADC samples -> adpll-timed capture -> sample_fifo -> fsm_ctrl ->
//   sample_ram -> block_scan -> afp_gen (A, F, initial phase) ->
//   iterative_model (+ cordic, + fpu_core) -> refined phase
//
// The ADPLL's ring-counter DCO divides the clock by four and times the
// capture strobe from the converter's frame reference; samples captured on
// that strobe are queued in the FIFO. On `start`, the controller flushes the
// FIFO, records the next M samples into RAM as two's complement, streams
// them through the block scan, has A/F/initial phase generated and then has
// the phase refined by the iterative model, which uses the CORDIC for
// sin/cos and the double-precision FPU for the sums of Eq. (6).
// This chain and the sizes (M = 2400, 8-bit samples, 1024-entry FIFO,
// clock divided by four) follow the document. This design's choices are:
// one clock `clk` for all logic, with the captured sample rate `clk`/4;
// FS_HZ = 375 MHz for that captured rate (the document's processing
// rate), used only to express the frequency in hertz; the number of
// refinement passes; and all handshakes.
//
// Interface: `adc_data` (offset binary) is captured when `capture_en`,
// the ADPLL is locked and its strobe fires; `adc_ref` is the converter's
// frame reference (rising edge every four clocks). Pulse `start` to run
// one estimate; `done` pulses at the end with all results stable until
// the next `start`. `error` means fewer than two negative-to-positive
// transitions were found, so no frequency could be formed. `phase` is in
// 2^-32 turn units; `phase_rad`, `amp_dbl` and `freq_hz` are IEEE 754
// doubles. Samples that arrive while the FIFO is full are dropped and
// flagged by `fifo_overflow` (cleared by the flush of the next `start`).
module phase_estimator_top
  import pe_pkg::*;
#(
  parameter int unsigned M             = BLOCK_M,
  parameter int unsigned FIFO_DEPTH    = 1024,
  parameter int unsigned CLK_DIV       = 4,
  parameter int unsigned PASSES        = 4,
  parameter int unsigned CORDIC_STEPS  = 30,
  parameter real         FS_HZ         = 375.0e6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // converter side
  input  logic [SAMPLE_W-1:0]     adc_data,
  input  logic                    adc_ref,
  input  logic                    capture_en,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    error,
  // status
  output logic                    pll_locked,
  output logic                    pll_slip,
  output logic                    pll_clk_div,
  output logic                    fifo_overflow,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  // block measures
  output logic [IDX_W-1:0]        n_np,
  output logic [IDX_W-1:0]        np_first,
  output logic [IDX_W-1:0]        np_last,
  output logic [CS_W-1:0]         cs_last,
  // A, F, initial phase (fixed point)
  output logic [31:0]             amp,
  output logic [31:0]             fnorm,
  output logic [31:0]             phi0,
  // refined results
  output logic [31:0]             phase,
  output logic [63:0]             phase_rad,
  output logic [63:0]             amp_dbl,
  output logic [63:0]             freq_hz,
  output logic signed [31:0]      last_correction,
  output logic [7:0]              passes
);
  localparam int unsigned AW = $clog2(M);

  // ---------------------------------------------------------------- ADPLL
  logic tick;
  adpll #(.DIV(CLK_DIV), .TICK_POS(CLK_DIV / 2)) u_adpll (
    .clk, .rst_n, .ref_in(adc_ref),
    .clk_div(pll_clk_div), .tick(tick), .locked(pll_locked), .slip(pll_slip)
  );

  // ---------------------------------------------------------------- FIFO
  logic                      fifo_flush, fsm_capture, fifo_rd_en, fifo_rd_valid;
  logic                      fifo_full, fifo_empty;
  logic [SAMPLE_W-1:0]       fifo_rd_data;
  logic                      fifo_wr;

  // capture on the ADPLL strobe while enabled and locked; between blocks
  // the FIFO keeps filling and overflows, which only loses stale samples
  assign fifo_wr = capture_en && pll_locked && tick;

  sample_fifo #(.WIDTH(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .flush(fifo_flush),
    .wr_en(fifo_wr), .wr_data(adc_data),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .rd_valid(fifo_rd_valid),
    .full(fifo_full), .empty(fifo_empty), .overflow(fifo_overflow), .count(fifo_level)
  );

  // ---------------------------------------------------------------- RAM
  logic                       ram_we, scan_owns_ram;
  logic [AW-1:0]              ram_waddr, scan_raddr, iter_raddr;
  logic signed [SAMPLE_W-1:0] ram_wdata, ram_rdata;

  sample_ram #(.WIDTH(SAMPLE_W), .DEPTH(M)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(scan_owns_ram ? scan_raddr : iter_raddr), .rdata(ram_rdata)
  );

  // ---------------------------------------------------------------- control
  logic                       scan_clear, scan_valid;
  logic                       afp_start, afp_done, afp_valid;
  logic                       iter_start, iter_done, iter_busy;

  fsm_ctrl #(.M(M), .SW(SAMPLE_W)) u_ctrl (
    .clk, .rst_n, .start,
    .fifo_flush(fifo_flush), .capture_en(fsm_capture), .fifo_rd_en(fifo_rd_en),
    .fifo_empty(fifo_empty), .fifo_rd_valid(fifo_rd_valid), .fifo_rd_data(fifo_rd_data),
    .ram_we(ram_we), .ram_waddr(ram_waddr), .ram_wdata(ram_wdata),
    .scan_owns_ram(scan_owns_ram), .ram_raddr(scan_raddr),
    .scan_clear(scan_clear), .scan_valid(scan_valid),
    .afp_start(afp_start), .afp_done(afp_done), .afp_valid(afp_valid),
    .iter_start(iter_start), .iter_done(iter_done),
    .busy(busy), .done(done), .error(error)
  );

  // ---------------------------------------------------------------- block scan
  logic [IDX_W-1:0] scan_count;
  block_scan u_scan (
    .clk, .rst_n, .clear(scan_clear), .in_valid(scan_valid), .in_sample(ram_rdata),
    .n_np(n_np), .np_first(np_first), .np_last(np_last), .cs_last(cs_last),
    .n_samples(scan_count)
  );

  // ---------------------------------------------------------------- A, F, P_init
  afp_gen u_afp (
    .clk, .rst_n, .start(afp_start),
    .n_np(n_np), .np_first(np_first), .np_last(np_last), .cs_last(cs_last),
    .done(afp_done), .valid(afp_valid), .amp(amp), .fnorm(fnorm), .phi0(phi0)
  );

  // ---------------------------------------------------------------- CORDIC + FPU
  logic               cordic_start, cordic_done, cordic_busy;
  logic [31:0]        cordic_angle;
  logic signed [31:0] cordic_sin, cordic_cos;

  cordic #(.ITERATIONS(CORDIC_STEPS)) u_cordic (
    .clk, .rst_n, .start(cordic_start), .angle(cordic_angle),
    .busy(cordic_busy), .done(cordic_done), .sin_out(cordic_sin), .cos_out(cordic_cos)
  );

  logic        fpu_start, fpu_busy, fpu_done;
  fp_op_e      fpu_op;
  logic [63:0] fpu_a, fpu_b, fpu_result;

  fpu_core u_fpu (
    .clk, .rst_n, .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
    .busy(fpu_busy), .done(fpu_done), .result(fpu_result)
  );

  // ---------------------------------------------------------------- iterative model
  iterative_model #(.M(M), .ITERATIONS(PASSES), .FS_HZ(FS_HZ)) u_iter (
    .clk, .rst_n, .start(iter_start),
    .amp(amp), .fnorm(fnorm), .phi0(phi0),
    .ram_raddr(iter_raddr), .ram_rdata(ram_rdata),
    .cordic_start(cordic_start), .cordic_angle(cordic_angle), .cordic_done(cordic_done),
    .cordic_sin(cordic_sin), .cordic_cos(cordic_cos),
    .fpu_start(fpu_start), .fpu_op(fpu_op), .fpu_a(fpu_a), .fpu_b(fpu_b),
    .fpu_done(fpu_done), .fpu_result(fpu_result),
    .busy(iter_busy), .done(iter_done),
    .phase(phase), .phase_rad(phase_rad), .amp_dbl(amp_dbl), .freq_hz(freq_hz),
    .last_correction(last_correction), .passes(passes)
  );

  // the controller only pops the FIFO while it is recording a block
  assert property (@(posedge clk) disable iff (!rst_n) fifo_rd_en |-> fsm_capture);
  // the CORDIC and the FPU are never started while busy
  assert property (@(posedge clk) disable iff (!rst_n) cordic_start |-> !cordic_busy);
  assert property (@(posedge clk) disable iff (!rst_n) fpu_start |-> !fpu_busy);
  // A, F and the initial phase are formed from exactly one whole block
  assert property (@(posedge clk) disable iff (!rst_n) afp_start |-> 32'(scan_count) == M);
  // the refinement is only started when idle
  assert property (@(posedge clk) disable iff (!rst_n) iter_start |-> !iter_busy);
  // a sample offered to a full FIFO is reported as lost
  assert property (@(posedge clk) disable iff (!rst_n || fifo_flush)
                   fifo_wr && fifo_full && !fifo_rd_en |=> fifo_overflow);
endmodule
