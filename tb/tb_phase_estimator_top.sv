// End-to-end testbench of phase_estimator_top at its default parameters
// (M = 2400 samples, 1024-entry FIFO, clock divided by four, four passes).
//
// A converter model produces offset-binary samples of
// A cos(2*pi*f*n + phi), one per four clocks, with a frame reference
// whose rising edge marks each new sample. The testbench records which
// sample index was the first one captured after each `start` (from the
// FIFO's write strobe), rebuilds that block itself and checks:
//   - the block measures (transition count, first/last index, energy)
//     exactly, recomputed from the block,
//   - amplitude and frequency against the formulas evaluated in double
//     precision, and against the true A and f,
//   - the refined phase against the least-squares phase of the block
//     (the update rule iterated to convergence with exact sin/cos) within
//     1 milli-degree, and against the true phase of the first captured
//     sample within 0.3 degrees plus the drift that the frequency
//     estimate's error causes across the block,
//   - the cycle count of a run against the expected budget.
// A constant input must end in `error`. Each mechanism must occur at least
// once: ADPLL phase slip and lock, FIFO flush, FIFO overflow between
// blocks, controller waiting on an empty FIFO, a good estimate and an
// error run, and an initial phase corrected by the iterative passes.
module tb_phase_estimator_top;
  import pe_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int unsigned M = BLOCK_M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] adc_data = 8'd128;
  logic adc_ref = 1'b0, capture_en = 1'b0, start = 1'b0;
  logic busy, done, error, pll_locked, pll_slip, pll_clk_div, fifo_overflow;
  logic [10:0] fifo_level;
  logic [IDX_W-1:0] n_np, np_first, np_last;
  logic [CS_W-1:0] cs_last;
  logic [31:0] amp, fnorm, phi0, phase;
  logic [63:0] phase_rad, amp_dbl, freq_hz;
  logic signed [31:0] last_correction;
  logic [7:0] passes;
  int checks = 0, failures = 0;

  phase_estimator_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real wrap_deg(input real d);
    real r;
    r = d;
    while (r > 180.0) r -= 360.0;
    while (r < -180.0) r += 360.0;
    return r;
  endfunction

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", m, $time); end
  endtask

  // ------------------------------------------------ converter model
  real sig_a = 100.0, sig_f = 0.001, sig_ph = 0.0;
  bit  sig_const = 1'b0;
  int  frame = 0, skip = 0;
  longint adc_idx = 0;

  function automatic int sample_at(input longint n);
    int v;
    if (sig_const) return 5;
    v = int'($floor(sig_a * $cos(2.0 * PI * sig_f * real'(n) + sig_ph) + 0.5));
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  always @(posedge clk) begin
    if (skip > 0) skip--;           // stretch one frame: shifts the reference phase
    else begin
      frame = (frame + 1) % 4;
      if (frame == 0) begin
        adc_idx  <= adc_idx + 1;
        adc_data <= 8'(sample_at(adc_idx + 1) + 128);
      end
    end
    adc_ref <= (frame < 2);
  end

  // ------------------------------------------------ monitors
  int n_slip = 0, n_lock = 0, n_flush = 0, n_ovf = 0, n_wait = 0, n_err = 0, n_good = 0;
  logic locked_q = 1'b0, ovf_q = 1'b0, armed = 1'b0;
  longint n0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (pll_slip) n_slip++;
    if (pll_locked && !locked_q) n_lock++;
    locked_q <= pll_locked;
    if (fifo_overflow && !ovf_q) n_ovf++;
    ovf_q <= fifo_overflow;
    if (dut.u_ctrl.fifo_flush) begin n_flush++; armed <= 1'b1; end
    else if (armed && dut.u_fifo.wr_en && !dut.u_fifo.full) begin
      n0 <= adc_idx;
      armed <= 1'b0;
    end
    if (dut.u_ctrl.capture_en && dut.u_fifo.empty) n_wait++;
  end

  // ------------------------------------------------ one estimate
  task automatic estimate(input real a, input real f, input real ph_deg, input bit konst);
    int blk [M];
    int e_n, e_first, e_last, cyc;
    longint acc, e_cs;
    real ea, ef, ref_ph, ph_true, got_deg, d;
    sig_a = a; sig_f = f; sig_ph = ph_deg * PI / 180.0; sig_const = konst;
    repeat (8) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 3000000) begin @(negedge clk); cyc++; end
    chk(done, "run finished");
    // rebuild the captured block
    for (int m = 0; m < M; m++) blk[m] = sample_at(n0 + longint'(m));
    e_n = 0; e_first = 0; e_last = 0; e_cs = 0; acc = 0;
    for (int m = 0; m < M; m++) begin
      if (m > 0 && blk[m-1] < 0 && blk[m] >= 0) begin
        if (e_n == 0) e_first = m;
        e_last = m; e_cs = acc; e_n++;
      end
      acc += longint'(blk[m] * blk[m]);
    end
    chk(n_np == IDX_W'(e_n) && np_first == IDX_W'(e_first) && np_last == IDX_W'(e_last)
        && cs_last == CS_W'(e_cs), $sformatf("block measures %0d %0d %0d %0d", n_np, np_first, np_last, cs_last));
    if (konst) begin
      chk(error, "error for a block without transitions");
      n_err++;
      return;
    end
    chk(!error, "no error");
    // amplitude and frequency formulas
    ea = $sqrt(2.0 * real'(e_cs) / real'(e_last));
    ef = real'(e_n - 1) / real'(e_last - e_first);
    chk(fabs(real'(amp) / 65536.0 - ea) < 2.0 / 65536.0, $sformatf("amp %f exp %f", real'(amp) / 65536.0, ea));
    chk(fabs(real'(fnorm) / 4294967296.0 - ef) < 1.0 / 4294967296.0, "fnorm");
    chk(fabs(ea - a) / a < 0.05, $sformatf("amplitude %f vs true %f", ea, a));
    chk(fabs(ef - f) / f < 0.02, $sformatf("frequency %f vs true %f", ef, f));
    chk($bitstoreal(amp_dbl) == real'(amp) / 65536.0, "amp double");
    chk(fabs($bitstoreal(freq_hz) - real'(fnorm) / 4294967296.0 * 375.0e6) < 1e-6, "freq hz");
    // least-squares phase by the same rule, exact arithmetic
    ref_ph = real'(phi0) / 4294967296.0 * 2.0 * PI;
    for (int k = 0; k < 30; k++) begin
      real s1, s2, th, aa, ff;
      aa = real'(amp) / 65536.0; ff = real'(fnorm) / 4294967296.0;
      s1 = 0.0; s2 = 0.0;
      for (int m = 0; m < M; m++) begin
        th = 2.0 * PI * ff * m + ref_ph;
        s1 += $sin(th) * (real'(blk[m]) - aa * $cos(th));
        s2 += $sin(th) * $sin(th);
      end
      ref_ph -= s1 / (aa * s2);
    end
    got_deg = $bitstoreal(phase_rad) * 180.0 / PI;
    d = wrap_deg(got_deg - ref_ph * 180.0 / PI);
    ph_true = wrap_deg((2.0 * PI * f * real'(n0) + sig_ph) * 180.0 / PI);
    $display("A=%0.1f f=%0.5f: est A=%f F/Fs=%f, phi0=%f deg -> phase %f deg (true %f, LS %f mdeg away), %0d cycles",
             a, f, ea, ef, real'(phi0) / 4294967296.0 * 360.0, got_deg, ph_true, d * 1000.0, cyc);
    chk(fabs(d) < 0.001, "phase equals least-squares phase");
    // the phase is fitted with the estimated frequency, so its distance to
    // the true phase grows with the frequency error across the block
    chk(fabs(wrap_deg(got_deg - ph_true)) < 0.3 + 360.0 * fabs(ef - f) * real'(M),
        "phase near true phase");
    chk(fabs(real'(last_correction)) < 4294967296.0 * 1e-6, "converged");
    chk(passes == 8'd4, "passes");
    // budget: flush/fill 4 clocks per sample, scan M, AFP ~170, 4 passes of ~66 per sample
    chk(cyc > 4 * M + 4 * M * 60 && cyc < 4 * M + 2 * M + 500 + 4 * M * 70, $sformatf("cycles %0d", cyc));
    n_good++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    capture_en = 1'b1;
    // let the ADPLL lock
    repeat (200) @(posedge clk);
    chk(pll_locked, "ADPLL locked");
    estimate(100.0, 0.001, 30.0, 1'b0);           // the document's waveform: ~1000-sample period
    chk(fifo_overflow, "FIFO overflowed while processing");
    // converter frame phase shifts: the ADPLL must slip and relock
    @(negedge clk); skip = 1;
    repeat (200) @(posedge clk);
    chk(pll_locked, "ADPLL relocked");
    estimate(80.0, 0.0123, -75.0, 1'b0);
    estimate(120.0, 0.0456, 160.0, 1'b0);
    estimate(0.0, 0.01, 0.0, 1'b1);               // constant input
    // mechanism coverage
    $display("slips=%0d locks=%0d flushes=%0d overflows=%0d fifo-wait cycles=%0d good=%0d errors=%0d",
             n_slip, n_lock, n_flush, n_ovf, n_wait, n_good, n_err);
    chk(n_slip >= 2, "ADPLL phase slip");
    chk(n_lock >= 2, "ADPLL lock");
    chk(n_flush == 4, "FIFO flush per run");
    chk(n_ovf >= 3, "FIFO overflow between blocks");
    chk(n_wait > 0, "controller waited for samples");
    chk(n_good == 3, "good estimates");
    chk(n_err == 1, "error run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
