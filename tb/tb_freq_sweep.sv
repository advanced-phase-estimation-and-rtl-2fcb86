// Frequency-sweep workload for phase_estimator_top at its default
// parameters (M = 2400, four refinement passes).
//
// The estimator is meant to keep milli-degree phase resolution while the
// signal frequency changes from block to block. This testbench runs twelve
// estimates back to back. The signal changes before each one, covering:
//   - periods from about 1100 samples (2 transitions per block) down to
//     5 samples;
//   - phases around the whole circle;
//   - amplitudes from 20 to 127 LSB.
// It does not reset between runs.
//
// For every run it rebuilds the captured block and checks:
//   - the block measures, exactly;
//   - the refined phase against the least-squares phase of the block,
//     within 1 milli-degree. The reference iterates the same update rule
//     to convergence, with exact sin/cos, at the estimated A and F/Fs;
//   - the refined phase against the true phase of the first sample. The
//     allowed error is 0.3 degrees plus the drift that the frequency
//     estimate's error causes across the block;
//   - that the last correction is below 1e-6 turn (converged);
//   - that the estimated frequency is within 2 % of the true one.
// It prints, per run, the initial and the refined phase error against the
// least-squares phase. It counts how often the passes improved on the
// initial phase, and fails unless they did so in every run.
module tb_freq_sweep;
  import pe_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int unsigned M = BLOCK_M;
  localparam int NRUNS = 12;

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
    repeat (NRUNS * 700000 + 100000) @(posedge clk);
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
  int  frame = 0;
  longint adc_idx = 0;

  function automatic int sample_at(input longint n);
    int v;
    v = int'($floor(sig_a * $cos(2.0 * PI * sig_f * real'(n) + sig_ph) + 0.5));
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  always @(posedge clk) begin
    frame = (frame + 1) % 4;
    if (frame == 0) begin
      adc_idx  <= adc_idx + 1;
      adc_data <= 8'(sample_at(adc_idx + 1) + 128);
    end
    adc_ref <= (frame < 2);
  end

  // the first converter sample written to the FIFO after each flush
  logic armed = 1'b0;
  longint n0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.fifo_flush) armed <= 1'b1;
    else if (armed && dut.u_fifo.wr_en && !dut.u_fifo.full) begin
      n0 <= adc_idx;
      armed <= 1'b0;
    end
  end

  int n_improved = 0;

  task automatic estimate(input real a, input real f, input real ph_deg);
    int blk [M];
    int e_n, e_first, e_last, cyc;
    longint acc, e_cs;
    real ef, ref_ph, ph_true, got_deg, d, d0, aa, ff;
    sig_a = a; sig_f = f; sig_ph = ph_deg * PI / 180.0;
    repeat (8) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 800000) begin @(negedge clk); cyc++; end
    chk(done && !error, "run finished without error");
    for (int m = 0; m < M; m++) blk[m] = sample_at(n0 + longint'(m));
    e_n = 0; e_first = 0; e_last = 0; e_cs = 0; acc = 0;
    for (int m = 1; m < M; m++) begin
      acc += longint'(blk[m-1] * blk[m-1]);
      if (blk[m-1] < 0 && blk[m] >= 0) begin
        if (e_n == 0) e_first = m;
        e_last = m; e_cs = acc; e_n++;
      end
    end
    chk(n_np == IDX_W'(e_n) && np_first == IDX_W'(e_first) && np_last == IDX_W'(e_last)
        && cs_last == CS_W'(e_cs), "block measures");
    ef = real'(e_n - 1) / real'(e_last - e_first);
    chk(fabs(ef - f) / f < 0.02, $sformatf("frequency %f vs true %f", ef, f));
    // least-squares phase at the estimated A and F/Fs
    aa = real'(amp) / 65536.0;
    ff = real'(fnorm) / 4294967296.0;
    ref_ph = real'(phi0) / 4294967296.0 * 2.0 * PI;
    for (int k = 0; k < 30; k++) begin
      real s1, s2, th;
      s1 = 0.0; s2 = 0.0;
      for (int m = 0; m < M; m++) begin
        th = 2.0 * PI * ff * m + ref_ph;
        s1 += $sin(th) * (real'(blk[m]) - aa * $cos(th));
        s2 += $sin(th) * $sin(th);
      end
      ref_ph -= s1 / (aa * s2);
    end
    got_deg = $bitstoreal(phase_rad) * 180.0 / PI;
    d  = wrap_deg(got_deg - ref_ph * 180.0 / PI);
    d0 = wrap_deg(real'(phi0) / 4294967296.0 * 360.0 - ref_ph * 180.0 / PI);
    ph_true = wrap_deg((2.0 * PI * f * real'(n0) + sig_ph) * 180.0 / PI);
    $display("A=%5.1f F/Fs=%7.5f N_np=%0d: initial %9.4f deg off, refined %9.6f mdeg off the fit; %9.4f deg off the true phase",
             a, f, e_n, d0, d * 1000.0, wrap_deg(got_deg - ph_true));
    chk(fabs(d) < 0.001, "refined phase equals least-squares phase");
    chk(fabs(wrap_deg(got_deg - ph_true)) < 0.3 + 360.0 * fabs(ef - f) * real'(M),
        "refined phase near true phase");
    chk(fabs(real'(last_correction)) < 4294967296.0 * 1e-6, "converged");
    if (fabs(d) < fabs(d0)) n_improved++;
  endtask

  real freqs [NRUNS] = '{0.0009, 0.001, 0.0021, 0.0047, 0.0088, 0.0137,
                         0.0311, 0.0592, 0.0777, 0.1013, 0.1499, 0.1999};
  real amps  [NRUNS] = '{100.0, 127.0, 20.0, 64.0, 110.0, 45.0,
                         90.0, 100.0, 33.0, 120.0, 75.0, 100.0};

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    capture_en = 1'b1;
    repeat (200) @(posedge clk);
    chk(pll_locked, "ADPLL locked");
    for (int r = 0; r < NRUNS; r++)
      estimate(amps[r], freqs[r], -170.0 + 31.0 * real'(r));
    $display("refinement improved on the initial phase in %0d of %0d runs", n_improved, NRUNS);
    chk(n_improved == NRUNS, "refinement improves every initial phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
