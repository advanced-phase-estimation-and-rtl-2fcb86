// Self-checking testbench of iterative_model.
//
// Builds the model with the real cordic and fpu_core and a RAM model
// holding a sinusoid v[m] = round(A cos(2*pi*f*m + phi)) of known
// amplitude, frequency and phase. The model is started with the exact A
// and f but an initial phase several degrees off; after its passes the
// phase must match, within 1 milli-degree, the phase that the same update
// rule reaches when iterated to convergence with exact sin/cos in the
// simulator's double arithmetic, and lie within 0.3 degrees of the true
// phase (8-bit rounding of the samples sets that limit), the last correction
// must be much smaller than the first error, and the double-precision
// amplitude and frequency outputs must equal the fixed-point inputs
// exactly. Also checks the cycle count of a run against the expected
// per-sample cost. Uses a 600-sample block and several phases.
module tb_iterative_model;
  import pe_pkg::*;
  localparam int unsigned M = 600;
  localparam int unsigned PASSES = 4;
  localparam real FS = 1.5e9;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] amp = '0, fnorm = '0, phi0 = '0;
  logic [$clog2(M)-1:0] ram_raddr;
  logic signed [7:0] ram_rdata = '0;
  logic cordic_start, cordic_done, cordic_busy;
  logic [31:0] cordic_angle;
  logic signed [31:0] cordic_sin, cordic_cos;
  logic fpu_start, fpu_done, fpu_busy;
  fp_op_e fpu_op;
  logic [63:0] fpu_a, fpu_b, fpu_result;
  logic busy, done;
  logic [31:0] phase;
  logic [63:0] phase_rad, amp_dbl, freq_hz;
  logic signed [31:0] last_correction;
  logic [7:0] passes;
  int checks = 0, failures = 0;
  logic signed [7:0] mem [M];

  iterative_model #(.M(M), .ITERATIONS(PASSES), .FS_HZ(FS)) dut (.*);
  cordic u_cordic (.clk, .rst_n, .start(cordic_start), .angle(cordic_angle),
                   .busy(cordic_busy), .done(cordic_done), .sin_out(cordic_sin), .cos_out(cordic_cos));
  fpu_core u_fpu (.clk, .rst_n, .start(fpu_start), .op(fpu_op), .a(fpu_a), .b(fpu_b),
                  .busy(fpu_busy), .done(fpu_done), .result(fpu_result));

  always #5 clk = ~clk;
  always @(posedge clk) ram_rdata <= mem[ram_raddr];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic one(input real a, input real f, input real ph_deg, input real err_deg);
    real ph, got_deg, d, dt, ref_ph;
    int cyc;
    ph = ph_deg * PI / 180.0;
    for (int m = 0; m < M; m++)
      mem[m] = 8'(int'($floor(a * $cos(2.0 * PI * f * m + ph) + 0.5)));
    @(negedge clk);
    amp   = 32'(longint'(a * 65536.0));
    fnorm = 32'(longint'(f * 4294967296.0));
    phi0  = 32'(longint'((ph_deg + err_deg) / 360.0 * 4294967296.0));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // reference: the same update rule iterated to convergence in the
    // simulator's double arithmetic with exact sin/cos
    ref_ph = ph + err_deg * PI / 180.0;
    for (int k = 0; k < 30; k++) begin
      real s1, s2, th;
      s1 = 0.0; s2 = 0.0;
      for (int m = 0; m < M; m++) begin
        th = 2.0 * PI * (real'(fnorm) / 4294967296.0) * m + ref_ph;
        s1 += $sin(th) * (real'(mem[m]) - (real'(amp) / 65536.0) * $cos(th));
        s2 += $sin(th) * $sin(th);
      end
      ref_ph -= s1 / ((real'(amp) / 65536.0) * s2);
    end
    got_deg = $bitstoreal(phase_rad) * 180.0 / PI;
    d = got_deg - ref_ph * 180.0 / PI;
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    dt = got_deg - ph_deg;
    while (dt > 180.0) dt -= 360.0;
    while (dt < -180.0) dt += 360.0;
    chk(fabs(dt) < 0.3, $sformatf("distance to true phase %f deg", dt));
    d = d;
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    $display("phase true %f deg start error %f deg -> result %f deg (%f mdeg from the least-squares phase), last corr %0d, %0d cycles",
             ph_deg, err_deg, got_deg, d * 1000.0, last_correction, cyc);
    chk(fabs(d) < 0.001, $sformatf("phase error %f deg", d));
    chk(fabs(real'(last_correction)) < fabs(err_deg) / 360.0 * 4294967296.0 / 50.0, "converged");
    chk($bitstoreal(amp_dbl) == real'(amp) / 65536.0, "amp to double");
    chk($bitstoreal(freq_hz) == real'(fnorm) / 4294967296.0 * FS, "freq to double");
    chk(passes == 8'(PASSES), "passes");
    // per sample: CORDIC (31) + fetch/wait/next (3) + 11 FPU ops of 3 cycles
    chk(cyc > PASSES * M * 60 && cyc < PASSES * M * 70 + 1000, $sformatf("cycles %0d", cyc));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(100.0, 0.01, 30.0, 4.0);
    one(100.0, 0.0037, -120.0, -3.0);
    one(60.0, 0.021, 170.0, 5.0);
    one(120.0, 0.05, -10.0, -2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
