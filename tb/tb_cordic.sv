// Self-checking testbench of cordic.
//
// Applies angles over the whole circle (random and the four axis points,
// 2^32 = one turn) and compares sin and cos with the simulator's $sin and
// $cos, scaled to Q2.30, within 64 LSB (about 6e-8). Checks that `done`
// arrives ITERATIONS + 1 cycles after `start`.
module tb_cordic;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] angle = '0;
  logic busy, done;
  logic signed [31:0] sin_out, cos_out;
  int checks = 0, failures = 0;
  localparam int unsigned IT = 30;
  localparam real PI = 3.14159265358979323846;

  cordic #(.ITERATIONS(IT)) dut (.*);

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [31:0] ang);
    int lat;
    real th, es, ec;
    @(negedge clk);
    angle = ang; start = 1'b1;
    @(negedge clk);
    start = 1'b0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    th = 2.0 * PI * real'(ang) / 4294967296.0;
    es = $sin(th) * 1073741824.0;
    ec = $cos(th) * 1073741824.0;
    checks += 3;
    if (fabs(real'(sin_out) - es) > 64.0) begin
      failures++; $display("FAIL sin ang=%h got %0d exp %f", ang, sin_out, es);
    end
    if (fabs(real'(cos_out) - ec) > 64.0) begin
      failures++; $display("FAIL cos ang=%h got %0d exp %f", ang, cos_out, ec);
    end
    if (lat != IT + 1) begin
      failures++; $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(32'h0000_0000); one(32'h4000_0000); one(32'h8000_0000); one(32'hC000_0000);
    one(32'h3FFF_FFFF); one(32'hBFFF_FFFF);
    for (int i = 0; i < 2000; i++) one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
