// Self-checking testbench of fpu_core.
//
// Drives random IEEE 754 doubles (normal range, including near-cancelling
// pairs) through add, subtract, multiply and divide and compares each
// result bit for bit with the simulator's own double arithmetic, which
// rounds to nearest-even. Integer conversions are checked against real
// casts. Also checks the latency: 2 cycles for ADD/SUB/MUL/I2F/F2I and
// 59 cycles for DIV.
module tb_fpu_core;
  import pe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  fp_op_e op = FP_ADD;
  logic [63:0] a = '0, b = '0;
  logic busy, done;
  logic [63:0] result;
  int checks = 0, failures = 0;

  fpu_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fp_op_e o, input logic [63:0] x, input logic [63:0] y,
                     output logic [63:0] r, output int lat);
    @(negedge clk);
    op = o; a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    r = result;
  endtask

  function automatic logic [63:0] rnd_dbl(input int emin, input int espan);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(emin + int'($urandom % espan));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp,
                       input int lat, input int exp_lat);
    checks++;
    if (got !== exp || lat != exp_lat) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s got %h exp %h lat %0d exp %0d", what, got, exp, lat, exp_lat);
    end
  endtask

  initial begin
    logic [63:0] x, y, r, e;
    longint li;
    real rr, tt;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      x = rnd_dbl(973, 100);
      y = (i % 4 == 0) ? {~x[63] ^ 1'($urandom), x[62:52], x[51:8], 8'($urandom)}  // near cancel
        : (i % 4 == 1) ? {1'($urandom), 11'(x[62:52] - 11'($urandom % 60)), {20'($urandom), $urandom}}
        : rnd_dbl(973, 100);
      run(FP_ADD, x, y, r, lat);
      check("add", r, $realtobits($bitstoreal(x) + $bitstoreal(y)), lat, 2);
      run(FP_SUB, x, y, r, lat);
      check("sub", r, $realtobits($bitstoreal(x) - $bitstoreal(y)), lat, 2);
      run(FP_MUL, x, y, r, lat);
      check("mul", r, $realtobits($bitstoreal(x) * $bitstoreal(y)), lat, 2);
      if (i % 3 == 0) begin
        run(FP_DIV, x, y, r, lat);
        check("div", r, $realtobits($bitstoreal(x) / $bitstoreal(y)), lat, 59);
      end
      li = (i % 2 != 0) ? longint'({$urandom, $urandom}) : longint'($signed($urandom)) >>> (i % 20);
      run(FP_I2F, li, '0, r, lat);
      check("i2f", r, $realtobits(real'(li)), lat, 2);
      x = rnd_dbl(1000, 80);
      rr = $bitstoreal(x);
      tt = (rr >= 0.0) ? $floor(rr) : $ceil(rr);
      run(FP_F2I, x, '0, r, lat);
      check("f2i", r, 64'(longint'(tt)), lat, 2);
    end
    // zeros
    run(FP_ADD, 64'd0, $realtobits(1.5), r, lat);
    check("0+x", r, $realtobits(1.5), lat, 2);
    run(FP_MUL, 64'd0, $realtobits(1.5), r, lat);
    check("0*x", r, 64'd0, lat, 2);
    run(FP_SUB, $realtobits(2.25), $realtobits(2.25), r, lat);
    check("x-x", r, 64'd0, lat, 2);
    run(FP_DIV, $realtobits(1.0), $realtobits(3.0), r, lat);
    check("1/3", r, $realtobits(1.0 / 3.0), lat, 59);
    run(FP_I2F, 64'd0, 64'd0, r, lat);
    check("i2f 0", r, 64'd0, lat, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
