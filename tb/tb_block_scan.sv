// Self-checking testbench of block_scan.
//
// Streams blocks of signed 8-bit samples (clean and noisy sinusoids of
// random amplitude, frequency and phase, plus pure noise and a constant
// block with no transitions) and compares the transition count, first and
// last transition index and the sum of squares before the last transition
// with values recomputed here from the same samples. Also checks that
// results are final one cycle after the last sample.
module tb_block_scan;
  import pe_pkg::*;
  localparam int unsigned M = 600;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [7:0] in_sample = '0;
  logic [IDX_W-1:0] n_np, np_first, np_last, n_samples;
  logic [CS_W-1:0] cs_last;
  int checks = 0, failures = 0;
  int blk [M];

  block_scan dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic run_block(input int kind);
    real a, f, p;
    int e_n, e_first, e_last, e_cs;
    longint acc;
    a = 20.0 + real'($urandom % 100);
    f = 0.002 + real'($urandom % 1000) / 4000.0;
    p = 2.0 * PI * real'($urandom % 1000) / 1000.0;
    for (int i = 0; i < M; i++) begin
      case (kind)
        0: blk[i] = int'($floor(a * $cos(2.0 * PI * f * i + p) + 0.5));
        1: blk[i] = int'($floor(a * $cos(2.0 * PI * f * i + p) + 0.5)) + int'($urandom % 7) - 3;
        2: blk[i] = int'($urandom % 256) - 128;
        default: blk[i] = 17;
      endcase
      if (blk[i] > 127) blk[i] = 127;
      if (blk[i] < -128) blk[i] = -128;
    end
    // reference
    e_n = 0; e_first = 0; e_last = 0; e_cs = 0; acc = 0;
    for (int i = 0; i < M; i++) begin
      if (i > 0 && blk[i-1] < 0 && blk[i] >= 0) begin
        if (e_n == 0) e_first = i;
        e_last = i;
        e_cs = int'(acc);
        e_n++;
      end
      acc += longint'(blk[i] * blk[i]);
    end
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    for (int i = 0; i < M; i++) begin
      in_valid = 1'b1; in_sample = 8'(blk[i]);
      @(negedge clk);
      in_valid = ($urandom % 3 != 0) ? 1'b0 : 1'b0;
      if ($urandom % 4 == 0) @(negedge clk);   // gaps between samples
    end
    in_valid = 1'b0;
    chk(n_np == IDX_W'(e_n), $sformatf("n_np %0d exp %0d", n_np, e_n));
    chk(np_first == IDX_W'(e_first), "np_first");
    chk(np_last == IDX_W'(e_last), "np_last");
    chk(cs_last == CS_W'(e_cs), $sformatf("cs %0d exp %0d", cs_last, e_cs));
    chk(n_samples == IDX_W'(M), "n_samples");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 40; b++) run_block(b % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
