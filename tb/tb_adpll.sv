// Self-checking testbench of adpll.
//
// Feeds a reference with a rising edge every DIV cycles at a random
// starting phase and checks that the ring-counter DCO slips into phase,
// that `locked` rises after LOCK_COUNT aligned edges, and that afterwards
// `tick` fires exactly once per DIV cycles at TICK_POS cycles after the
// reference edge was seen, with `clk_div` high for the first half of the
// ring. Then shifts the reference phase and checks that lock is lost, a
// slip occurs and lock is regained.
module tb_adpll;
  localparam int unsigned DIV = 4, TICK_POS = 2, LOCK_COUNT = 4;
  logic clk = 1'b0, rst_n = 1'b0, ref_in = 1'b0;
  logic clk_div, tick, locked, slip;
  int checks = 0, failures = 0, n_slip = 0, n_lock = 0;

  adpll #(.DIV(DIV), .TICK_POS(TICK_POS), .LOCK_COUNT(LOCK_COUNT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", m, $time); end
  endtask

  // reference generator: high for the first half of each DIV-cycle period
  int ref_phase = 0;
  int cyc_since_edge = 0;
  always @(posedge clk) begin
    ref_phase = (ref_phase + 1) % DIV;
    ref_in <= (ref_phase < DIV / 2);
  end
  always @(posedge clk) if (rst_n) begin
    if (slip) n_slip++;
  end

  task automatic run_phase(input int shift);
    int lock_wait, seen_edge, pos;
    logic prev_ref;
    ref_phase = (ref_phase + shift) % DIV;
    // lock must come within (LOCK_COUNT + 3) reference periods
    lock_wait = 0;
    @(negedge clk);
    while (locked) begin @(negedge clk); lock_wait++; if (lock_wait > 4 * DIV) break; end
    lock_wait = 0;
    while (!locked && lock_wait < (LOCK_COUNT + 3) * DIV) begin @(negedge clk); lock_wait++; end
    chk(locked, "lock not acquired");
    if (locked) n_lock++;
    // after lock: position relative to reference edge
    seen_edge = 0; pos = 0; prev_ref = ref_in;
    for (int i = 0; i < 40 * DIV; i++) begin
      @(negedge clk);
      // ref rose at the previous negedge; the edge is seen at the next posedge
      if (ref_in && !prev_ref) begin seen_edge = 1; pos = -1; end
      else pos++;
      prev_ref = ref_in;
      if (seen_edge != 0 && pos >= 0) begin
        chk(tick == (pos % DIV == TICK_POS), "tick position");
        chk(clk_div == (pos % DIV < DIV / 2), "clk_div level");
        chk(locked && !slip, "stays locked");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_phase(1);
    run_phase(2);
    run_phase(3);
    chk(n_slip >= 2, "phase slips");
    chk(n_lock == 3, "three locks");
    $display("slips=%0d locks=%0d", n_slip, n_lock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
