// Self-checking testbench of fsm_ctrl.
//
// Surrounds the controller with simple models: a queue for the FIFO (with
// one-cycle read latency and random gaps in its supply), an array for the
// RAM, and A/F/P and iterative stages that answer after random delays.
// Checks: the FIFO is flushed once per run, exactly M samples are written
// to consecutive RAM addresses as two's complement (offset binary with
// the top bit inverted), the block scan sees the same M samples in order,
// the stages are started in order, `error` is raised (and the iterative
// stage skipped) when A/F/P reports an invalid block, and the fill phase
// takes M + 2 cycles (FIFO refill and read latency) when the supply never stalls.
module tb_fsm_ctrl;
  localparam int unsigned M = 64;
  localparam int unsigned AW = $clog2(M);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic fifo_flush, capture_en, fifo_rd_en, fifo_empty, fifo_rd_valid = 1'b0;
  logic [7:0] fifo_rd_data = '0;
  logic ram_we, scan_owns_ram;
  logic [AW-1:0] ram_waddr, ram_raddr;
  logic signed [7:0] ram_wdata, ram_rdata = '0;
  logic scan_clear, scan_valid;
  logic afp_start, afp_done = 1'b0, afp_valid = 1'b0;
  logic iter_start, iter_done = 1'b0;
  logic busy, done, error;
  int checks = 0, failures = 0;

  fsm_ctrl #(.M(M), .SW(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", m, $time); end
  endtask

  // ---------------- models
  byte unsigned fq[$];
  byte unsigned sent[$];
  logic signed [7:0] mem [M];
  bit supply_gaps = 1'b0;
  bit answer_valid = 1'b1;
  int n_flush = 0, n_wr = 0, n_scan = 0, n_afp = 0, n_iter = 0, fill_cycles = 0;
  int afp_delay = -1, iter_delay = -1;
  logic [7:0] head;

  assign fifo_empty = (fq.size() == 0);

  always @(posedge clk) if (rst_n) begin
    // FIFO
    fifo_rd_valid <= 1'b0;
    if (fifo_flush) begin fq.delete(); n_flush++; end
    else begin
      if (fifo_rd_en && fq.size() != 0) begin
        head = fq.pop_front();
        fifo_rd_data  <= head;
        fifo_rd_valid <= 1'b1;
        sent.push_back(head);
      end
      if (capture_en && (!supply_gaps || $urandom % 3 == 0)) fq.push_back(8'($urandom));
    end
    if (capture_en) fill_cycles++;
    // RAM
    if (ram_we) begin
      chk(32'(ram_waddr) == n_wr, "write address order");
      chk(ram_wdata == $signed(sent[n_wr] - 8'd128), "two's complement conversion");
      mem[ram_waddr] <= ram_wdata;
      n_wr++;
    end
    ram_rdata <= mem[ram_raddr];
    // block scan stream
    if (scan_valid) begin
      chk(ram_rdata == $signed(sent[n_scan] - 8'd128), $sformatf("scan order %0d: %0d vs %0d", n_scan, ram_rdata, $signed(sent[n_scan] - 8'd128)));
      n_scan++;
    end
    // stages
    afp_done  <= 1'b0;
    iter_done <= 1'b0;
    if (afp_start) begin
      chk(n_scan == M, "afp started after full scan");
      afp_delay = 3 + int'($urandom % 20); n_afp++;
    end else if (afp_delay > 0) afp_delay--;
    else if (afp_delay == 0) begin afp_done <= 1'b1; afp_valid <= answer_valid; afp_delay = -1; end
    if (iter_start) begin iter_delay = 3 + int'($urandom % 50); n_iter++; end
    else if (iter_delay > 0) iter_delay--;
    else if (iter_delay == 0) begin iter_done <= 1'b1; iter_delay = -1; end
  end

  task automatic run(input bit gaps, input bit ok);
    int t;
    supply_gaps = gaps; answer_valid = ok;
    n_flush = 0; n_wr = 0; n_scan = 0; n_afp = 0; n_iter = 0; fill_cycles = 0;
    sent.delete();
    // stale samples in the FIFO must be flushed
    fq.push_back(8'hAA); fq.push_back(8'h55);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    t = 0;
    while (!done && t < 20000) begin @(negedge clk); t++; end
    chk(done, "done");
    chk(n_flush == 1, "one flush");
    chk(n_wr == M, "M writes");
    chk(n_scan == M, "M scanned");
    chk(n_afp == 1, "afp once");
    chk(n_iter == (ok ? 1 : 0), "iterative stage started when valid only");
    chk(error == !ok, "error flag");
    if (!gaps) chk(fill_cycles == M + 2, $sformatf("fill cycles %0d", fill_cycles));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1'b0, 1'b1);
    run(1'b1, 1'b1);
    run(1'b1, 1'b0);
    run(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
