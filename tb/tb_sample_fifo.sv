// Self-checking testbench of sample_fifo.
//
// Random pushes and pops against a queue model: checks data order, the
// one-cycle read latency, full/empty/count, that a push while full is
// dropped and raises the sticky overflow flag, and that flush empties the
// buffer and clears overflow. Uses a 16-entry instance to reach full fast.
module tb_sample_fifo;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flush = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  logic rd_valid, full, empty, overflow;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  byte unsigned q[$];
  byte unsigned exp_data;
  logic exp_valid = 1'b0;
  logic exp_ovf = 1'b0;

  sample_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", m, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // outputs of the previous edge
      chk(rd_valid == exp_valid, "rd_valid");
      if (exp_valid) chk(rd_data == exp_data, "rd_data");
      chk(count == ($clog2(DEPTH)+1)'(q.size()), "count");
      chk(full == (q.size() == DEPTH), "full");
      chk(empty == (q.size() == 0), "empty");
      chk(overflow == exp_ovf, "overflow");
      if (full) n_full++;
      // next stimulus; phases bias toward filling or draining
      flush   = ($urandom % 500 == 0);
      wr_en   = ((cyc / 300) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd_en   = ((cyc / 300) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      wr_data = 8'($urandom);
      // model
      exp_valid = 1'b0;
      if (flush) begin
        q.delete();
        exp_ovf = 1'b0;
      end else begin
        if (rd_en && q.size() != 0) begin
          exp_data  = q.pop_front();
          exp_valid = 1'b1;
        end
        if (wr_en) begin
          if (q.size() + (exp_valid ? 1 : 0) == DEPTH) begin
            exp_ovf = 1'b1; n_ovf++;
          end else q.push_back(wr_data);
        end
      end
    end
    chk(n_full > 0, "full never reached");
    chk(n_ovf > 0, "overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
