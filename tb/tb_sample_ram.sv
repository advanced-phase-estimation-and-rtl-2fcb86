// Self-checking testbench of sample_ram.
//
// Writes random words to random addresses of a full-size (2400 x 8) RAM
// while reading random addresses, and compares every read with a model
// array: data must appear one cycle after the address, and a read of the
// address being written returns the old word.
module tb_sample_ram;
  localparam int unsigned DEPTH = 2400;
  logic clk = 1'b0, we = 1'b0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;
  logic [7:0] exp_q;

  sample_ram #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so that every read is defined
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 12'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      raddr = 12'($urandom % DEPTH);
      we    = 1'($urandom);
      waddr = (i % 7 == 0) ? raddr : 12'($urandom % DEPTH);
      wdata = 8'($urandom);
      exp_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
