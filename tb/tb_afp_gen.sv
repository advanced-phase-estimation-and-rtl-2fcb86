// Self-checking testbench of afp_gen.
//
// Applies random block measures and compares:
//   amp   with sqrt(2*CS/np_last) computed in double precision (within
//         1 LSB of Q16.16),
//   fnorm with floor((N_np-1) * 2^32 / (np_last - np_first)),
//   phi0  with -1/4 turn + fnorm/2 - fnorm*np_first modulo one turn,
// and checks that `valid` is low for fewer than two transitions. The
// cycle count from `start` to `done` must be 2*(CS_W+34)/2 + CS_W + 34 + 5
// cycles or less.
module tb_afp_gen;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [IDX_W-1:0] n_np = '0, np_first = '0, np_last = '0;
  logic [CS_W-1:0] cs_last = '0;
  logic done, valid;
  logic [31:0] amp, fnorm, phi0;
  int checks = 0, failures = 0;

  afp_gen dut (.*);
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

  task automatic one(input int n, input int first, input int last, input longint cs);
    int lat;
    real ea;
    longint ef;
    logic [31:0] ep;
    @(negedge clk);
    n_np = IDX_W'(n); np_first = IDX_W'(first); np_last = IDX_W'(last); cs_last = CS_W'(cs);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    if (n < 2 || last <= first) begin
      chk(!valid, "valid for degenerate block");
    end else begin
      ea = $sqrt(2.0 * real'(cs) / real'(last)) * 65536.0;
      ef = ((longint'(n) - 64'sd1) <<< 32) / (longint'(last) - longint'(first));
      ep = 32'hC000_0000 + 32'(ef >> 1) - 32'(ef * longint'(first));
      chk(valid, "valid");
      chk((real'(amp) - ea) < 1.0 && (ea - real'(amp)) < 1.0,
          $sformatf("amp %0d exp %f", amp, ea));
      chk(fnorm == 32'(ef), $sformatf("fnorm %h exp %h", fnorm, ef));
      chk(phi0 == ep, $sformatf("phi0 %h exp %h", phi0, ep));
      chk(lat <= 2 * (CS_W + 34) / 2 + CS_W + 34 + 5, $sformatf("latency %0d", lat));
    end
  endtask

  initial begin
    int n, f, l;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(0, 0, 0, 0);
    one(1, 10, 10, 5000);
    for (int i = 0; i < 300; i++) begin
      n = 2 + int'($urandom % 100);
      f = 1 + int'($urandom % 200);
      l = f + (n - 1) * (2 + int'($urandom % 20)) + int'($urandom % 5);
      if (l > 2399) l = 2399;
      one(n, f, l, longint'($urandom_range(32'(l * 16384))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
