// fpu_core: IEEE 754 binary64 (double precision) arithmetic unit.
//
// The phase refinement works in double precision so that milli-degree phase
// errors stay visible after thousands of accumulated products. This unit is
// the shared floating-point engine: add, subtract, multiply, divide and
// conversions between signed 64-bit integers and doubles.
//
// How it works: operands are unpacked into sign, biased exponent and a
// 53-bit significand with the hidden one. Add/subtract aligns the smaller
// operand with guard, round and sticky bits, adds or subtracts, and
// renormalises with a leading-zero count. Multiply forms the full 106-bit
// product. Divide is a restoring divider that produces one quotient bit per
// clock (57 bits). All results are rounded to nearest, ties to even.
//
// Simplifications (this design's choice, not from the document): subnormal
// inputs are read as zero and subnormal results are flushed to signed zero;
// an overflowing result becomes infinity; infinity and NaN inputs are not
// given special treatment. F2I truncates toward zero and saturates.
//
// Interface and timing: pulse `start` for one cycle with `op`, `a`, `b`
// valid while `busy` is low. `done` pulses for one cycle with `result`
// (held until the next operation). ADD, SUB, MUL, I2F and F2I finish two
// cycles after `start`; DIV finishes 59 cycles after `start`. A `start`
// while busy is ignored.
module fpu_core
  import pe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fp_op_e      op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,
  output logic [63:0] result
);

  // ------------------------------------------------------------ helpers
  // Round a normalised significand (bit 55 = hidden one, bits 2..0 =
  // guard, round, sticky) to nearest-even and pack it.
  function automatic logic [63:0] round_pack(input logic s,
                                              input logic signed [13:0] e,
                                              input logic [55:0] m);
    logic        inc;
    logic [53:0] mr;
    logic signed [13:0] er;
    inc = m[2] & (m[1] | m[0] | m[3]);
    mr  = {1'b0, m[55:3]} + 54'(inc);
    er  = e;
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 14'sd1;
    end
    if (er >= 14'sd2047)      return {s, 11'h7FF, 52'd0};
    else if (er <= 14'sd0)    return {s, 63'd0};
    else                      return {s, er[10:0], mr[51:0]};
  endfunction

  function automatic logic [6:0] clz56(input logic [55:0] v);
    logic [6:0] n;
    n = 7'd56;
    for (int i = 0; i < 56; i++)
      if (v[i]) n = 7'(55 - i);
    return n;
  endfunction

  function automatic logic [6:0] clz64(input logic [63:0] v);
    logic [6:0] n;
    n = 7'd64;
    for (int i = 0; i < 64; i++)
      if (v[i]) n = 7'(63 - i);
    return n;
  endfunction

  function automatic logic [63:0] fp_add(input logic [63:0] x, input logic [63:0] y);
    logic        sx, sy;
    logic [10:0] ex, ey;
    logic [52:0] mx, my;
    logic [55:0] mx56, my56, ysh, diff;
    logic [56:0] sum;
    logic [55:0] m;
    logic [11:0] d;
    logic [6:0]  lz;
    logic signed [13:0] e;
    if (x[62:52] == 11'd0) return (y[62:52] == 11'd0) ? {x[63] & y[63], 63'd0} : y;
    if (y[62:52] == 11'd0) return x;
    // order by magnitude so that |x| >= |y|
    if (y[62:0] > x[62:0]) begin
      {sx, ex, mx} = {y[63], y[62:52], 1'b1, y[51:0]};
      {sy, ey, my} = {x[63], x[62:52], 1'b1, x[51:0]};
    end else begin
      {sx, ex, mx} = {x[63], x[62:52], 1'b1, x[51:0]};
      {sy, ey, my} = {y[63], y[62:52], 1'b1, y[51:0]};
    end
    mx56 = {mx, 3'b000};
    my56 = {my, 3'b000};
    d    = {1'b0, ex} - {1'b0, ey};
    if (d >= 12'd56) ysh = 56'd1;
    else begin
      ysh = my56 >> d;
      if ((my56 & ((56'd1 << d) - 56'd1)) != 56'd0) ysh[0] = 1'b1;
    end
    e = 14'(ex);
    if (sx == sy) begin
      sum = {1'b0, mx56} + {1'b0, ysh};
      if (sum[56]) begin
        m = sum[56:1];
        m[0] = m[0] | sum[0];
        e = e + 14'sd1;
      end else m = sum[55:0];
      return round_pack(sx, e, m);
    end else begin
      diff = mx56 - ysh;
      if (diff == 56'd0) return 64'd0;
      lz = clz56(diff);
      m  = diff << lz;
      e  = e - 14'(lz);
      return round_pack(sx, e, m);
    end
  endfunction

  function automatic logic [63:0] fp_mul(input logic [63:0] x, input logic [63:0] y);
    logic [105:0] p;
    logic [55:0]  m;
    logic signed [13:0] e;
    logic s;
    s = x[63] ^ y[63];
    if (x[62:52] == 11'd0 || y[62:52] == 11'd0) return {s, 63'd0};
    p = {1'b1, x[51:0]} * {1'b1, y[51:0]};
    e = 14'(x[62:52]) + 14'(y[62:52]) - 14'sd1023;
    if (p[105]) begin
      m = {p[105:51], |p[50:0]};
      e = e + 14'sd1;
    end else begin
      m = {p[104:50], |p[49:0]};
    end
    return round_pack(s, e, m);
  endfunction

  function automatic logic [63:0] fp_i2f(input logic [63:0] x);
    logic [63:0] mag, nrm;
    logic [6:0]  lz;
    logic        s;
    s   = x[63];
    mag = s ? (~x + 64'd1) : x;
    if (mag == 64'd0) return 64'd0;
    lz  = clz64(mag);
    nrm = mag << lz;
    return round_pack(s, 14'sd1086 - 14'(lz), {nrm[63:9], |nrm[8:0]});
  endfunction

  function automatic logic [63:0] fp_f2i(input logic [63:0] x);
    logic [10:0] ex;
    logic [63:0] mag;
    int          sh;
    ex = x[62:52];
    if (ex < 11'd1023) return 64'd0;
    if (ex >= 11'd1086) return x[63] ? 64'h8000_0000_0000_0000 : 64'h7FFF_FFFF_FFFF_FFFF;
    sh = int'(ex) - 1075;
    if (sh >= 0) mag = {11'd0, 1'b1, x[51:0]} << sh;
    else         mag = {11'd0, 1'b1, x[51:0]} >> (-sh);
    return x[63] ? (~mag + 64'd1) : mag;
  endfunction

  // ------------------------------------------------------------ datapath
  typedef enum logic [1:0] {ST_IDLE, ST_EXEC, ST_DIV, ST_DIVEND} st_e;
  st_e         st;
  fp_op_e      op_q;
  logic [63:0] a_q, b_q;

  // divider state
  logic [53:0] rem;        // partial remainder
  logic [52:0] dvs;        // divisor significand
  logic [56:0] quo;        // quotient bits
  logic [5:0]  dcnt;
  logic        dsign;
  logic signed [13:0] dexp;
  logic        dspecial;   // zero dividend or divisor
  logic [63:0] dspecial_res;

  logic [53:0] rem_sub;
  assign rem_sub = rem - {1'b0, dvs};

  logic [55:0] div_m;
  logic signed [13:0] div_e;
  always_comb begin
    if (quo[56]) begin
      div_m = {quo[56:2], quo[1] | quo[0] | (rem != 54'd0)};
      div_e = dexp;
    end else begin
      div_m = {quo[55:1], quo[0] | (rem != 54'd0)};
      div_e = dexp - 14'sd1;
    end
  end

  assign busy = (st != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= ST_IDLE;
      op_q     <= FP_ADD;
      a_q      <= '0;
      b_q      <= '0;
      done     <= 1'b0;
      result   <= '0;
      rem      <= '0;
      dvs      <= '0;
      quo      <= '0;
      dcnt     <= '0;
      dsign    <= 1'b0;
      dexp     <= '0;
      dspecial <= 1'b0;
      dspecial_res <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        ST_IDLE: if (start) begin
          op_q <= op;
          a_q  <= a;
          b_q  <= b;
          if (op == FP_DIV) begin
            st       <= ST_DIV;
            dsign    <= a[63] ^ b[63];
            dexp     <= 14'(a[62:52]) - 14'(b[62:52]) + 14'sd1023;
            rem      <= {1'b0, 1'b1, a[51:0]};
            dvs      <= {1'b1, b[51:0]};
            quo      <= '0;
            dcnt     <= 6'd0;
            dspecial <= (a[62:52] == 11'd0) || (b[62:52] == 11'd0);
            dspecial_res <= (b[62:52] == 11'd0) ? {a[63] ^ b[63], 11'h7FF, 52'd0}
                                                : {a[63] ^ b[63], 63'd0};
          end else begin
            st <= ST_EXEC;
          end
        end
        ST_EXEC: begin
          unique case (op_q)
            FP_ADD:  result <= fp_add(a_q, b_q);
            FP_SUB:  result <= fp_add(a_q, {~b_q[63], b_q[62:0]});
            FP_MUL:  result <= fp_mul(a_q, b_q);
            FP_I2F:  result <= fp_i2f(a_q);
            FP_F2I:  result <= fp_f2i(a_q);
            default: result <= '0;
          endcase
          done <= 1'b1;
          st   <= ST_IDLE;
        end
        ST_DIV: begin
          // one restoring-division step per clock
          if (!rem_sub[53]) begin
            quo <= {quo[55:0], 1'b1};
            rem <= {rem_sub[52:0], 1'b0};
          end else begin
            quo <= {quo[55:0], 1'b0};
            rem <= {rem[52:0], 1'b0};
          end
          dcnt <= dcnt + 6'd1;
          if (dcnt == 6'd56) st <= ST_DIVEND;
        end
        ST_DIVEND: begin
          result <= dspecial ? dspecial_res : round_pack(dsign, div_e, div_m);
          done   <= 1'b1;
          st     <= ST_IDLE;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

endmodule
