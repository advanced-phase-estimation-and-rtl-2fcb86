// iterative_model: iterative phase refinement over the sample block (Eq. 6).
//
// The initial phase from the zero-crossing measure is only good to about one
// sample period. This stage improves it with the document's update rule
//
//   phi_k = phi_{k-1} - sum_m sin(theta_m) (v[m] - A cos(theta_m))
//                       ---------------------------------------
//                            A * sum_m sin(theta_m)^2
//
//   theta_m = 2*pi*F/Fs * (m - 1) + phi_{k-1}
//
// which is one Gauss-Newton step of a least-squares fit of A cos(theta_m)
// to the samples v[m]. Each pass walks the whole block: the CORDIC gives
// sin and cos of theta_m, and the FPU core accumulates both sums in IEEE
// 754 double precision; the amplitude and frequency are converted to double
// first, as the document describes.
//
// How it works: a small micro-program (table `ucode`) drives the FPU one
// operation at a time from a register file of doubles. Program INIT
// converts A and F, program SAMPLE does the eleven operations per sample,
// UPDATE forms the correction and turns it into a 32-bit angle, FINAL
// converts the phase to radians. The running angle theta is kept as a
// 32-bit fraction of a turn (this design's choice), so it advances by
// `fnorm` per sample and wraps for free. The number of passes ITERATIONS is
// not given by the document; four is this design's choice.
//
// Interface and timing: pulse `start` with `amp` (Q16.16), `fnorm`
// (F/Fs in 2^-32 units) and `phi0` (2^-32 turn units). The block is read
// through `ram_raddr`/`ram_rdata` (one-cycle read latency). The CORDIC and
// FPU are external and connected through their start/done ports. `done`
// pulses when `phase` (2^-32 turns), `phase_rad` (double, -pi..pi),
// `amp_dbl` and `freq_hz` (doubles) are final. One pass takes about
// M * (ITERATIONS_CORDIC + 36) cycles.
module iterative_model
  import pe_pkg::*;
#(
  parameter int unsigned M          = BLOCK_M,
  parameter int unsigned ITERATIONS = 4,
  parameter real         FS_HZ      = 375.0e6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [31:0]                   amp,
  input  logic [31:0]                   fnorm,
  input  logic [31:0]                   phi0,
  // sample RAM read port
  output logic [$clog2(M)-1:0]          ram_raddr,
  input  logic signed [SAMPLE_W-1:0]    ram_rdata,
  // CORDIC
  output logic                          cordic_start,
  output logic [31:0]                   cordic_angle,
  input  logic                          cordic_done,
  input  logic signed [31:0]            cordic_sin,
  input  logic signed [31:0]            cordic_cos,
  // FPU core
  output logic                          fpu_start,
  output fp_op_e                        fpu_op,
  output logic [63:0]                   fpu_a,
  output logic [63:0]                   fpu_b,
  input  logic                          fpu_done,
  input  logic [63:0]                   fpu_result,
  // results
  output logic                          busy,
  output logic                          done,
  output logic [31:0]                   phase,
  output logic [63:0]                   phase_rad,
  output logic [63:0]                   amp_dbl,
  output logic [63:0]                   freq_hz,
  output logic signed [31:0]            last_correction,
  output logic [7:0]                    passes
);
  localparam logic [63:0] FS_BITS = $realtobits(FS_HZ);
  localparam int unsigned AW = $clog2(M);

  // ------------------------------------------------ operand sources
  typedef enum logic [4:0] {
    R_SIN = 5'd0, R_COS = 5'd1, R_A = 5'd2, R_V = 5'd3, R_T = 5'd4,
    R_S1 = 5'd5, R_S2 = 5'd6, R_FN = 5'd7, R_FHZ = 5'd8, R_PH = 5'd9,
    C_2M16 = 5'd16, C_2M30 = 5'd17, C_2M32 = 5'd18, C_FS = 5'd19,
    C_RAD2ANG = 5'd20, C_ANG2RAD = 5'd21,
    I_AMP = 5'd22, I_FN = 5'd23, I_SIN = 5'd24, I_COS = 5'd25,
    I_V = 5'd26, I_PHI = 5'd27, D_DPHI = 5'd28, C_ZERO = 5'd29
  } src_e;

  typedef struct packed {
    fp_op_e op;
    src_e   a;
    src_e   b;
    src_e   dst;
  } uop_t;

  // program entry points
  localparam logic [4:0] PC_INIT = 5'd0, PC_SAMPLE = 5'd5, PC_UPDATE = 5'd16,
                         PC_FINAL = 5'd20, PC_END = 5'd22;

  function automatic uop_t ucode(input logic [4:0] pc);
    unique case (pc)
      // INIT: A and F to double
      5'd0:  return '{FP_I2F, I_AMP, C_ZERO,    R_T};
      5'd1:  return '{FP_MUL, R_T,   C_2M16,    R_A};
      5'd2:  return '{FP_I2F, I_FN,  C_ZERO,    R_T};
      5'd3:  return '{FP_MUL, R_T,   C_2M32,    R_FN};
      5'd4:  return '{FP_MUL, R_FN,  C_FS,      R_FHZ};
      // SAMPLE: S1 += sin*(v - A cos), S2 += sin^2
      5'd5:  return '{FP_I2F, I_SIN, C_ZERO,    R_SIN};
      5'd6:  return '{FP_MUL, R_SIN, C_2M30,    R_SIN};
      5'd7:  return '{FP_I2F, I_COS, C_ZERO,    R_COS};
      5'd8:  return '{FP_MUL, R_COS, C_2M30,    R_COS};
      5'd9:  return '{FP_MUL, R_A,   R_COS,     R_T};
      5'd10: return '{FP_I2F, I_V,   C_ZERO,    R_V};
      5'd11: return '{FP_SUB, R_V,   R_T,       R_T};
      5'd12: return '{FP_MUL, R_SIN, R_T,       R_T};
      5'd13: return '{FP_ADD, R_S1,  R_T,       R_S1};
      5'd14: return '{FP_MUL, R_SIN, R_SIN,     R_T};
      5'd15: return '{FP_ADD, R_S2,  R_T,       R_S2};
      // UPDATE: correction = S1 / (A S2), radians -> 2^-32 turns
      5'd16: return '{FP_MUL, R_A,   R_S2,      R_T};
      5'd17: return '{FP_DIV, R_S1,  R_T,       R_T};
      5'd18: return '{FP_MUL, R_T,   C_RAD2ANG, R_T};
      5'd19: return '{FP_F2I, R_T,   C_ZERO,    D_DPHI};
      // FINAL: phase to radians
      5'd20: return '{FP_I2F, I_PHI, C_ZERO,    R_T};
      5'd21: return '{FP_MUL, R_T,   C_ANG2RAD, R_PH};
      default: return '{FP_ADD, C_ZERO, C_ZERO, R_T};
    endcase
  endfunction

  // ------------------------------------------------ state
  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_ITER, S_FETCH, S_WAIT, S_NEXT, S_UPD, S_DONE} st_e;
  st_e st, ret;

  logic [63:0]        rf [16];   // 10 used
  logic [4:0]         pc, pc_end;
  logic               issued;
  logic [31:0]        amp_q, fn_q, phi, theta;
  logic signed [31:0] sin_q, cos_q;
  logic signed [SAMPLE_W-1:0] v_q;
  logic signed [31:0] dphi;
  logic [AW-1:0]      idx;
  logic [7:0]         k;
  uop_t               uop;

  assign uop = ucode(pc);

  function automatic logic [63:0] operand(input src_e s);
    unique case (s)
      C_2M16:    return DBL_2POW_M16;
      C_2M30:    return DBL_2POW_M30;
      C_2M32:    return DBL_2POW_M32;
      C_FS:      return FS_BITS;
      C_RAD2ANG: return DBL_RAD2ANG;
      C_ANG2RAD: return DBL_ANG2RAD;
      I_AMP:     return {32'd0, amp_q};
      I_FN:      return {32'd0, fn_q};
      I_SIN:     return {{32{sin_q[31]}}, sin_q};
      I_COS:     return {{32{cos_q[31]}}, cos_q};
      I_V:       return {{(64-SAMPLE_W){v_q[SAMPLE_W-1]}}, v_q};
      I_PHI:     return {{32{phi[31]}}, phi};
      C_ZERO:    return DBL_ZERO;
      default:   return (s <= R_PH) ? rf[s[3:0]] : DBL_ZERO;
    endcase
  endfunction

  assign fpu_start    = (st == S_EXEC) && !issued;
  assign fpu_op       = uop.op;
  assign fpu_a        = operand(uop.a);
  assign fpu_b        = operand(uop.b);
  assign cordic_start = (st == S_FETCH);
  assign cordic_angle = theta;
  assign busy         = (st != S_IDLE);

  assign phase     = phi;
  assign phase_rad = rf[4'(R_PH)];
  assign amp_dbl   = rf[4'(R_A)];
  assign freq_hz   = rf[4'(R_FHZ)];
  assign passes    = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ret <= S_IDLE;
      for (int r = 0; r < 16; r++) rf[r] <= DBL_ZERO;
      pc <= '0; pc_end <= '0; issued <= 1'b0;
      amp_q <= '0; fn_q <= '0; phi <= '0; theta <= '0;
      sin_q <= '0; cos_q <= '0; v_q <= '0; dphi <= '0;
      idx <= '0; k <= '0; ram_raddr <= '0; done <= 1'b0;
      last_correction <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          amp_q  <= amp;
          fn_q   <= fnorm;
          phi    <= phi0;
          k      <= '0;
          pc     <= PC_INIT;
          pc_end <= PC_SAMPLE;
          ret    <= S_ITER;
          st     <= S_EXEC;
        end
        S_EXEC: begin
          if (!issued) issued <= 1'b1;
          else if (fpu_done) begin
            issued <= 1'b0;
            if (uop.dst == D_DPHI) dphi <= fpu_result[31:0];
            else                   rf[uop.dst[3:0]] <= fpu_result;
            if (pc == pc_end - 5'd1) st <= ret;
            pc <= pc + 5'd1;
          end
        end
        S_ITER: begin
          rf[4'(R_S1)] <= DBL_ZERO;
          rf[4'(R_S2)] <= DBL_ZERO;
          idx       <= '0;
          ram_raddr <= '0;
          theta     <= phi;
          st        <= S_FETCH;
        end
        S_FETCH: st <= S_WAIT;
        S_WAIT: if (cordic_done) begin
          sin_q  <= cordic_sin;
          cos_q  <= cordic_cos;
          v_q    <= ram_rdata;
          pc     <= PC_SAMPLE;
          pc_end <= PC_UPDATE;
          ret    <= S_NEXT;
          st     <= S_EXEC;
        end
        S_NEXT: begin
          theta <= theta + fn_q;
          if (32'(idx) == M - 1) begin
            pc     <= PC_UPDATE;
            pc_end <= PC_FINAL;
            ret    <= S_UPD;
            st     <= S_EXEC;
          end else begin
            idx       <= idx + 1'b1;
            ram_raddr <= idx + 1'b1;
            st        <= S_FETCH;
          end
        end
        S_UPD: begin
          phi             <= phi - dphi;
          last_correction <= dphi;
          k               <= k + 8'd1;
          if (32'(k) == ITERATIONS - 1) begin
            pc     <= PC_FINAL;
            pc_end <= PC_END;
            ret    <= S_DONE;
            st     <= S_EXEC;
          end else begin
            st <= S_ITER;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the FPU is only started when it can accept an operation
  assert property (@(posedge clk) disable iff (!rst_n) fpu_done |-> issued);
endmodule
