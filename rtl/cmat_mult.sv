// cmat_mult: sequential complex matrix multiplication accelerator, C = A * B,
// with A an M x K and B a K x N complex matrix.
//
// The same engine serves the three multiplication accelerators of the chain:
// 4x64 by 64x4 (Z*X^H and X*X^H), 4x4 by 4x4 and 4x4 by 4x64. Real and
// imaginary parts travel as separate signed fixed-point words and every
// complex product is formed from four real products,
//   (a + ib)(c + id) = (ac - bd) + i(ad + bc).
//
// How it works: one complex multiply-accumulate per clock. Counters walk
// i (row of C), j (column of C) and k (inner index); each cycle the engine
// presents A[i][k] and B[k][j] on its two read ports, the data returns one
// cycle later, is cast to the accelerator's own format (W_I) and accumulated
// at full precision. After the K-th product the sum is cast to W_I and
// written to C[i][j]. Inputs may arrive in other formats (WA_IA, WB_IB); the
// cast on entry mirrors the type conversion at each accelerator's boundary.
//
// Interface: start (one-cycle pulse while idle) begins a run; busy is high
// until done pulses for one cycle after the last write. Memory ports are
// row-major addresses with one cycle of read latency. c_we/c_addr/c_re/c_im
// form a write port.
// Timing: start to done takes M*N*K + 3 clock cycles.
//
// The sequential one-MAC structure, the full-precision accumulator and the
// single cast at the end of each dot product are choices of this design;
// the operation, the sizes and the default formats follow the accelerator
// list and the hybrid-format selection.
module cmat_mult
  import tm_pkg::*;
#(
  parameter  int M  = NR,
  parameter  int K  = NS,
  parameter  int N  = NR,
  parameter  int WA = IN_W,   parameter int IA = IN_I,
  parameter  int WB = HERM_W, parameter int IB = HERM_I,
  parameter  int W  = MM64_W, parameter int I  = MM64_I,
  localparam int AAW = $clog2(M*K),
  localparam int BAW = $clog2(K*N),
  localparam int CAW = $clog2(M*N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [AAW-1:0]      a_addr,
  input  logic signed [WA-1:0] a_re,
  input  logic signed [WA-1:0] a_im,
  output logic [BAW-1:0]      b_addr,
  input  logic signed [WB-1:0] b_re,
  input  logic signed [WB-1:0] b_im,
  output logic                c_we,
  output logic [CAW-1:0]      c_addr,
  output logic signed [W-1:0] c_re,
  output logic signed [W-1:0] c_im
);

  localparam int FA   = WA - IA;
  localparam int FB   = WB - IB;
  localparam int F    = W - I;
  localparam int ACCW = 2*W + 2 + $clog2(K);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  localparam logic [$clog2(M+1)-1:0] ILAST = ($clog2(M+1))'(M - 1);
  localparam logic [$clog2(N+1)-1:0] JLAST = ($clog2(N+1))'(N - 1);
  localparam logic [$clog2(K+1)-1:0] KLAST = ($clog2(K+1))'(K - 1);

  logic [$clog2(M+1)-1:0] i_cnt;
  logic [$clog2(N+1)-1:0] j_cnt;
  logic [$clog2(K+1)-1:0] k_cnt;
  logic                   issue_last;

  // Stage 1: operands returning from memory.
  logic           s1_valid, s1_first, s1_lastk, s1_final;
  logic [CAW-1:0] s1_caddr;
  // Stage 2: accumulator and write.
  logic signed [ACCW-1:0] acc_re, acc_im;
  logic                   wr_final;

  assign busy       = (state != S_IDLE);
  assign issue_last = (i_cnt == ILAST) && (j_cnt == JLAST) && (k_cnt == KLAST);
  assign a_addr     = AAW'(i_cnt * K + k_cnt);
  assign b_addr     = BAW'(k_cnt * N + j_cnt);

  // Operands cast to the accelerator's own format, then the complex product.
  logic signed [W-1:0]    ar, ai, br, bi;
  logic signed [2*W:0]    p_re, p_im;
  logic signed [ACCW-1:0] sum_re, sum_im;
  always_comb begin
    ar = W'(requant(XW'(a_re), FA, W, F));
    ai = W'(requant(XW'(a_im), FA, W, F));
    br = W'(requant(XW'(b_re), FB, W, F));
    bi = W'(requant(XW'(b_im), FB, W, F));
    p_re = (2*W+1)'(ar * br) - (2*W+1)'(ai * bi);
    p_im = (2*W+1)'(ar * bi) + (2*W+1)'(ai * br);
    sum_re = (s1_first ? '0 : acc_re) + ACCW'(p_re);
    sum_im = (s1_first ? '0 : acc_im) + ACCW'(p_im);
  end

  assign c_re = W'(requant(XW'(acc_re), 2*F, W, F));
  assign c_im = W'(requant(XW'(acc_im), 2*F, W, F));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      i_cnt    <= '0;
      j_cnt    <= '0;
      k_cnt    <= '0;
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_lastk <= 1'b0;
      s1_final <= 1'b0;
      s1_caddr <= '0;
      acc_re   <= '0;
      acc_im   <= '0;
      c_we     <= 1'b0;
      c_addr   <= '0;
      wr_final <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      // Address issue.
      s1_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          i_cnt <= '0;
          j_cnt <= '0;
          k_cnt <= '0;
        end
        S_RUN: begin
          s1_valid <= 1'b1;
          s1_first <= (k_cnt == 0);
          s1_lastk <= (k_cnt == KLAST);
          s1_final <= issue_last;
          s1_caddr <= CAW'(i_cnt * N + j_cnt);
          if (issue_last) state <= S_WAIT;
          if (k_cnt == KLAST) begin
            k_cnt <= '0;
            if (j_cnt == JLAST) begin
              j_cnt <= '0;
              i_cnt <= i_cnt + 1'b1;
            end else begin
              j_cnt <= j_cnt + 1'b1;
            end
          end else begin
            k_cnt <= k_cnt + 1'b1;
          end
        end
        S_WAIT: if (c_we && wr_final) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      // Accumulate.
      if (s1_valid) begin
        acc_re <= sum_re;
        acc_im <= sum_im;
      end
      // Write the finished dot product.
      c_we     <= s1_valid && s1_lastk;
      wr_final <= s1_valid && s1_final;
      if (s1_valid && s1_lastk) c_addr <= s1_caddr;
    end
  end

  // A run may only be started while the accelerator is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("cmat_mult: start while busy");

endmodule
