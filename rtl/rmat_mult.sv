// rmat_mult: sequential real matrix multiplication, C = A * B, with A an
// M x K and B a K x N real matrix. It is the multiplication unit inside the
// complex inverse, where it forms A^-1*C, C*r0 and r0*y11 (4 x 4 each).
//
// How it works: one multiply-accumulate per clock. Counters walk i, j and k;
// each cycle A[i][k] and B[k][j] are requested on two read ports, they return
// one cycle later already in the unit's own format W_I (32_5 by default, the
// hybrid selection for this unit), the product is accumulated at full
// precision, and after K products the sum is cast to W_I (floor, wrap) and
// written to C[i][j].
//
// Interface: start (one-cycle pulse while idle), busy, done (one-cycle pulse
// after the last write); a_addr/a_data and b_addr/b_data are read ports with
// one cycle of latency, c_we/c_addr/c_data a write port.
// Timing: start to done takes M*N*K + 3 clock cycles.
//
// The schedule and the single cast per dot product are this design's
// choices; the function and the format follow the document.
module rmat_mult
  import tm_pkg::*;
#(
  parameter  int M = NR,
  parameter  int K = NR,
  parameter  int N = NR,
  parameter  int W = IMUL_W, parameter int I = IMUL_I,
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
  input  logic signed [W-1:0] a_data,
  output logic [BAW-1:0]      b_addr,
  input  logic signed [W-1:0] b_data,
  output logic                c_we,
  output logic [CAW-1:0]      c_addr,
  output logic signed [W-1:0] c_data
);

  localparam int F    = W - I;
  localparam int ACCW = 2*W + 1 + $clog2(K);
  localparam logic [$clog2(M+1)-1:0] ILAST = ($clog2(M+1))'(M - 1);
  localparam logic [$clog2(N+1)-1:0] JLAST = ($clog2(N+1))'(N - 1);
  localparam logic [$clog2(K+1)-1:0] KLAST = ($clog2(K+1))'(K - 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  logic [$clog2(M+1)-1:0] i_cnt;
  logic [$clog2(N+1)-1:0] j_cnt;
  logic [$clog2(K+1)-1:0] k_cnt;
  logic                   issue_last;
  logic                   s1_valid, s1_first, s1_lastk, s1_final;
  logic [CAW-1:0]         s1_caddr;
  logic signed [ACCW-1:0] acc, sum;
  logic                   wr_final;

  assign busy       = (state != S_IDLE);
  assign issue_last = (i_cnt == ILAST) && (j_cnt == JLAST) && (k_cnt == KLAST);
  assign a_addr     = AAW'(i_cnt * K + k_cnt);
  assign b_addr     = BAW'(k_cnt * N + j_cnt);
  assign sum        = (s1_first ? '0 : acc) + ACCW'(a_data * b_data);
  assign c_data     = W'(requant(XW'(acc), 2*F, W, F));

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
      acc      <= '0;
      c_we     <= 1'b0;
      c_addr   <= '0;
      wr_final <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
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
          s1_first <= (k_cnt == '0);
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
      if (s1_valid) acc <= sum;
      c_we     <= s1_valid && s1_lastk;
      wr_final <= s1_valid && s1_final;
      if (s1_valid && s1_lastk) c_addr <= s1_caddr;
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("rmat_mult: start while busy");

endmodule
