// conj_transpose: Hermitian (conjugate transpose) accelerator, B = A^H.
//
// A is an M x N complex matrix (the 4 x 64 training matrix X), B the N x M
// result (64 x 4). The operation needs no arithmetic beyond a negation: each
// element moves from index (i, j) to (j, i) and its imaginary part changes
// sign, (a + ib)^H = a - ib.
//
// How it works: one element per clock. A counter walks A in row-major order,
// the element returns from memory one cycle later, the real part and the
// negated imaginary part are cast to the accelerator's own format (16_1 by
// default, the hybrid selection for this operator; floor on dropped bits,
// wrap on overflow) and written to B at j*M + i.
//
// Interface: start (one-cycle pulse while idle), busy, done (one-cycle pulse
// after the last write). a_addr/a_re/a_im is a read port with one cycle of
// latency, b_we/b_addr/b_re/b_im a write port.
// Timing: start to done takes M*N + 3 clock cycles.
//
// The element-per-cycle schedule is this design's choice; the operation and
// the format follow the accelerator list and the hybrid-format selection.
module conj_transpose
  import tm_pkg::*;
#(
  parameter  int M  = NR,
  parameter  int N  = NS,
  parameter  int WA = IN_W,   parameter int IA = IN_I,
  parameter  int W  = HERM_W, parameter int I  = HERM_I,
  localparam int AW = $clog2(M*N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [AW-1:0]        a_addr,
  input  logic signed [WA-1:0] a_re,
  input  logic signed [WA-1:0] a_im,
  output logic                 b_we,
  output logic [AW-1:0]        b_addr,
  output logic signed [W-1:0]  b_re,
  output logic signed [W-1:0]  b_im
);

  localparam int FA = WA - IA;
  localparam int F  = W - I;
  localparam logic [$clog2(M+1)-1:0] ILAST = ($clog2(M+1))'(M - 1);
  localparam logic [$clog2(N+1)-1:0] JLAST = ($clog2(N+1))'(N - 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  logic [$clog2(M+1)-1:0] i_cnt;
  logic [$clog2(N+1)-1:0] j_cnt;
  logic                   s1_valid, s1_final;
  logic [AW-1:0]          s1_baddr;
  logic                   wr_final;

  assign busy   = (state != S_IDLE);
  assign a_addr = AW'(i_cnt * N + j_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      i_cnt    <= '0;
      j_cnt    <= '0;
      s1_valid <= 1'b0;
      s1_final <= 1'b0;
      s1_baddr <= '0;
      b_we     <= 1'b0;
      b_addr   <= '0;
      b_re     <= '0;
      b_im     <= '0;
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
        end
        S_RUN: begin
          s1_valid <= 1'b1;
          s1_final <= (i_cnt == ILAST) && (j_cnt == JLAST);
          s1_baddr <= AW'(j_cnt * M + i_cnt);
          if (j_cnt == JLAST) begin
            j_cnt <= '0;
            i_cnt <= i_cnt + 1'b1;
            if (i_cnt == ILAST) state <= S_WAIT;
          end else begin
            j_cnt <= j_cnt + 1'b1;
          end
        end
        S_WAIT: if (b_we && wr_final) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      // Write stage: conjugate and cast the element read last cycle.
      b_we     <= s1_valid;
      wr_final <= s1_valid && s1_final;
      if (s1_valid) begin
        b_addr <= s1_baddr;
        b_re   <= W'(requant(XW'(a_re), FA, W, F));
        b_im   <= W'(requant(-XW'(a_im), FA, W, F));
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("conj_transpose: start while busy");

endmodule
