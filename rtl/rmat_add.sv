// rmat_add: real matrix addition, C = A + B, element by element over a
// matrix of NE elements (4 x 4 = 16 by default). It forms C*r0 + A inside the
// complex inverse.
//
// How it works: one element per clock. A counter presents the same address to
// both read ports, the two operands return one cycle later already in the
// unit's own format W_I (32_7 by default, the hybrid selection for this
// unit), their sum is cast back to W_I (wrap on overflow) and written to C at
// the same address.
//
// Interface: start (one-cycle pulse while idle), busy, done (one-cycle pulse
// after the last write); rd_addr with a_data/b_data is a read port pair with
// one cycle of latency, c_we/c_addr/c_data a write port.
// Timing: start to done takes NE + 3 clock cycles.
//
// The schedule is this design's choice; the function and the format follow
// the document.
module rmat_add
  import tm_pkg::*;
#(
  parameter  int NE = NR*NR,
  parameter  int W  = IADD_W, parameter int I = IADD_I,
  localparam int AW = $clog2(NE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [AW-1:0]       rd_addr,
  input  logic signed [W-1:0] a_data,
  input  logic signed [W-1:0] b_data,
  output logic                c_we,
  output logic [AW-1:0]       c_addr,
  output logic signed [W-1:0] c_data
);

  localparam logic [AW:0] LAST = (AW+1)'(NE - 1);

  // Both operands and the result share one format, so the integer width only
  // has to be a legal one; it does not change the arithmetic.
  if (I < 1 || I > W) begin : g_bad_format
    $error("rmat_add: integer width I must lie in 1..W");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  logic [AW:0]   cnt;
  logic          s1_valid, s1_final, wr_final;
  logic [AW-1:0] s1_addr;

  assign busy    = (state != S_IDLE);
  assign rd_addr = cnt[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      s1_valid <= 1'b0;
      s1_final <= 1'b0;
      s1_addr  <= '0;
      c_we     <= 1'b0;
      c_addr   <= '0;
      c_data   <= '0;
      wr_final <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      s1_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          s1_valid <= 1'b1;
          s1_final <= (cnt == LAST);
          s1_addr  <= cnt[AW-1:0];
          cnt      <= cnt + 1'b1;
          if (cnt == LAST) state <= S_WAIT;
        end
        S_WAIT: if (c_we && wr_final) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      c_we     <= s1_valid;
      wr_final <= s1_valid && s1_final;
      if (s1_valid) begin
        c_addr <= s1_addr;
        c_data <= a_data + b_data;   // wraps to W bits
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("rmat_add: start while busy");

endmodule
