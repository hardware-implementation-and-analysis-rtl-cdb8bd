// cmat_sub: complex matrix subtraction accelerator, C = A - B, element by
// element over NE complex elements (4 x 64 = 256 by default). In the chain it
// forms the mitigated output Zhat = Z - (Z X^H)(X X^H)^-1 X.
//
// How it works: one complex element per clock. A counter presents the same
// address to both read ports; the operands return one cycle later, are cast
// from their own formats (A: WA_IA, B: WB_IB) to the unit's format W_I (32_5
// by default, the hybrid selection for the subtraction; floor, wrap), and the
// real and imaginary differences, wrapped to W bits, are written to C at the
// same address.
//
// Interface: start (one-cycle pulse while idle), busy, done (one-cycle pulse
// after the last write); rd_addr with a_re/a_im/b_re/b_im is a read port pair
// with one cycle of latency, c_we/c_addr/c_re/c_im a write port.
// Timing: start to done takes NE + 3 clock cycles.
//
// The schedule is this design's choice; the operation and the format follow
// the document.
module cmat_sub
  import tm_pkg::*;
#(
  parameter  int NE = NR*NS,
  parameter  int WA = IN_W,   parameter int IA = IN_I,
  parameter  int WB = MM4N_W, parameter int IB = MM4N_I,
  parameter  int W  = SUB_W,  parameter int I  = SUB_I,
  localparam int AW = $clog2(NE)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [AW-1:0]        rd_addr,
  input  logic signed [WA-1:0] a_re,
  input  logic signed [WA-1:0] a_im,
  input  logic signed [WB-1:0] b_re,
  input  logic signed [WB-1:0] b_im,
  output logic                 c_we,
  output logic [AW-1:0]        c_addr,
  output logic signed [W-1:0]  c_re,
  output logic signed [W-1:0]  c_im
);

  localparam int FA = WA - IA;
  localparam int FB = WB - IB;
  localparam int F  = W - I;
  localparam logic [AW:0] LAST = (AW+1)'(NE - 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  logic [AW:0]   cnt;
  logic          s1_valid, s1_final, wr_final;
  logic [AW-1:0] s1_addr;
  logic signed [W-1:0] ar, ai, br, bi;

  assign busy    = (state != S_IDLE);
  assign rd_addr = cnt[AW-1:0];

  always_comb begin
    ar = W'(requant(XW'(a_re), FA, W, F));
    ai = W'(requant(XW'(a_im), FA, W, F));
    br = W'(requant(XW'(b_re), FB, W, F));
    bi = W'(requant(XW'(b_im), FB, W, F));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      s1_valid <= 1'b0;
      s1_final <= 1'b0;
      s1_addr  <= '0;
      c_we     <= 1'b0;
      c_addr   <= '0;
      c_re     <= '0;
      c_im     <= '0;
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
        c_re   <= ar - br;   // wraps to W bits
        c_im   <= ai - bi;
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("cmat_sub: start while busy");

endmodule
