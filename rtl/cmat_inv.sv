// cmat_inv: 4 x 4 complex matrix inversion with real arithmetic units.
//
// For M = A + iC (A real part, C imaginary part) the inverse is obtained from
// two real inversions, three real multiplications and one real addition:
//   r0  = A^-1 * C
//   y11 = (C * r0 + A)^-1
//   M^-1 = y11 - i (r0 * y11)
// This is the block form of the real 2N x 2N system [A -C; C A], solved
// recursively. It needs A to be invertible, which holds for the Hermitian
// positive-definite X X^H this unit inverts in the chain (its real part is
// symmetric positive definite).
//
// How it works: the unit loads the 16 complex elements (real and imaginary
// halves side by side) into register files, then runs its three sub-units one
// after another: rmat_inv_adj (adjugate inverse, 16_7), rmat_mult (real
// multiplication, 32_5) and rmat_add (real addition, 32_7), in the order
// INV(A), MUL(A^-1,C), MUL(C,r0), ADD(Cr0,A), INV(S), MUL(r0,y11). Every
// operand is cast to the format of the sub-unit that reads it when it is
// read (floor, wrap), and every result is kept in the format of the sub-unit
// that made it. Finally y11 and -(r0*y11) are cast to the output format and
// written as the real and imaginary parts of the result.
//
// Interface: start (one-cycle pulse while idle), busy, done (one-cycle pulse
// after the last write), singular (one of the two real inverses met a zero
// determinant; valid from done until the next start). x_addr/x_re/x_im is a
// read port with one cycle of latency (row-major), y_we/y_addr/y_re/y_im a
// write port. Timing: start to done takes 2763 clock cycles with the default
// formats: 18 to load, two inversions of 1 + 1251, three multiplications of
// 1 + 67, one addition of 1 + 19, and 17 to write the result.
//
// With the default formats the 16 low bits of y_re are always zero: y11 has
// only 9 fraction bits, and the output format has 25.
//
// The inversion algebra, the sub-units and their formats follow the
// document; the output format (32_7, that of the 4x4 multiplication that
// consumes the result), the register files and the sequencing are this
// design's choices.
module cmat_inv
  import tm_pkg::*;
#(
  parameter int WX = MM64_W, parameter int IX = MM64_I,   // input format
  parameter int WO = MM44_W, parameter int IO = MM44_I,   // output format
  parameter int WV = INV_W,  parameter int IV = INV_I,    // real inverse
  parameter int WM = IMUL_W, parameter int IM = IMUL_I,   // real multiplication
  parameter int WD = IADD_W, parameter int ID = IADD_I    // real addition
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 singular,
  output logic [3:0]           x_addr,
  input  logic signed [WX-1:0] x_re,
  input  logic signed [WX-1:0] x_im,
  output logic                 y_we,
  output logic [3:0]           y_addr,
  output logic signed [WO-1:0] y_re,
  output logic signed [WO-1:0] y_im
);

  localparam int FX = WX - IX;
  localparam int FO = WO - IO;
  localparam int FV = WV - IV;
  localparam int FM = WM - IM;
  localparam int FD = WD - ID;

  typedef enum logic [3:0] {
    P_IDLE, P_LOAD, P_LOADW, P_INV1, P_MUL1, P_MUL2, P_ADD, P_INV2, P_MUL3,
    P_OUT, P_OUTW
  } phase_e;
  phase_e phase;

  // Register files, each 4 x 4 row-major.
  logic signed [WX-1:0] am    [16];   // real part of the input
  logic signed [WX-1:0] cm    [16];   // imaginary part of the input
  logic signed [WV-1:0] ainv  [16];   // A^-1
  logic signed [WM-1:0] r0    [16];   // A^-1 * C
  logic signed [WM-1:0] cr0   [16];   // C * r0
  logic signed [WD-1:0] smat  [16];   // C * r0 + A
  logic signed [WV-1:0] y11   [16];   // (C * r0 + A)^-1
  logic signed [WM-1:0] r0y11 [16];   // r0 * y11

  logic       launched;
  logic [4:0] cnt;
  logic       ld_valid;
  logic [3:0] ld_idx;

  // Sub-unit connections.
  logic inv_start, inv_busy, inv_done, inv_sing, inv_we;
  logic [3:0] inv_raddr, inv_waddr;
  logic signed [WV-1:0] inv_rdata, inv_wdata;
  logic mul_start, mul_busy, mul_done, mul_we;
  logic [3:0] mul_aaddr, mul_baddr, mul_waddr;
  logic signed [WM-1:0] mul_adata, mul_bdata, mul_wdata;
  logic add_start, add_busy, add_done, add_we;
  logic [3:0] add_raddr, add_waddr;
  logic signed [WD-1:0] add_adata, add_bdata, add_wdata;

  rmat_inv_adj #(.W(WV), .I(IV)) u_inv (
    .clk, .rst_n, .start(inv_start), .busy(inv_busy), .done(inv_done),
    .singular(inv_sing), .a_addr(inv_raddr), .a_data(inv_rdata),
    .y_we(inv_we), .y_addr(inv_waddr), .y_data(inv_wdata));

  rmat_mult #(.M(4), .K(4), .N(4), .W(WM), .I(IM)) u_mul (
    .clk, .rst_n, .start(mul_start), .busy(mul_busy), .done(mul_done),
    .a_addr(mul_aaddr), .a_data(mul_adata), .b_addr(mul_baddr), .b_data(mul_bdata),
    .c_we(mul_we), .c_addr(mul_waddr), .c_data(mul_wdata));

  rmat_add #(.NE(16), .W(WD), .I(ID)) u_add (
    .clk, .rst_n, .start(add_start), .busy(add_busy), .done(add_done),
    .rd_addr(add_raddr), .a_data(add_adata), .b_data(add_bdata),
    .c_we(add_we), .c_addr(add_waddr), .c_data(add_wdata));

  assign busy      = (phase != P_IDLE);
  assign x_addr    = cnt[3:0];
  assign inv_start = !launched && (phase == P_INV1 || phase == P_INV2);
  assign mul_start = !launched && (phase == P_MUL1 || phase == P_MUL2 || phase == P_MUL3);
  assign add_start = !launched && (phase == P_ADD);

  function automatic logic signed [XW-1:0] cv(input logic signed [XW-1:0] v, input int fi,
                                              input int wo, input int fo);
    return requant(v, fi, wo, fo);
  endfunction

  // Read ports of the sub-units: register files with one cycle of latency,
  // each operand cast to the reading unit's format.
  always_ff @(posedge clk) begin
    inv_rdata <= (phase == P_INV1) ? WV'(cv(XW'(am[inv_raddr]), FX, WV, FV))
                                   : WV'(cv(XW'(smat[inv_raddr]), FD, WV, FV));
    case (phase)
      P_MUL1: begin
        mul_adata <= WM'(cv(XW'(ainv[mul_aaddr]), FV, WM, FM));
        mul_bdata <= WM'(cv(XW'(cm[mul_baddr]), FX, WM, FM));
      end
      P_MUL2: begin
        mul_adata <= WM'(cv(XW'(cm[mul_aaddr]), FX, WM, FM));
        mul_bdata <= r0[mul_baddr];
      end
      default: begin
        mul_adata <= r0[mul_aaddr];
        mul_bdata <= WM'(cv(XW'(y11[mul_baddr]), FV, WM, FM));
      end
    endcase
    add_adata <= WD'(cv(XW'(cr0[add_raddr]), FM, WD, FD));
    add_bdata <= WD'(cv(XW'(am[add_raddr]), FX, WD, FD));
  end

  // Result capture from the sub-units.
  always_ff @(posedge clk) begin
    if (inv_we) begin
      if (phase == P_INV1) ainv[inv_waddr] <= inv_wdata;
      else                 y11[inv_waddr]  <= inv_wdata;
    end
    if (mul_we) begin
      case (phase)
        P_MUL1:  r0[mul_waddr]    <= mul_wdata;
        P_MUL2:  cr0[mul_waddr]   <= mul_wdata;
        default: r0y11[mul_waddr] <= mul_wdata;
      endcase
    end
    if (add_we) smat[add_waddr] <= add_wdata;
    if (ld_valid) begin
      am[ld_idx] <= x_re;
      cm[ld_idx] <= x_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_IDLE;
      launched <= 1'b0;
      cnt      <= '0;
      ld_valid <= 1'b0;
      ld_idx   <= '0;
      singular <= 1'b0;
      y_we     <= 1'b0;
      y_addr   <= '0;
      y_re     <= '0;
      y_im     <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      y_we     <= 1'b0;
      ld_valid <= 1'b0;
      if (inv_done && inv_sing) singular <= 1'b1;
      case (phase)
        P_IDLE: if (start) begin
          phase    <= P_LOAD;
          cnt      <= '0;
          singular <= 1'b0;
        end
        P_LOAD: begin
          ld_valid <= 1'b1;
          ld_idx   <= cnt[3:0];
          cnt      <= cnt + 1'b1;
          if (cnt == 5'd15) phase <= P_LOADW;
        end
        P_LOADW: phase <= P_INV1;
        P_INV1, P_MUL1, P_MUL2, P_ADD, P_INV2, P_MUL3: begin
          if (!launched) begin
            launched <= 1'b1;
          end else if (inv_done || mul_done || add_done) begin
            launched <= 1'b0;
            cnt      <= '0;
            phase    <= phase_e'(phase + 1'b1);
          end
        end
        P_OUT: begin
          y_we   <= 1'b1;
          y_addr <= cnt[3:0];
          y_re   <= WO'(cv(XW'(y11[cnt[3:0]]), FV, WO, FO));
          y_im   <= WO'(cv(-XW'(r0y11[cnt[3:0]]), FM, WO, FO));
          cnt    <= cnt + 1'b1;
          if (cnt == 5'd15) phase <= P_OUTW;
        end
        P_OUTW: begin
          phase <= P_IDLE;
          done  <= 1'b1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("cmat_inv: start while busy");
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
                               $countones({inv_busy, mul_busy, add_busy}) <= 1)
    else $error("cmat_inv: two sub-units busy");

endmodule
