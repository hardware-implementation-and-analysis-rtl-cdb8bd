// temporal_mitigation: temporal interference mitigation accelerator.
//
// Given the received block Z (NR x NS complex, 4 receive antennas by 64
// samples) and the known transmitted (training) block X of the same size, it
// projects Z onto the temporal subspace orthogonal to the rows of X:
//   Zhat = Z * (I - X^H (X X^H)^-1 X) = Z - (Z X^H)(X X^H)^-1 X,
// i.e. it estimates the part of Z explained by X and subtracts it.
//
// How it works: seven accelerators run one after another, each reading its
// operands from and writing its result to on-chip block RAM buffers:
//   1 conj_transpose  X^H                       (64x4, 16_1)
//   2 cmat_mult       Z * X^H                   (4x4,  32_1)
//   3 cmat_mult       X * X^H                   (4x4,  32_1)
//   4 cmat_inv        (X X^H)^-1                (4x4,  output 32_7)
//   5 cmat_mult       (Z X^H) * (X X^H)^-1      (4x4,  32_7)
//   6 cmat_mult       that * X                  (4x64, 32_5)
//   7 cmat_sub        Zhat = Z - that           (4x64, 32_5)
// The numbers in parentheses are each accelerator's fixed-point format
// (W_I: W bits, I integer bits), the hybrid per-accelerator selection. Every
// operand is cast to the format of the accelerator reading it. A sequencer
// launches each accelerator when the previous one has finished, in the role
// the host processor plays when it invokes the accelerators one by one.
// Complex matrices are stored with real and imaginary parts side by side.
//
// Interface:
//   in_we/in_sel/in_addr/in_re/in_im  load Z (in_sel = 0) or X (in_sel = 1),
//       element (r, c) at address r*NS + c, format 32_7, while not busy.
//   start  one-cycle pulse while idle: computes Zhat from the loaded Z and X.
//   busy   high from the cycle after start until done.
//   done   one-cycle pulse when Zhat is complete.
//   singular  the inverse met a zero determinant in this run (the inverse is
//       then zero and Zhat = Z); valid from done until the next start.
//   stage  which accelerator is running (0 idle, 1..7 as listed above).
//   out_addr/out_re/out_im  read port of Zhat (format 32_5), one cycle of
//       read latency, usable while not busy.
// Parameters: the format (W, I) of each accelerator; the defaults are the
// hybrid selection, and setting all of them to one format gives the uniform
// configurations of the precision study. Sizes come from the package.
// Timing: with the default formats one run takes 6437 clock cycles from start
// to done: 259 + 1027 + 1027 + 2763 + 67 + 1027 + 259 for the seven stages,
// one launch cycle per stage and one to leave idle. Only the inverse depends
// on the formats: each real inversion takes 115 + 16 * (5 WV + 5 - 2 IV).
//
// What follows the document: the equation, the chain of accelerators and
// their sizes and formats. This design's choices: the sequencer in place of
// the host, the buffer organisation, the load and read ports, the 32_7
// format of the loaded matrices, the output format of the inverse, and the
// cycle-level schedule of each accelerator.
module temporal_mitigation
  import tm_pkg::*;
#(
  // Per-accelerator formats (word length, integer bits); defaults are the
  // hybrid selection. Set them all equal to run one uniform format.
  parameter int WH = HERM_W, parameter int IH = HERM_I,   // conjugate transpose
  parameter int WG = MM64_W, parameter int IG = MM64_I,   // Z X^H and X X^H
  parameter int WV = INV_W,  parameter int IV = INV_I,    // real inverse
  parameter int WM = IMUL_W, parameter int IM = IMUL_I,   // multiplication in the inverse
  parameter int WD = IADD_W, parameter int ID = IADD_I,   // addition in the inverse
  parameter int WP = MM44_W, parameter int IP = MM44_I,   // 4x4 multiplication
  parameter int WQ = MM4N_W, parameter int IQ = MM4N_I,   // 4x4 * 4x64 multiplication
  parameter int WS = SUB_W,  parameter int IS = SUB_I     // subtraction
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // load port for Z and X
  input  logic                     in_we,
  input  logic                     in_sel,
  input  logic [7:0]               in_addr,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  // control
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     singular,
  output logic [2:0]               stage,
  // result read port
  input  logic [7:0]               out_addr,
  output logic signed [WS-1:0]  out_re,
  output logic signed [WS-1:0]  out_im
);

  localparam int NE = NR * NS;   // elements of a 4 x 64 matrix
  localparam int NQ = NR * NR;   // elements of a 4 x 4 matrix

  typedef enum logic [2:0] {
    T_IDLE = 3'd0, T_HERM = 3'd1, T_ZXH = 3'd2, T_XXH = 3'd3, T_INV = 3'd4,
    T_MM44 = 3'd5, T_MM4N = 3'd6, T_SUB = 3'd7
  } stage_e;
  stage_e st;
  logic   launched;

  assign stage = st;
  assign busy  = (st != T_IDLE);

  // ---------------- accelerator handshakes ----------------
  logic herm_done, zxh_done, xxh_done, inv_done, mm44_done, mm4n_done, sub_done;
  logic herm_busy, zxh_busy, xxh_busy, inv_busy, mm44_busy, mm4n_busy, sub_busy;
  logic inv_sing;
  logic kick;
  assign kick = !launched && busy;

  // ---------------- buffers ----------------
  // Z and X as loaded.
  logic [7:0] z_raddr, x_raddr;
  logic [2*IN_W-1:0] z_rdata, x_rdata;
  tm_ram #(.DEPTH(NE), .WIDTH(2*IN_W)) u_zbuf (
    .clk, .we(in_we && !in_sel && !busy), .waddr(in_addr), .wdata({in_re, in_im}),
    .raddr(z_raddr), .rdata(z_rdata));
  tm_ram #(.DEPTH(NE), .WIDTH(2*IN_W)) u_xbuf (
    .clk, .we(in_we && in_sel && !busy), .waddr(in_addr), .wdata({in_re, in_im}),
    .raddr(x_raddr), .rdata(x_rdata));

  logic signed [IN_W-1:0] z_re, z_im, x_re, x_im;
  assign {z_re, z_im} = z_rdata;
  assign {x_re, x_im} = x_rdata;

  // X^H (64 x 4).
  logic herm_we;
  logic [7:0] herm_waddr, herm_raddr_x, xh_raddr;
  logic signed [WH-1:0] herm_wre, herm_wim, xh_re, xh_im;
  tm_ram #(.DEPTH(NE), .WIDTH(2*WH)) u_xhbuf (
    .clk, .we(herm_we), .waddr(herm_waddr), .wdata({herm_wre, herm_wim}),
    .raddr(xh_raddr), .rdata({xh_re, xh_im}));

  // Z X^H and X X^H (4 x 4).
  logic zxh_we, xxh_we;
  logic [3:0] zxh_waddr, xxh_waddr, zxh_raddr, xxh_raddr;
  logic signed [WG-1:0] zxh_wre, zxh_wim, xxh_wre, xxh_wim;
  logic signed [WG-1:0] zxh_re, zxh_im, xxh_re, xxh_im;
  tm_ram #(.DEPTH(NQ), .WIDTH(2*WG)) u_zxhbuf (
    .clk, .we(zxh_we), .waddr(zxh_waddr), .wdata({zxh_wre, zxh_wim}),
    .raddr(zxh_raddr), .rdata({zxh_re, zxh_im}));
  tm_ram #(.DEPTH(NQ), .WIDTH(2*WG)) u_xxhbuf (
    .clk, .we(xxh_we), .waddr(xxh_waddr), .wdata({xxh_wre, xxh_wim}),
    .raddr(xxh_raddr), .rdata({xxh_re, xxh_im}));

  // (X X^H)^-1 (4 x 4).
  logic inv_we;
  logic [3:0] inv_waddr, inv_raddr;
  logic signed [WP-1:0] inv_wre, inv_wim, inv_re, inv_im;
  tm_ram #(.DEPTH(NQ), .WIDTH(2*WP)) u_invbuf (
    .clk, .we(inv_we), .waddr(inv_waddr), .wdata({inv_wre, inv_wim}),
    .raddr(inv_raddr), .rdata({inv_re, inv_im}));

  // P = (Z X^H)(X X^H)^-1 (4 x 4).
  logic p_we;
  logic [3:0] p_waddr, p_raddr;
  logic signed [WP-1:0] p_wre, p_wim, p_re, p_im;
  tm_ram #(.DEPTH(NQ), .WIDTH(2*WP)) u_pbuf (
    .clk, .we(p_we), .waddr(p_waddr), .wdata({p_wre, p_wim}),
    .raddr(p_raddr), .rdata({p_re, p_im}));

  // Q = P X (4 x 64).
  logic q_we;
  logic [7:0] q_waddr, q_raddr;
  logic signed [WQ-1:0] q_wre, q_wim, q_re, q_im;
  tm_ram #(.DEPTH(NE), .WIDTH(2*WQ)) u_qbuf (
    .clk, .we(q_we), .waddr(q_waddr), .wdata({q_wre, q_wim}),
    .raddr(q_raddr), .rdata({q_re, q_im}));

  // Zhat (4 x 64): written by the subtraction, read by the host.
  logic zh_we;
  logic [7:0] zh_waddr;
  logic signed [WS-1:0] zh_wre, zh_wim;
  tm_ram #(.DEPTH(NE), .WIDTH(2*WS)) u_zhbuf (
    .clk, .we(zh_we), .waddr(zh_waddr), .wdata({zh_wre, zh_wim}),
    .raddr(out_addr), .rdata({out_re, out_im}));

  // ---------------- accelerators ----------------
  logic [7:0] zxh_aaddr, zxh_baddr, xxh_aaddr, xxh_baddr, mm4n_baddr, sub_raddr;
  logic [3:0] mm44_aaddr, mm44_baddr, mm4n_aaddr;

  conj_transpose #(.M(NR), .N(NS), .WA(IN_W), .IA(IN_I), .W(WH), .I(IH)) u_herm (
    .clk, .rst_n, .start(kick && st == T_HERM), .busy(herm_busy), .done(herm_done),
    .a_addr(herm_raddr_x), .a_re(x_re), .a_im(x_im),
    .b_we(herm_we), .b_addr(herm_waddr), .b_re(herm_wre), .b_im(herm_wim));

  cmat_mult #(.M(NR), .K(NS), .N(NR), .WA(IN_W), .IA(IN_I), .WB(WH), .IB(IH),
              .W(WG), .I(IG)) u_mm_zxh (
    .clk, .rst_n, .start(kick && st == T_ZXH), .busy(zxh_busy), .done(zxh_done),
    .a_addr(zxh_aaddr), .a_re(z_re), .a_im(z_im),
    .b_addr(zxh_baddr), .b_re(xh_re), .b_im(xh_im),
    .c_we(zxh_we), .c_addr(zxh_waddr), .c_re(zxh_wre), .c_im(zxh_wim));

  cmat_mult #(.M(NR), .K(NS), .N(NR), .WA(IN_W), .IA(IN_I), .WB(WH), .IB(IH),
              .W(WG), .I(IG)) u_mm_xxh (
    .clk, .rst_n, .start(kick && st == T_XXH), .busy(xxh_busy), .done(xxh_done),
    .a_addr(xxh_aaddr), .a_re(x_re), .a_im(x_im),
    .b_addr(xxh_baddr), .b_re(xh_re), .b_im(xh_im),
    .c_we(xxh_we), .c_addr(xxh_waddr), .c_re(xxh_wre), .c_im(xxh_wim));

  cmat_inv #(.WX(WG), .IX(IG), .WO(WP), .IO(IP),
             .WV(WV), .IV(IV), .WM(WM), .IM(IM), .WD(WD), .ID(ID)) u_inv (
    .clk, .rst_n, .start(kick && st == T_INV), .busy(inv_busy), .done(inv_done),
    .singular(inv_sing), .x_addr(xxh_raddr), .x_re(xxh_re), .x_im(xxh_im),
    .y_we(inv_we), .y_addr(inv_waddr), .y_re(inv_wre), .y_im(inv_wim));

  cmat_mult #(.M(NR), .K(NR), .N(NR), .WA(WG), .IA(IG), .WB(WP), .IB(IP),
              .W(WP), .I(IP)) u_mm44 (
    .clk, .rst_n, .start(kick && st == T_MM44), .busy(mm44_busy), .done(mm44_done),
    .a_addr(mm44_aaddr), .a_re(zxh_re), .a_im(zxh_im),
    .b_addr(mm44_baddr), .b_re(inv_re), .b_im(inv_im),
    .c_we(p_we), .c_addr(p_waddr), .c_re(p_wre), .c_im(p_wim));

  cmat_mult #(.M(NR), .K(NR), .N(NS), .WA(WP), .IA(IP), .WB(IN_W), .IB(IN_I),
              .W(WQ), .I(IQ)) u_mm4n (
    .clk, .rst_n, .start(kick && st == T_MM4N), .busy(mm4n_busy), .done(mm4n_done),
    .a_addr(mm4n_aaddr), .a_re(p_re), .a_im(p_im),
    .b_addr(mm4n_baddr), .b_re(x_re), .b_im(x_im),
    .c_we(q_we), .c_addr(q_waddr), .c_re(q_wre), .c_im(q_wim));

  cmat_sub #(.NE(NE), .WA(IN_W), .IA(IN_I), .WB(WQ), .IB(IQ),
             .W(WS), .I(IS)) u_sub (
    .clk, .rst_n, .start(kick && st == T_SUB), .busy(sub_busy), .done(sub_done),
    .rd_addr(sub_raddr), .a_re(z_re), .a_im(z_im), .b_re(q_re), .b_im(q_im),
    .c_we(zh_we), .c_addr(zh_waddr), .c_re(zh_wre), .c_im(zh_wim));

  // ---------------- shared read ports ----------------
  // Only the running accelerator owns a buffer's read port.
  always_comb begin
    unique case (st)
      T_HERM:  x_raddr = herm_raddr_x;
      T_XXH:   x_raddr = xxh_aaddr;
      default: x_raddr = mm4n_baddr;
    endcase
    z_raddr   = (st == T_SUB) ? sub_raddr : zxh_aaddr;
    xh_raddr  = (st == T_XXH) ? xxh_baddr : zxh_baddr;
    zxh_raddr = mm44_aaddr;
    inv_raddr = mm44_baddr;
    p_raddr   = mm4n_aaddr;
    q_raddr   = sub_raddr;
  end

  // ---------------- sequencer ----------------
  logic stage_done;
  assign stage_done = herm_done | zxh_done | xxh_done | inv_done | mm44_done |
                      mm4n_done | sub_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= T_IDLE;
      launched <= 1'b0;
      done     <= 1'b0;
      singular <= 1'b0;
    end else begin
      done <= 1'b0;
      if (inv_done) singular <= inv_sing;
      if (st == T_IDLE) begin
        if (start) begin
          st       <= T_HERM;
          launched <= 1'b0;
          singular <= 1'b0;
        end
      end else if (!launched) begin
        launched <= 1'b1;
      end else if (stage_done) begin
        launched <= 1'b0;
        if (st == T_SUB) begin
          st   <= T_IDLE;
          done <= 1'b1;
        end else begin
          st <= stage_e'(st + 3'd1);
        end
      end
    end
  end

  // Exactly one accelerator is busy while a stage is launched, and the host
  // does not load Z or X during a run.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) !(in_we && busy))
    else $error("temporal_mitigation: load while busy");
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n)
                                 $countones({herm_busy, zxh_busy, xxh_busy, inv_busy,
                                             mm44_busy, mm4n_busy, sub_busy}) <= 1)
    else $error("temporal_mitigation: two accelerators busy");

endmodule
