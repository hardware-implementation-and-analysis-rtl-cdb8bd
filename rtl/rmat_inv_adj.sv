// rmat_inv_adj: real 4 x 4 matrix inverse by the adjugate formula,
// A^-1 = adj(A) / det(A), with adj(A)[r][c] = cofactor of A[c][r].
//
// How it works, in four sequential phases:
//   load     the 16 elements are read (one per clock, one cycle of read
//            latency) into a register file, already in the unit's format W_I
//            (16_7 by default, the hybrid selection for the inverse);
//   cofactor each of the 16 cofactors is a signed 3 x 3 minor, evaluated as
//            the six products of Sarrus' rule, one triple product per clock,
//            accumulated at full precision (3F fraction bits);
//   det      det(A) is expanded along row 0 from the stored cofactors (4F
//            fraction bits);
//   divide   each output cofactor(c,r) * 2^(2F) / det is formed by a
//            restoring divider, one quotient bit per clock, on magnitudes;
//            the sign is applied afterwards (truncation toward zero) and the
//            result is wrapped to W bits (F fraction bits) and written.
// A zero determinant raises singular and the unit writes zeros.
//
// Interface: start (one-cycle pulse while idle), busy, done (one-cycle pulse
// in the cycle of the last write), singular (valid from done until the next start);
// a_addr/a_data read port with one cycle of latency; y_we/y_addr/y_data
// write port, row-major.
// Timing: start to done takes 115 + 16*(NUMW + 2) clock cycles, NUMW =
// 3W + 3 + 2F (1251 cycles for 16_7).
//
// The document names the adjugate formula and the 16_7 format; the phase
// structure, the Sarrus evaluation and the bit-serial divider are this
// design's choices.
module rmat_inv_adj
  import tm_pkg::*;
#(
  parameter int W = INV_W,
  parameter int I = INV_I
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic                singular,
  output logic [3:0]          a_addr,
  input  logic signed [W-1:0] a_data,
  output logic                y_we,
  output logic [3:0]          y_addr,
  output logic signed [W-1:0] y_data
);

  localparam int F    = W - I;
  localparam int PW   = 3 * W;          // triple product
  localparam int COFW = 3 * W + 3;      // sum of six triple products
  localparam int DETW = 4 * W + 5;      // sum of four element * cofactor
  localparam int NUMW = COFW + 2 * F;   // scaled dividend magnitude
  localparam int CW   = $clog2(NUMW + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_LOADW, S_COF, S_DET, S_DINIT, S_DIV, S_DWR
  } state_e;
  state_e state;

  logic signed [W-1:0]    m   [16];
  logic signed [COFW-1:0] cof [16];
  logic signed [DETW-1:0] det;

  logic [4:0]    ld_cnt;
  logic          ld_valid;
  logic [3:0]    ld_idx;
  logic [3:0]    e_cnt;      // cofactor being built, or output being divided
  logic [2:0]    t_cnt;      // Sarrus term 0..5
  logic [CW-1:0] bit_cnt;
  logic [NUMW-1:0] nq;       // dividend shifting out, quotient shifting in
  logic [DETW:0]   rem;
  logic [DETW:0]   den;
  logic            q_neg;

  assign busy   = (state != S_IDLE);
  assign a_addr = ld_cnt[3:0];

  // ---- one Sarrus term of the minor of element (r, c) ----
  logic [1:0] r, c;
  logic [1:0] rr [3];
  logic [1:0] cc [3];
  logic [1:0] p0, p1, p2;
  logic       tneg;
  logic signed [PW-1:0]   tprod;
  logic signed [COFW-1:0] term;
  always_comb begin
    r = e_cnt[3:2];
    c = e_cnt[1:0];
    for (int k = 0; k < 3; k++) begin
      rr[k] = (2'(k) >= r) ? 2'(k + 1) : 2'(k);
      cc[k] = (2'(k) >= c) ? 2'(k + 1) : 2'(k);
    end
    // Column order of the three factors, and whether the term is subtracted.
    case (t_cnt)
      3'd0:    begin p0 = 2'd0; p1 = 2'd1; p2 = 2'd2; tneg = 1'b0; end
      3'd1:    begin p0 = 2'd1; p1 = 2'd2; p2 = 2'd0; tneg = 1'b0; end
      3'd2:    begin p0 = 2'd2; p1 = 2'd0; p2 = 2'd1; tneg = 1'b0; end
      3'd3:    begin p0 = 2'd2; p1 = 2'd1; p2 = 2'd0; tneg = 1'b1; end
      3'd4:    begin p0 = 2'd0; p1 = 2'd2; p2 = 2'd1; tneg = 1'b1; end
      default: begin p0 = 2'd1; p1 = 2'd0; p2 = 2'd2; tneg = 1'b1; end
    endcase
    tprod = PW'(m[{rr[0], cc[p0]}]) * PW'(m[{rr[1], cc[p1]}]) * PW'(m[{rr[2], cc[p2]}]);
    // Cofactor sign (-1)^(r+c) folded into the term sign.
    term  = (tneg ^ r[0] ^ c[0]) ? -COFW'(tprod) : COFW'(tprod);
  end

  // ---- determinant along row 0 ----
  logic signed [DETW-1:0] det_sum;
  always_comb begin
    det_sum = '0;
    for (int k = 0; k < 4; k++)
      det_sum += DETW'(m[k]) * DETW'(cof[k]);
  end

  // ---- dividend of output (r, c): cofactor (c, r) ----
  logic signed [COFW-1:0] src;
  logic [COFW-1:0]        src_mag;
  assign src     = cof[{e_cnt[1:0], e_cnt[3:2]}];
  assign src_mag = src[COFW-1] ? COFW'(-src) : COFW'(src);

  // ---- one restoring-division step ----
  logic [DETW:0] rem_sh;
  logic          ge;
  assign rem_sh = {rem[DETW-1:0], nq[NUMW-1]};
  assign ge     = (rem_sh >= den);

  logic signed [NUMW:0] q_signed;
  assign q_signed = q_neg ? -$signed({1'b0, nq}) : $signed({1'b0, nq});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ld_cnt   <= '0;
      ld_valid <= 1'b0;
      ld_idx   <= '0;
      e_cnt    <= '0;
      t_cnt    <= '0;
      bit_cnt  <= '0;
      nq       <= '0;
      rem      <= '0;
      den      <= '0;
      q_neg    <= 1'b0;
      det      <= '0;
      singular <= 1'b0;
      y_we     <= 1'b0;
      y_addr   <= '0;
      y_data   <= '0;
      done     <= 1'b0;
      for (int k = 0; k < 16; k++) begin
        m[k]   <= '0;
        cof[k] <= '0;
      end
    end else begin
      done     <= 1'b0;
      y_we     <= 1'b0;
      ld_valid <= 1'b0;
      if (ld_valid) m[ld_idx] <= a_data;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_LOAD;
          ld_cnt   <= '0;
          singular <= 1'b0;
        end
        S_LOAD: begin
          ld_valid <= 1'b1;
          ld_idx   <= ld_cnt[3:0];
          ld_cnt   <= ld_cnt + 1'b1;
          if (ld_cnt == 5'd15) state <= S_LOADW;
        end
        S_LOADW: begin
          state <= S_COF;
          e_cnt <= '0;
          t_cnt <= '0;
        end
        S_COF: begin
          cof[e_cnt] <= ((t_cnt == 3'd0) ? '0 : cof[e_cnt]) + term;
          if (t_cnt == 3'd5) begin
            t_cnt <= '0;
            e_cnt <= e_cnt + 1'b1;
            if (e_cnt == 4'd15) state <= S_DET;
          end else begin
            t_cnt <= t_cnt + 1'b1;
          end
        end
        S_DET: begin
          det      <= det_sum;
          den      <= det_sum[DETW-1] ? (DETW+1)'(-det_sum) : (DETW+1)'(det_sum);
          singular <= (det_sum == '0);
          e_cnt    <= '0;
          state    <= S_DINIT;
        end
        S_DINIT: begin
          nq      <= NUMW'(src_mag) << (2 * F);
          rem     <= '0;
          q_neg   <= src[COFW-1] ^ det[DETW-1];
          bit_cnt <= '0;
          state   <= S_DIV;
        end
        S_DIV: begin
          rem     <= ge ? (rem_sh - den) : rem_sh;
          nq      <= {nq[NUMW-2:0], ge};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == CW'(NUMW - 1)) state <= S_DWR;
        end
        S_DWR: begin
          y_we   <= 1'b1;
          y_addr <= e_cnt;
          y_data <= singular ? '0 : W'(q_signed);
          e_cnt  <= e_cnt + 1'b1;
          if (e_cnt == 4'd15) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_DINIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("rmat_inv_adj: start while busy");

endmodule
