// tb_tm_workloads: the precision study of the mitigation accelerator, run in
// simulation: two channel kinds, eight interference differences and four
// fixed-point configurations.
//
// Four accelerators at full size (4 x 64) run side by side on the same
// inputs: the default hybrid formats, and the uniform formats 32_7, 16_7 and
// 8_3 (every accelerator in the same format). Each scenario builds a
// training block X (parts in [-0.08, 0.08]) and a received block
// Z = H X + N, where N is a random signal of interest delta dB below H X,
// for delta = 0, 10, ..., 70 dB, and H is either
//   line of sight: one plane wave per transmitted stream, H[r][k] =
//       0.3 exp(j pi r sin(theta_k)) with a random angle theta_k, or
//   multipath: the sum of three such waves with random gains and angles.
// The expected Zhat = Z - Z X^H (X X^H)^-1 X is computed in floating point.
// Per scenario and configuration it prints the normalised error
// 10 log10(sum |R - Y| / sum |R|) (R reference, Y hardware) and checks:
//   - the run takes the cycle count expected for that configuration
//     (only the real inversions depend on the format);
//   - hybrid and 32_7: no singular flag, every element within 2e-3 of the
//     reference, and H X suppressed by more than 30 dB;
//   - 32_7 is more accurate than 16_7, and 16_7 more accurate than 8_3
//     (8 bits do not suffice for this computation).
// The intermediate buffers of the hybrid accelerator are also read (by
// hierarchical reference) and compared with the floating-point chain, giving
// the mean squared error after each of the seven stages. Checks: the
// transpose and both Gram products stay at quantisation level (below
// -85 dB), every stage stays below -25 dB, and the inverse is the stage with
// the largest error.
// Tables of normalised errors by configuration and delta, and of the hybrid
// per-stage errors, close the run.
module tb_tm_workloads;

  localparam int NR = 4, NS = 64, NE = NR * NS;
  localparam int NCFG = 4;
  localparam real S_IN = 2.0 ** 25;   // loaded in 32_7
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Shared load bus and read address; one control set and result per DUT.
  logic in_we, in_sel, start;
  logic [7:0] in_addr, out_addr;
  logic signed [31:0] in_re, in_im;
  logic [NCFG-1:0] busy, done, singular;
  logic [2:0] stage [NCFG];
  logic signed [31:0] o32_re [3], o32_im [3];
  logic signed [15:0] o16_re, o16_im;
  logic signed [7:0]  o8_re, o8_im;

  // Configuration 0: hybrid (defaults).
  temporal_mitigation u_hyb (
    .clk, .rst_n, .in_we, .in_sel, .in_addr, .in_re, .in_im, .start,
    .busy(busy[0]), .done(done[0]), .singular(singular[0]), .stage(stage[0]),
    .out_addr, .out_re(o32_re[0]), .out_im(o32_im[0]));

  // Configuration 1: uniform 32_7.
  temporal_mitigation #(.WH(32), .IH(7), .WG(32), .IG(7), .WV(32), .IV(7),
                        .WM(32), .IM(7), .WD(32), .ID(7), .WP(32), .IP(7),
                        .WQ(32), .IQ(7), .WS(32), .IS(7)) u_32_7 (
    .clk, .rst_n, .in_we, .in_sel, .in_addr, .in_re, .in_im, .start,
    .busy(busy[1]), .done(done[1]), .singular(singular[1]), .stage(stage[1]),
    .out_addr, .out_re(o32_re[1]), .out_im(o32_im[1]));

  // Configuration 2: uniform 16_7.
  temporal_mitigation #(.WH(16), .IH(7), .WG(16), .IG(7), .WV(16), .IV(7),
                        .WM(16), .IM(7), .WD(16), .ID(7), .WP(16), .IP(7),
                        .WQ(16), .IQ(7), .WS(16), .IS(7)) u_16_7 (
    .clk, .rst_n, .in_we, .in_sel, .in_addr, .in_re, .in_im, .start,
    .busy(busy[2]), .done(done[2]), .singular(singular[2]), .stage(stage[2]),
    .out_addr, .out_re(o16_re), .out_im(o16_im));

  // Configuration 3: uniform 8_3.
  temporal_mitigation #(.WH(8), .IH(3), .WG(8), .IG(3), .WV(8), .IV(3),
                        .WM(8), .IM(3), .WD(8), .ID(3), .WP(8), .IP(3),
                        .WQ(8), .IQ(3), .WS(8), .IS(3)) u_8_3 (
    .clk, .rst_n, .in_we, .in_sel, .in_addr, .in_re, .in_im, .start,
    .busy(busy[3]), .done(done[3]), .singular(singular[3]), .stage(stage[3]),
    .out_addr, .out_re(o8_re), .out_im(o8_im));

  // Configuration table: names, output scale and inverse format.
  string cfg_name [NCFG] = '{"hybrid", "32_7", "16_7", "8_3"};
  real   out_scale [NCFG] = '{2.0 ** 27, 2.0 ** 25, 2.0 ** 9, 2.0 ** 5};
  int    inv_w [NCFG] = '{16, 32, 16, 8};
  int    inv_i [NCFG] = '{7, 7, 7, 3};

  // Start-to-done cycles: fixed stages plus two real inversions.
  function automatic int run_cycles(input int c);
    return 6437 - 2 * 1251 + 2 * (115 + 16 * (5 * inv_w[c] + 5 - 2 * inv_i[c]));
  endfunction

  task automatic check_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real zr [NR][NS], zi [NR][NS], xr [NR][NS], xi [NR][NS], nr_ [NR][NS], ni_ [NR][NS];
  real er [NR][NS], ei [NR][NS];
  // Floating-point intermediates: Z X^H, X X^H, its inverse, P = Z X^H (X X^H)^-1.
  real cr [NR][NR], ci [NR][NR], gr [NR][NR], gi [NR][NR];
  real vr [NR][NR], vi [NR][NR], pr [NR][NR], pi_ [NR][NR];
  // Per-stage mean squared error of the hybrid accelerator, in dB.
  localparam int NSTG = 7;
  string stg_name [NSTG] = '{"transpose", "Z X^H", "X X^H", "inverse", "mult 4x4", "mult 4x64", "subtract"};
  real stage_mse [2][8][NSTG];
  real yr [NCFG][NR][NS], yi [NCFG][NR][NS];
  int  cycles [NCFG];
  real norm_err [2][8][NCFG];

  function automatic real urand(input real a);
    return a * (2.0 * real'($urandom_range(1000000)) / 1000000.0 - 1.0);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Floating-point reference: er/ei = Z - Z X^H (X X^H)^-1 X.
  task automatic reference();
    real ar [NR][2*NR], ai [NR][2*NR];
    real tr, ti, dr, di, den;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NR; c++) begin
        gr[r][c] = 0; gi[r][c] = 0; cr[r][c] = 0; ci[r][c] = 0;
        for (int k = 0; k < NS; k++) begin
          gr[r][c] += xr[r][k] * xr[c][k] + xi[r][k] * xi[c][k];
          gi[r][c] += xi[r][k] * xr[c][k] - xr[r][k] * xi[c][k];
          cr[r][c] += zr[r][k] * xr[c][k] + zi[r][k] * xi[c][k];
          ci[r][c] += zi[r][k] * xr[c][k] - zr[r][k] * xi[c][k];
        end
      end
    // Gauss-Jordan on [G | I].
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < 2*NR; c++) begin
        ar[r][c] = (c < NR) ? gr[r][c] : ((c - NR == r) ? 1.0 : 0.0);
        ai[r][c] = (c < NR) ? gi[r][c] : 0.0;
      end
    for (int p = 0; p < NR; p++) begin
      den = ar[p][p] * ar[p][p] + ai[p][p] * ai[p][p];
      dr = ar[p][p] / den; di = -ai[p][p] / den;
      for (int c = 0; c < 2*NR; c++) begin
        tr = ar[p][c] * dr - ai[p][c] * di;
        ti = ar[p][c] * di + ai[p][c] * dr;
        ar[p][c] = tr; ai[p][c] = ti;
      end
      for (int r = 0; r < NR; r++)
        if (r != p) begin
          dr = ar[r][p]; di = ai[r][p];
          for (int c = 0; c < 2*NR; c++) begin
            ar[r][c] -= dr * ar[p][c] - di * ai[p][c];
            ai[r][c] -= dr * ai[p][c] + di * ar[p][c];
          end
        end
    end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NR; c++) begin
        vr[r][c] = ar[r][NR+c]; vi[r][c] = ai[r][NR+c];
      end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NR; c++) begin
        pr[r][c] = 0; pi_[r][c] = 0;
        for (int k = 0; k < NR; k++) begin
          pr[r][c]  += cr[r][k] * ar[k][NR+c] - ci[r][k] * ai[k][NR+c];
          pi_[r][c] += cr[r][k] * ai[k][NR+c] + ci[r][k] * ar[k][NR+c];
        end
      end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        er[r][c] = zr[r][c]; ei[r][c] = zi[r][c];
        for (int k = 0; k < NR; k++) begin
          er[r][c] -= pr[r][k] * xr[k][c] - pi_[r][k] * xi[k][c];
          ei[r][c] -= pr[r][k] * xi[k][c] + pi_[r][k] * xr[k][c];
        end
      end
  endtask

  function automatic real sq(input real re, input real im);
    return re * re + im * im;
  endfunction

  function automatic real hw(input logic signed [31:0] v, input int frac);
    return real'(v) / (2.0 ** frac);
  endfunction

  // Mean squared error of every intermediate buffer of the hybrid
  // accelerator against the floating-point chain, in dB.
  task automatic measure_stages(input int kind, input int d);
    real acc [NSTG];
    real qr, qi;
    foreach (acc[k]) acc[k] = 0.0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        // X^H[c][r] = conj(X[r][c]), 16_1.
        acc[0] += sq(hw(32'($signed(u_hyb.u_xhbuf.mem[c*NR + r][31:16])), 15) - xr[r][c],
                     hw(32'($signed(u_hyb.u_xhbuf.mem[c*NR + r][15:0])), 15) + xi[r][c]);
        // Q = P X, 32_5.
        qr = 0; qi = 0;
        for (int k = 0; k < NR; k++) begin
          qr += pr[r][k] * xr[k][c] - pi_[r][k] * xi[k][c];
          qi += pr[r][k] * xi[k][c] + pi_[r][k] * xr[k][c];
        end
        acc[5] += sq(hw(u_hyb.u_qbuf.mem[r*NS + c][63:32], 27) - qr,
                     hw(u_hyb.u_qbuf.mem[r*NS + c][31:0], 27) - qi);
        acc[6] += sq(hw(u_hyb.u_zhbuf.mem[r*NS + c][63:32], 27) - er[r][c],
                     hw(u_hyb.u_zhbuf.mem[r*NS + c][31:0], 27) - ei[r][c]);
      end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NR; c++) begin
        acc[1] += sq(hw(u_hyb.u_zxhbuf.mem[r*NR + c][63:32], 31) - cr[r][c],
                     hw(u_hyb.u_zxhbuf.mem[r*NR + c][31:0], 31) - ci[r][c]);
        acc[2] += sq(hw(u_hyb.u_xxhbuf.mem[r*NR + c][63:32], 31) - gr[r][c],
                     hw(u_hyb.u_xxhbuf.mem[r*NR + c][31:0], 31) - gi[r][c]);
        acc[3] += sq(hw(u_hyb.u_invbuf.mem[r*NR + c][63:32], 25) - vr[r][c],
                     hw(u_hyb.u_invbuf.mem[r*NR + c][31:0], 25) - vi[r][c]);
        acc[4] += sq(hw(u_hyb.u_pbuf.mem[r*NR + c][63:32], 25) - pr[r][c],
                     hw(u_hyb.u_pbuf.mem[r*NR + c][31:0], 25) - pi_[r][c]);
      end
    for (int k = 0; k < NSTG; k++)
      stage_mse[kind][d][k] = 10.0 * $log10(acc[k] / real'((k >= 1 && k <= 4) ? NR * NR : NE) + 1e-30);
  endtask

  // Load Z and X into all four accelerators, run them together, read back.
  task automatic load_and_run();
    for (int sel = 0; sel < 2; sel++)
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NS; c++) begin
          @(negedge clk);
          in_we = 1; in_sel = sel[0]; in_addr = 8'(r*NS + c);
          in_re = sel ? $rtoi(xr[r][c] * S_IN) : $rtoi(zr[r][c] * S_IN);
          in_im = sel ? $rtoi(xi[r][c] * S_IN) : $rtoi(zi[r][c] * S_IN);
          if (sel == 1) begin xr[r][c] = real'(in_re) / S_IN; xi[r][c] = real'(in_im) / S_IN; end
          else          begin zr[r][c] = real'(in_re) / S_IN; zi[r][c] = real'(in_im) / S_IN; end
        end
    @(negedge clk); in_we = 0;
    start = 1; @(negedge clk); start = 0;
    foreach (cycles[k]) cycles[k] = 0;
    for (int n = 1; done != '1 || n == 1; n++) begin
      for (int k = 0; k < NCFG; k++) if (done[k]) cycles[k] = n;
      if (cycles[0] != 0 && cycles[1] != 0 && cycles[2] != 0 && cycles[3] != 0) break;
      @(negedge clk);
    end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        @(negedge clk); out_addr = 8'(r*NS + c);
        @(negedge clk);
        yr[0][r][c] = real'(o32_re[0]) / out_scale[0]; yi[0][r][c] = real'(o32_im[0]) / out_scale[0];
        yr[1][r][c] = real'(o32_re[1]) / out_scale[1]; yi[1][r][c] = real'(o32_im[1]) / out_scale[1];
        yr[2][r][c] = real'(o16_re) / out_scale[2];    yi[2][r][c] = real'(o16_im) / out_scale[2];
        yr[3][r][c] = real'(o8_re) / out_scale[3];     yi[3][r][c] = real'(o8_im) / out_scale[3];
      end
  endtask

  initial begin
    real hr [NR][NR], hi [NR][NR];
    real amp, g, th, maxerr, num, dnm, p_int, p_res, ne;
    string kind_name [2] = '{"line of sight", "multipath"};
    int singular_seen [NCFG];
    in_we = 0; in_sel = 0; in_addr = 0; in_re = 0; in_im = 0; start = 0; out_addr = 0;
    foreach (singular_seen[k]) singular_seen[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int kind = 0; kind < 2; kind++)
      for (int d = 0; d < 8; d++) begin
        // Channel.
        for (int r = 0; r < NR; r++)
          for (int k = 0; k < NR; k++) begin hr[r][k] = 0; hi[r][k] = 0; end
        for (int path = 0; path < ((kind == 0) ? 1 : 3); path++)
          for (int k = 0; k < NR; k++) begin
            g  = (kind == 0) ? 0.3 : 0.1 + urand(0.05);
            th = urand(PI / 2.0);
            for (int r = 0; r < NR; r++) begin
              hr[r][k] += g * $cos(PI * real'(r) * $sin(th) + real'(path) * urand(PI));
              hi[r][k] += g * $sin(PI * real'(r) * $sin(th) + real'(path) * urand(PI));
            end
          end
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NS; c++) begin xr[r][c] = urand(0.08); xi[r][c] = urand(0.08); end
        amp = 0.05 * 1.732 * (10.0 ** (-real'(10 * d) / 20.0));
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NS; c++) begin
            nr_[r][c] = urand(amp); ni_[r][c] = urand(amp);
            zr[r][c] = nr_[r][c]; zi[r][c] = ni_[r][c];
            for (int k = 0; k < NR; k++) begin
              zr[r][c] += hr[r][k] * xr[k][c] - hi[r][k] * xi[k][c];
              zi[r][c] += hr[r][k] * xi[k][c] + hi[r][k] * xr[k][c];
            end
          end
        load_and_run();
        reference();
        measure_stages(kind, d);
        for (int k = 0; k < NSTG; k++) begin
          check_true($sformatf("%s delta %0d: %s stage MSE %f dB", kind_name[kind], 10*d, stg_name[k],
                               stage_mse[kind][d][k]),
                     stage_mse[kind][d][k] < ((k < 3) ? -85.0 : -25.0));
          if (k != 3)
            check_true($sformatf("%s delta %0d: %s stage worse than the inverse", kind_name[kind], 10*d,
                                 stg_name[k]), stage_mse[kind][d][k] < stage_mse[kind][d][3]);
        end
        for (int k = 0; k < NCFG; k++) begin
          check_true($sformatf("%s delta %0d %s: %0d cycles, expected %0d", kind_name[kind], 10*d,
                               cfg_name[k], cycles[k], run_cycles(k)), cycles[k] == run_cycles(k));
          if (singular[k]) singular_seen[k]++;
          maxerr = 0; num = 0; dnm = 0; p_int = 0; p_res = 0;
          for (int r = 0; r < NR; r++)
            for (int c = 0; c < NS; c++) begin
              if (fabs(yr[k][r][c] - er[r][c]) > maxerr) maxerr = fabs(yr[k][r][c] - er[r][c]);
              if (fabs(yi[k][r][c] - ei[r][c]) > maxerr) maxerr = fabs(yi[k][r][c] - ei[r][c]);
              num += $sqrt((yr[k][r][c] - er[r][c]) ** 2 + (yi[k][r][c] - ei[r][c]) ** 2);
              dnm += $sqrt(er[r][c] ** 2 + ei[r][c] ** 2);
              p_int += (zr[r][c] - nr_[r][c]) ** 2 + (zi[r][c] - ni_[r][c]) ** 2;
              p_res += (yr[k][r][c] - er[r][c]) ** 2 + (yi[k][r][c] - ei[r][c]) ** 2;
            end
          ne = 10.0 * $log10((num + 1e-30) / dnm);
          norm_err[kind][d][k] = ne;
          if (k < 2) begin
            check_true($sformatf("%s delta %0d %s: singular", kind_name[kind], 10*d, cfg_name[k]), !singular[k]);
            check_true($sformatf("%s delta %0d %s: max error %e", kind_name[kind], 10*d, cfg_name[k], maxerr),
                       maxerr < 2e-3);
            check_true($sformatf("%s delta %0d %s: suppression", kind_name[kind], 10*d, cfg_name[k]),
                       10.0 * $log10(p_int / (p_res + 1e-30)) > 30.0);
          end
        end
        check_true($sformatf("%s delta %0d: 32_7 not better than 16_7", kind_name[kind], 10*d),
                   norm_err[kind][d][1] < norm_err[kind][d][2]);
        check_true($sformatf("%s delta %0d: 16_7 not better than 8_3", kind_name[kind], 10*d),
                   norm_err[kind][d][2] < norm_err[kind][d][3]);
      end

    for (int kind = 0; kind < 2; kind++) begin
      $display("normalised error (dB), %s inputs", kind_name[kind]);
      $display("  config    delta 0   10      20      30      40      50      60      70");
      for (int k = 0; k < NCFG; k++)
        $display("  %-8s %7.1f %7.1f %7.1f %7.1f %7.1f %7.1f %7.1f %7.1f", cfg_name[k],
                 norm_err[kind][0][k], norm_err[kind][1][k], norm_err[kind][2][k], norm_err[kind][3][k],
                 norm_err[kind][4][k], norm_err[kind][5][k], norm_err[kind][6][k], norm_err[kind][7][k]);
    end
    for (int kind = 0; kind < 2; kind++) begin
      $display("hybrid per-stage mean squared error (dB), %s inputs", kind_name[kind]);
      $display("  stage       delta 0   10      20      30      40      50      60      70");
      for (int k = 0; k < NSTG; k++)
        $display("  %-10s %7.1f %7.1f %7.1f %7.1f %7.1f %7.1f %7.1f %7.1f", stg_name[k],
                 stage_mse[kind][0][k], stage_mse[kind][1][k], stage_mse[kind][2][k], stage_mse[kind][3][k],
                 stage_mse[kind][4][k], stage_mse[kind][5][k], stage_mse[kind][6][k], stage_mse[kind][7][k]);
    end
    $display("singular runs: hybrid %0d, 32_7 %0d, 16_7 %0d, 8_3 %0d",
             singular_seen[0], singular_seen[1], singular_seen[2], singular_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
