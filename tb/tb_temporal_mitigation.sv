// tb_temporal_mitigation: end-to-end testbench of the mitigation accelerator,
// at its default (and only) size: 4 receive antennas, 64 samples.
//
// Each operation builds a known training block X (random complex, each part
// in [-0.08, 0.08]) and a received block Z = H X + N, where H is a random
// 4 x 4 channel (parts in [-0.3, 0.3]) and N a random signal of interest whose
// level is set below the level of H X by a chosen difference delta (0, 20
// and 40 dB). Z and X are loaded in 32_7, the accelerator is started, and
// Zhat (32_5) is read back. The expected Zhat = Z - Z X^H (X X^H)^-1 X is
// computed here in floating point (complex Gauss-Jordan inverse). Checks:
//   - every element of Zhat within 2e-3 of the floating-point result;
//   - Zhat X^H is close to zero (the output is orthogonal to X);
//   - the mitigation removes H X: what separates Zhat from the ideal
//     N (I - X^H (X X^H)^-1 X) is at least 30 dB below the power of H X;
//   - the run takes the expected number of cycles;
//   - every one of the seven stages is entered once per run, in order.
// One operation loads an X so large that X X^H overflows its 32_1 format:
// the Gram buffer must hold the product of X and the stored 16_1 X^H wrapped
// into [-1, 1), and at
// least one element must have wrapped. A last operation loads X = 0, so
// X X^H is singular: singular must rise and Zhat must equal Z (cast to 32_5). The normalised error 10 log10 |(R - Y)/R|
// and the relative squared error of the precision study are printed per run.
module tb_temporal_mitigation;

  localparam int NR = 4, NS = 64, NE = NR * NS;
  localparam real S_IN  = 2.0 ** 25;   // 32_7
  localparam real S_OUT = 2.0 ** 27;   // 32_5
  localparam int  RUN_CYCLES = 6437;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic in_we, in_sel, start, busy, done, singular;
  logic [7:0] in_addr, out_addr;
  logic signed [31:0] in_re, in_im, out_re, out_im;
  logic [2:0] stage;

  temporal_mitigation dut (
    .clk, .rst_n, .in_we, .in_sel, .in_addr, .in_re, .in_im,
    .start, .busy, .done, .singular, .stage,
    .out_addr, .out_re, .out_im);

  // Mechanism counters.
  int stage_entries [8];
  int singular_runs = 0;
  int overflows = 0;
  int loads = 0;
  logic [2:0] stage_q;
  int order_errors = 0;
  always @(posedge clk) begin
    stage_q <= stage;
    if (rst_n && stage != stage_q) begin
      stage_entries[stage]++;
      if (stage != 3'd0 && stage != stage_q + 3'd1) order_errors++;
    end
  end

  task automatic check_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real zr [NR][NS], zi [NR][NS], xr [NR][NS], xi [NR][NS], nr_ [NR][NS], ni_ [NR][NS];
  real yr [NR][NS], yi [NR][NS], er [NR][NS], ei [NR][NS];

  function automatic real urand(input real a);
    return a * (2.0 * real'($urandom_range(1000000)) / 1000000.0 - 1.0);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // A value floored to 15 fraction bits.
  function automatic real q15(input real v);
    return $floor(v * 32768.0) / 32768.0;
  endfunction

  // A value wrapped into [-1, 1), as a 1-integer-bit format stores it.
  function automatic real wrap1(input real v);
    real w = v;
    while (w >= 1.0) w -= 2.0;
    while (w < -1.0) w += 2.0;
    return w;
  endfunction

  // Floating-point reference: er/ei = Z - Z X^H (X X^H)^-1 X.
  task automatic reference();
    real gr [NR][NR], gi [NR][NR], cr [NR][NR], ci [NR][NR];
    real ar [NR][2*NR], ai [NR][2*NR];
    real pr [NR][NR], pi [NR][NR];
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
      dr = ar[p][p] / den; di = -ai[p][p] / den;   // 1 / pivot
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
        pr[r][c] = 0; pi[r][c] = 0;
        for (int k = 0; k < NR; k++) begin
          pr[r][c] += cr[r][k] * ar[k][NR+c] - ci[r][k] * ai[k][NR+c];
          pi[r][c] += cr[r][k] * ai[k][NR+c] + ci[r][k] * ar[k][NR+c];
        end
      end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        er[r][c] = zr[r][c]; ei[r][c] = zi[r][c];
        for (int k = 0; k < NR; k++) begin
          er[r][c] -= pr[r][k] * xr[k][c] - pi[r][k] * xi[k][c];
          ei[r][c] -= pr[r][k] * xi[k][c] + pi[r][k] * xr[k][c];
        end
      end
  endtask

  task automatic load_and_run();
    int cycles;
    for (int sel = 0; sel < 2; sel++)
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NS; c++) begin
          @(negedge clk);
          in_we = 1; in_sel = sel[0]; in_addr = 8'(r*NS + c);
          in_re = sel ? $rtoi(xr[r][c] * S_IN) : $rtoi(zr[r][c] * S_IN);
          in_im = sel ? $rtoi(xi[r][c] * S_IN) : $rtoi(zi[r][c] * S_IN);
          // keep the values the hardware actually sees
          if (sel == 1) begin xr[r][c] = real'(in_re) / S_IN; xi[r][c] = real'(in_im) / S_IN; end
          else          begin zr[r][c] = real'(in_re) / S_IN; zi[r][c] = real'(in_im) / S_IN; end
        end
    @(negedge clk); in_we = 0; loads++;
    start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != RUN_CYCLES) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cycles, RUN_CYCLES);
    end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        @(negedge clk); out_addr = 8'(r*NS + c);
        @(negedge clk);
        yr[r][c] = real'(out_re) / S_OUT;
        yi[r][c] = real'(out_im) / S_OUT;
      end
  endtask

  initial begin
    real hr [NR][NR], hi [NR][NR];
    real amp, maxerr, orth, sr, si, p_res, p_int, num, dnm;
    int deltas [3] = '{0, 20, 40};
    in_we = 0; in_sel = 0; in_addr = 0; in_re = 0; in_im = 0; start = 0; out_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    foreach (deltas[d]) begin
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NR; c++) begin hr[r][c] = urand(0.3); hi[r][c] = urand(0.3); end
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NS; c++) begin xr[r][c] = urand(0.08); xi[r][c] = urand(0.08); end
      // H X has an rms of about 0.05 per part; N sits delta dB below it.
      amp = 0.05 * 1.732 * (10.0 ** (-real'(deltas[d]) / 20.0));
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
      check_true($sformatf("delta %0d: singular not raised", deltas[d]), !singular);
      maxerr = 0; num = 0; dnm = 0; p_res = 0; p_int = 0;
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NS; c++) begin
          check_true($sformatf("delta %0d: Zhat[%0d][%0d] re", deltas[d], r, c), fabs(yr[r][c] - er[r][c]) < 2e-3);
          check_true($sformatf("delta %0d: Zhat[%0d][%0d] im", deltas[d], r, c), fabs(yi[r][c] - ei[r][c]) < 2e-3);
          if (fabs(yr[r][c] - er[r][c]) > maxerr) maxerr = fabs(yr[r][c] - er[r][c]);
          if (fabs(yi[r][c] - ei[r][c]) > maxerr) maxerr = fabs(yi[r][c] - ei[r][c]);
          num += (yr[r][c] - er[r][c]) ** 2 + (yi[r][c] - ei[r][c]) ** 2;
          dnm += er[r][c] ** 2 + ei[r][c] ** 2;
          p_int += (zr[r][c] - nr_[r][c]) ** 2 + (zi[r][c] - ni_[r][c]) ** 2;
        end
      // Orthogonality: Zhat X^H relative to Z X^H.
      orth = 0;
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NR; c++) begin
          sr = 0; si = 0;
          for (int k = 0; k < NS; k++) begin
            sr += yr[r][k] * xr[c][k] + yi[r][k] * xi[c][k];
            si += yi[r][k] * xr[c][k] - yr[r][k] * xi[c][k];
          end
          if (fabs(sr) > orth) orth = fabs(sr);
          if (fabs(si) > orth) orth = fabs(si);
        end
      check_true($sformatf("delta %0d: Zhat X^H not near zero (%f)", deltas[d], orth), orth < 5e-3);
      // Known-signal power left in the hardware output. Ideally Zhat = N P,
      // which is exactly the floating-point result, so whatever separates the
      // hardware output from it is leakage of H X (or quantisation noise).
      p_res = 0;
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NS; c++)
          p_res += (yr[r][c] - er[r][c]) ** 2 + (yi[r][c] - ei[r][c]) ** 2;
      check_true($sformatf("delta %0d: mitigation depth", deltas[d]),
                 10.0 * $log10(p_int / (p_res + 1e-30)) > 30.0);
      $display("delta %0d dB: max |error| %e, normalised error %f dB, relative squared error %e, suppression %f dB",
               deltas[d], maxerr, 10.0 * $log10(maxerr / $sqrt(dnm / (2.0 * NE))), num / dnm,
               10.0 * $log10(p_int / (p_res + 1e-30)));
    end

    // Overflow: X large enough that X X^H leaves the [-1, 1) range of 32_1.
    // The Gram buffer must hold the reference wrapped modulo 2.
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        xr[r][c] = urand(0.25); xi[r][c] = urand(0.25); zr[r][c] = urand(0.1); zi[r][c] = urand(0.1);
      end
    load_and_run();
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NR; c++) begin
        sr = 0; si = 0;
        // X^H as the 16_1 transpose stores it: conj(X) floored to 15 fraction bits.
        for (int k = 0; k < NS; k++) begin
          sr += xr[r][k] * q15(xr[c][k]) - xi[r][k] * q15(-xi[c][k]);
          si += xi[r][k] * q15(xr[c][k]) + xr[r][k] * q15(-xi[c][k]);
        end
        if (wrap1(sr) != sr || wrap1(si) != si) overflows++;
        check_true($sformatf("overflow: X X^H[%0d][%0d] wrapped", r, c),
                   fabs(real'($signed(dut.u_xxhbuf.mem[r*NR + c][63:32])) / 2.0 ** 31 - wrap1(sr)) < 1e-6 &&
                   fabs(real'($signed(dut.u_xxhbuf.mem[r*NR + c][31:0])) / 2.0 ** 31 - wrap1(si)) < 1e-6);
      end

    // Singular case: X = 0.
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        xr[r][c] = 0; xi[r][c] = 0; zr[r][c] = urand(0.5); zi[r][c] = urand(0.5);
      end
    load_and_run();
    if (singular) singular_runs++;
    check_true("X = 0: singular raised", singular);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NS; c++) begin
        check_true($sformatf("X = 0: Zhat[%0d][%0d] = Z", r, c),
                   fabs(yr[r][c] - zr[r][c]) < 1e-7 && fabs(yi[r][c] - zi[r][c]) < 1e-7);
      end

    // Every mechanism happened.
    for (int s = 1; s < 8; s++)
      check_true($sformatf("stage %0d entered once per run (%0d)", s, stage_entries[s]), stage_entries[s] == loads);
    check_true("stages in order", order_errors == 0);
    check_true("singular inverse seen", singular_runs > 0);
    check_true("overflow wrap seen", overflows > 0);
    $display("overflowing Gram elements %0d", overflows);
    $display("runs %0d, singular runs %0d, stage entries %0d %0d %0d %0d %0d %0d %0d",
             loads, singular_runs, stage_entries[1], stage_entries[2], stage_entries[3],
             stage_entries[4], stage_entries[5], stage_entries[6], stage_entries[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
