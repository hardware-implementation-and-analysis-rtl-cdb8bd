// tb_cmat_inv: self-checking testbench of the 4 x 4 complex inverse.
//
// Random Hermitian positive-definite matrices, M = B B^H / 16 + 0.3 I with a
// random complex 4 x 16 matrix B, are given in 32_1 (the format the chain
// delivers). The result Y (32_7) must satisfy M * Y = I in complex floating
// point to within 0.02 in every element, and Y must itself be Hermitian to
// the same tolerance. A matrix whose real part is zero must raise singular.
// The start-to-done cycle count is checked against 2763 = 18 + 2*(1 + 1251) + 3*(1 + 67) + (1 + 19) + 17.
module tb_cmat_inv;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, busy, done, singular, y_we;
  logic [3:0] x_addr, y_addr;
  logic signed [31:0] x_re, x_im, y_re, y_im;
  logic signed [31:0] Mre [16], Mim [16], Yre [16], Yim [16];

  cmat_inv dut (.clk, .rst_n, .start, .busy, .done, .singular,
                .x_addr, .x_re, .x_im, .y_we, .y_addr, .y_re, .y_im);

  always_ff @(posedge clk) begin
    x_re <= Mre[x_addr];
    x_im <= Mim[x_addr];
    if (y_we) begin Yre[y_addr] <= y_re; Yim[y_addr] <= y_im; end
  end

  localparam real S_IN  = 2.0 ** 31;   // 32_1
  localparam real S_OUT = 2.0 ** 25;   // 32_7

  task automatic check_tol(input string what, input real err, input real tol);
    checks++;
    if (err > tol || err < -tol) begin
      failures++;
      $display("FAIL %s: error %f", what, err);
    end
  endtask

  int cycles;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (cycles != 2763) begin
      failures++;
      $display("FAIL cycles %0d", cycles);
    end
  endtask

  initial begin
    real bre [4][16], bim [4][16];
    real mr [4][4], mi [4][4], yr [4][4], yi [4][4];
    real sr, si;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 5; trial++) begin
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 16; k++) begin
          bre[r][k] = (real'($urandom_range(1000)) - 500.0) / 2000.0;
          bim[r][k] = (real'($urandom_range(1000)) - 500.0) / 2000.0;
        end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          sr = (r == c) ? 0.3 : 0.0; si = 0.0;
          for (int k = 0; k < 16; k++) begin
            sr += (bre[r][k] * bre[c][k] + bim[r][k] * bim[c][k]) / 16.0;
            si += (bim[r][k] * bre[c][k] - bre[r][k] * bim[c][k]) / 16.0;
          end
          Mre[r*4+c] = $rtoi(sr * S_IN);
          Mim[r*4+c] = $rtoi(si * S_IN);
          mr[r][c] = real'(Mre[r*4+c]) / S_IN;
          mi[r][c] = real'(Mim[r*4+c]) / S_IN;
        end
      run_one();
      checks++;
      if (singular) begin failures++; $display("FAIL unexpected singular"); end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          yr[r][c] = real'(Yre[r*4+c]) / S_OUT;
          yi[r][c] = real'(Yim[r*4+c]) / S_OUT;
        end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          sr = 0.0; si = 0.0;
          for (int k = 0; k < 4; k++) begin
            sr += mr[r][k] * yr[k][c] - mi[r][k] * yi[k][c];
            si += mr[r][k] * yi[k][c] + mi[r][k] * yr[k][c];
          end
          check_tol($sformatf("t%0d (M*Y)re[%0d][%0d]", trial, r, c), sr - ((r == c) ? 1.0 : 0.0), 0.02);
          check_tol($sformatf("t%0d (M*Y)im[%0d][%0d]", trial, r, c), si, 0.02);
          check_tol($sformatf("t%0d Y hermitian re[%0d][%0d]", trial, r, c), yr[r][c] - yr[c][r], 0.02);
          check_tol($sformatf("t%0d Y hermitian im[%0d][%0d]", trial, r, c), yi[r][c] + yi[c][r], 0.02);
        end
    end
    // Zero real part: the first real inversion meets det = 0.
    foreach (Mre[x]) begin Mre[x] = 0; Mim[x] = (x % 5 == 0) ? 0 : 32'sh1000_0000; end
    run_one();
    checks++;
    if (!singular) begin failures++; $display("FAIL singular not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
