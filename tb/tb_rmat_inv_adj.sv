// tb_rmat_inv_adj: self-checking testbench of the real 4 x 4 adjugate inverse.
//
// Random diagonally dominant matrices in 16_7 (9 fraction bits) are inverted.
// The expected output is computed here independently: each cofactor by
// expansion of its 3 x 3 minor along the minor's first row, the determinant
// by expansion along row 0, and each element as cofactor(c,r) * 2^18 / det,
// truncated toward zero and wrapped to 16 bits. The product A * A^-1 is also
// checked against the identity in floating point. A matrix with two equal
// rows must raise singular and produce zeros. The start-to-done cycle count
// is checked against 115 + 16*(NUMW + 2).
module tb_rmat_inv_adj;

  localparam int W = 16, F = 9;
  localparam int NUMW = 3*W + 3 + 2*F;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, busy, done, singular, y_we;
  logic [3:0] a_addr, y_addr;
  logic signed [15:0] a_data, y_data;
  logic signed [15:0] A [16], Y [16];

  rmat_inv_adj dut (.clk, .rst_n, .start, .busy, .done, .singular,
                    .a_addr, .a_data, .y_we, .y_addr, .y_data);

  always_ff @(posedge clk) begin
    a_data <= A[a_addr];
    if (y_we) Y[y_addr] <= y_data;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic signed [127:0] el(input int r, input int c);
    return 128'(A[r*4+c]);
  endfunction

  // Cofactor of element (r, c).
  function automatic logic signed [127:0] cofactor(input int r, input int c);
    int rows [3];
    int cols [3];
    int n;
    logic signed [127:0] d;
    n = 0; for (int k = 0; k < 4; k++) if (k != r) begin rows[n] = k; n++; end
    n = 0; for (int k = 0; k < 4; k++) if (k != c) begin cols[n] = k; n++; end
    d =   el(rows[0], cols[0]) * (el(rows[1], cols[1]) * el(rows[2], cols[2]) - el(rows[1], cols[2]) * el(rows[2], cols[1]))
        - el(rows[0], cols[1]) * (el(rows[1], cols[0]) * el(rows[2], cols[2]) - el(rows[1], cols[2]) * el(rows[2], cols[0]))
        + el(rows[0], cols[2]) * (el(rows[1], cols[0]) * el(rows[2], cols[1]) - el(rows[1], cols[1]) * el(rows[2], cols[0]));
    return ((r + c) % 2 == 1) ? -d : d;
  endfunction

  function automatic longint wrap16(input logic signed [127:0] v);
    return longint'($signed(v[15:0]));
  endfunction

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
    check("cycles", cycles, 115 + 16*(NUMW + 2));
  endtask

  initial begin
    logic signed [127:0] det, q;
    real s, e, worst;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          A[r*4+c] = (r == c) ? 16'($urandom_range(3*512, 1024)) * (trial[0] ? -16'sd1 : 16'sd1)
                              : 16'($signed(16'($urandom_range(512))) - 16'sd256);
      run_one();
      det = 0;
      for (int c = 0; c < 4; c++) det += el(0, c) * cofactor(0, c);
      check("singular flag", singular, 0);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          q = (cofactor(c, r) <<< (2*F)) / det;
          check($sformatf("inv[%0d][%0d]", r, c), Y[r*4+c], wrap16(q));
        end
      // A * A^-1 close to the identity (9 fraction bits in the inverse).
      worst = 0.0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          s = 0.0;
          for (int k = 0; k < 4; k++) s += (real'(A[r*4+k]) / 512.0) * (real'(Y[k*4+c]) / 512.0);
          e = s - ((r == c) ? 1.0 : 0.0);
          if (e < 0) e = -e;
          if (e > worst) worst = e;
        end
      checks++;
      if (worst > 0.02) begin
        failures++;
        $display("FAIL A*inv(A) differs from I by %f", worst);
      end
    end
    // Singular matrix: rows 1 and 3 equal.
    foreach (A[x]) A[x] = 16'($signed(16'($urandom_range(2048))) - 16'sd1024);
    for (int c = 0; c < 4; c++) A[12 + c] = A[4 + c];
    run_one();
    check("singular flag (equal rows)", singular, 1);
    foreach (Y[x]) check($sformatf("zero output %0d", x), Y[x], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
