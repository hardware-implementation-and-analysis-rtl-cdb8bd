// tb_conj_transpose: self-checking testbench of the Hermitian accelerator.
//
// A random 4 x 64 complex matrix in 32_7 is transposed and conjugated into a
// 64 x 4 matrix in 16_1. The expected element (j, i) is the real part and the
// negated imaginary part of input (i, j), reduced from 25 to 15 fraction bits
// by flooring and wrapped to 16 bits. Two runs: one with values inside the
// 16_1 range and one with values that overflow it. The start-to-done cycle
// count is checked against M*N + 3.
module tb_conj_transpose;

  localparam int M = 4, N = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, busy, done, b_we;
  logic [7:0] a_addr, b_addr;
  logic signed [31:0] a_re, a_im;
  logic signed [15:0] b_re, b_im;
  logic signed [31:0] Are [M*N], Aim [M*N];
  logic signed [15:0] Bre [M*N], Bim [M*N];

  conj_transpose dut (
    .clk, .rst_n, .start, .busy, .done,
    .a_addr, .a_re, .a_im, .b_we, .b_addr, .b_re, .b_im);

  always_ff @(posedge clk) begin
    a_re <= Are[a_addr];
    a_im <= Aim[a_addr];
    if (b_we) begin Bre[b_addr] <= b_re; Bim[b_addr] <= b_im; end
  end

  // Expected 16_1 value of a 32_7 raw value: divide by 2**10 rounding toward
  // minus infinity, then keep 16 bits as a signed number.
  function automatic int expect16(input longint v);
    longint q;
    q = (v >= 0) ? (v / 1024) : -((-v + 1023) / 1024);
    q = q % 65536;
    if (q < 0) q += 65536;
    if (q >= 32768) q -= 65536;
    return int'(q);
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      foreach (Are[x]) begin
        Are[x] = int'($urandom_range(round ? 32'h7FFF_FFFF : 32'h00FF_FFFF)) * ($urandom_range(1) ? -1 : 1);
        Aim[x] = int'($urandom_range(round ? 32'h7FFF_FFFF : 32'h00FF_FFFF)) * ($urandom_range(1) ? -1 : 1);
      end
      Aim[5] = 32'sh8000_0000;  // most negative value: its negation wraps
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check("cycles", cycles, M*N + 3);
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          check($sformatf("re(%0d,%0d)", j, i), int'(Bre[j*M+i]), expect16(longint'(Are[i*N+j])));
          check($sformatf("im(%0d,%0d)", j, i), int'(Bim[j*M+i]), expect16(-longint'(Aim[i*N+j])));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
