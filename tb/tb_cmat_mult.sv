// tb_cmat_mult: self-checking testbench of the complex matrix multiplier.
//
// Two instances are exercised: the 4x64 by 64x4 multiplier with the formats it
// has in the chain (A in 32_7, B in 16_1, own format 32_1), and the 4x4 by
// 4x64 multiplier (A and B in 32_7, own format 32_5). Random operands are
// held in testbench memories with one cycle of read latency. The expected
// result of every element is computed here with wide integer arithmetic:
// operands cast to the multiplier's format, exact complex dot product, cast
// of the sum (floor on dropped bits, wrap on overflow). The number of cycles
// from start to done is checked against M*N*K + 3.
module tb_cmat_mult;
  import tm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Floor-and-wrap cast written independently of the design's helper.
  function automatic longint cast_fx(input logic signed [127:0] v, input int fin, input int w, input int fout);
    logic signed [127:0] s;
    s = (fin >= fout) ? (v >>> (fin - fout)) : (v <<< (fout - fin));
    s = s & ((128'sd1 <<< w) - 1);
    if (s[w-1]) s = s - (128'sd1 <<< w);
    return longint'(s);
  endfunction

  // ---------------- instance 1: 4x64 * 64x4 ----------------
  localparam int M1 = 4, K1 = 64, N1 = 4;
  logic start1, busy1, done1, c_we1;
  logic [7:0] a_addr1, b_addr1;
  logic [3:0] c_addr1;
  logic signed [31:0] a_re1, a_im1;
  logic signed [15:0] b_re1, b_im1;
  logic signed [31:0] c_re1, c_im1;
  logic signed [31:0] A1re [M1*K1], A1im [M1*K1];
  logic signed [15:0] B1re [K1*N1], B1im [K1*N1];
  logic signed [31:0] C1re [M1*N1], C1im [M1*N1];

  cmat_mult #(.M(M1), .K(K1), .N(N1), .WA(32), .IA(7), .WB(16), .IB(1), .W(32), .I(1)) dut1 (
    .clk, .rst_n, .start(start1), .busy(busy1), .done(done1),
    .a_addr(a_addr1), .a_re(a_re1), .a_im(a_im1),
    .b_addr(b_addr1), .b_re(b_re1), .b_im(b_im1),
    .c_we(c_we1), .c_addr(c_addr1), .c_re(c_re1), .c_im(c_im1));

  always_ff @(posedge clk) begin
    a_re1 <= A1re[a_addr1]; a_im1 <= A1im[a_addr1];
    b_re1 <= B1re[b_addr1]; b_im1 <= B1im[b_addr1];
    if (c_we1) begin C1re[c_addr1] <= c_re1; C1im[c_addr1] <= c_im1; end
  end

  // ---------------- instance 2: 4x4 * 4x64 ----------------
  localparam int M2 = 4, K2 = 4, N2 = 64;
  logic start2, busy2, done2, c_we2;
  logic [3:0] a_addr2;
  logic [7:0] b_addr2, c_addr2;
  logic signed [31:0] a_re2, a_im2, b_re2, b_im2, c_re2, c_im2;
  logic signed [31:0] A2re [M2*K2], A2im [M2*K2];
  logic signed [31:0] B2re [K2*N2], B2im [K2*N2];
  logic signed [31:0] C2re [M2*N2], C2im [M2*N2];

  cmat_mult #(.M(M2), .K(K2), .N(N2), .WA(32), .IA(7), .WB(32), .IB(7), .W(32), .I(5)) dut2 (
    .clk, .rst_n, .start(start2), .busy(busy2), .done(done2),
    .a_addr(a_addr2), .a_re(a_re2), .a_im(a_im2),
    .b_addr(b_addr2), .b_re(b_re2), .b_im(b_im2),
    .c_we(c_we2), .c_addr(c_addr2), .c_re(c_re2), .c_im(c_im2));

  always_ff @(posedge clk) begin
    a_re2 <= A2re[a_addr2]; a_im2 <= A2im[a_addr2];
    b_re2 <= B2re[b_addr2]; b_im2 <= B2im[b_addr2];
    if (c_we2) begin C2re[c_addr2] <= c_re2; C2im[c_addr2] <= c_im2; end
  end

  // Random raw value with magnitude below 2**bits.
  function automatic int rnd(input int bits);
    int v;
    v = int'($urandom_range((1 << bits) - 1));
    return ($urandom_range(1) == 1) ? -v : v;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int cycles;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] sr, si, ar, ai, br, bi;
    start1 = 0; start2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      // Operands: about 0.05 in magnitude (32_7 has 25, 16_1 has 15 fraction bits);
      // round 1 uses larger values so that the 32_1 result wraps.
      foreach (A1re[x]) begin A1re[x] = rnd(round ? 24 : 21); A1im[x] = rnd(round ? 24 : 21); end
      foreach (B1re[x]) begin B1re[x] = 16'(rnd(round ? 14 : 11)); B1im[x] = 16'(rnd(round ? 14 : 11)); end
      foreach (A2re[x]) begin A2re[x] = rnd(24); A2im[x] = rnd(24); end
      foreach (B2re[x]) begin B2re[x] = rnd(24); B2im[x] = rnd(24); end

      // Run instance 1.
      @(negedge clk); start1 = 1; @(negedge clk); start1 = 0;
      cycles = 1;
      while (!done1) begin @(negedge clk); cycles++; end
      check("cycles 4x64*64x4", cycles, M1*N1*K1 + 3);
      for (int i = 0; i < M1; i++)
        for (int j = 0; j < N1; j++) begin
          sr = 0; si = 0;
          for (int k = 0; k < K1; k++) begin
            ar = cast_fx(A1re[i*K1+k], 25, 32, 31); ai = cast_fx(A1im[i*K1+k], 25, 32, 31);
            br = cast_fx(B1re[k*N1+j], 15, 32, 31); bi = cast_fx(B1im[k*N1+j], 15, 32, 31);
            sr += ar*br - ai*bi;
            si += ar*bi + ai*br;
          end
          check($sformatf("C1re[%0d][%0d]", i, j), C1re[i*N1+j], cast_fx(sr, 62, 32, 31));
          check($sformatf("C1im[%0d][%0d]", i, j), C1im[i*N1+j], cast_fx(si, 62, 32, 31));
        end

      // Run instance 2.
      @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
      cycles = 1;
      while (!done2) begin @(negedge clk); cycles++; end
      check("cycles 4x4*4x64", cycles, M2*N2*K2 + 3);
      for (int i = 0; i < M2; i++)
        for (int j = 0; j < N2; j++) begin
          sr = 0; si = 0;
          for (int k = 0; k < K2; k++) begin
            ar = cast_fx(A2re[i*K2+k], 25, 32, 27); ai = cast_fx(A2im[i*K2+k], 25, 32, 27);
            br = cast_fx(B2re[k*N2+j], 25, 32, 27); bi = cast_fx(B2im[k*N2+j], 25, 32, 27);
            sr += ar*br - ai*bi;
            si += ar*bi + ai*br;
          end
          check($sformatf("C2re[%0d][%0d]", i, j), C2re[i*N2+j], cast_fx(sr, 54, 32, 27));
          check($sformatf("C2im[%0d][%0d]", i, j), C2im[i*N2+j], cast_fx(si, 54, 32, 27));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
