// tb_rmat_add: self-checking testbench of the real 4 x 4 matrix adder.
//
// Random 32_7 operands are added element by element; the expected sum is
// the integer sum wrapped to 32 bits (overflowing sums are included). The
// start-to-done cycle count is checked against NE + 3 = 19.
module tb_rmat_add;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, busy, done, c_we;
  logic [3:0] rd_addr, c_addr;
  logic signed [31:0] a_data, b_data, c_data;
  logic signed [31:0] A [16], B [16], C [16];

  rmat_add dut (.clk, .rst_n, .start, .busy, .done,
                .rd_addr, .a_data, .b_data, .c_we, .c_addr, .c_data);

  always_ff @(posedge clk) begin
    a_data <= A[rd_addr];
    b_data <= B[rd_addr];
    if (c_we) C[c_addr] <= c_data;
  end

  task automatic check(input string what, input longint got, input longint exp);
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
    longint s;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      foreach (A[x]) begin A[x] = $signed($urandom()); B[x] = $signed($urandom()); end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check("cycles", cycles, 19);
      foreach (A[x]) begin
        s = longint'(A[x]) + longint'(B[x]);
        if (s > 64'sd2147483647) s -= 64'sd4294967296;
        if (s < -64'sd2147483648) s += 64'sd4294967296;
        check($sformatf("C[%0d]", x), C[x], s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
