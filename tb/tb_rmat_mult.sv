// tb_rmat_mult: self-checking testbench of the real 4 x 4 matrix multiplier.
//
// Random 4 x 4 operands in 32_5 (27 fraction bits) are multiplied. The
// expected element is the exact integer dot product of the raw values,
// floored by 27 bits and wrapped to 32 bits. Rounds with small operands and
// with operands large enough to overflow are run. The start-to-done cycle
// count is checked against M*N*K + 3 = 67.
module tb_rmat_mult;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, busy, done, c_we;
  logic [3:0] a_addr, b_addr, c_addr;
  logic signed [31:0] a_data, b_data, c_data;
  logic signed [31:0] A [16], B [16], C [16];

  rmat_mult dut (.clk, .rst_n, .start, .busy, .done,
                 .a_addr, .a_data, .b_addr, .b_data, .c_we, .c_addr, .c_data);

  always_ff @(posedge clk) begin
    a_data <= A[a_addr];
    b_data <= B[b_addr];
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
    logic signed [127:0] s;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      foreach (A[x]) begin
        A[x] = $signed($urandom()) >>> (round < 2 ? 4 : 0);
        B[x] = $signed($urandom()) >>> (round < 2 ? 4 : 0);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check("cycles", cycles, 67);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          s = 0;
          for (int k = 0; k < 4; k++) s += 128'(A[i*4+k]) * 128'(B[k*4+j]);
          s = s >>> 27;
          check($sformatf("C[%0d][%0d]", i, j), C[i*4+j], longint'($signed(s[31:0])));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
