// tb_cmat_sub: self-checking testbench of the complex 4 x 64 subtraction.
//
// A is given in 32_7 (25 fraction bits), B in 32_5 (27 fraction bits); the
// result is in 32_5. A is scaled up by 2 bits (its integer part wraps when it
// does not fit 5 integer bits), then the difference is wrapped to 32 bits.
// The start-to-done cycle count is checked against NE + 3 = 259.
module tb_cmat_sub;

  localparam int NE = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, busy, done, c_we;
  logic [7:0] rd_addr, c_addr;
  logic signed [31:0] a_re, a_im, b_re, b_im, c_re, c_im;
  logic signed [31:0] Are [NE], Aim [NE], Bre [NE], Bim [NE], Cre [NE], Cim [NE];

  cmat_sub dut (.clk, .rst_n, .start, .busy, .done, .rd_addr,
                .a_re, .a_im, .b_re, .b_im, .c_we, .c_addr, .c_re, .c_im);

  always_ff @(posedge clk) begin
    a_re <= Are[rd_addr]; a_im <= Aim[rd_addr];
    b_re <= Bre[rd_addr]; b_im <= Bim[rd_addr];
    if (c_we) begin Cre[c_addr] <= c_re; Cim[c_addr] <= c_im; end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint expect_diff(input logic signed [31:0] a, input logic signed [31:0] b);
    logic [31:0] d;
    d = ({a[29:0], 2'b00}) - b;
    return longint'($signed(d));
  endfunction

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
        Are[x] = $signed($urandom()) >>> (round ? 0 : 4);
        Aim[x] = $signed($urandom()) >>> (round ? 0 : 4);
        Bre[x] = $signed($urandom()) >>> (round ? 0 : 2);
        Bim[x] = $signed($urandom()) >>> (round ? 0 : 2);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check("cycles", cycles, NE + 3);
      for (int x = 0; x < NE; x++) begin
        check($sformatf("re[%0d]", x), Cre[x], expect_diff(Are[x], Bre[x]));
        check($sformatf("im[%0d]", x), Cim[x], expect_diff(Aim[x], Bim[x]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
