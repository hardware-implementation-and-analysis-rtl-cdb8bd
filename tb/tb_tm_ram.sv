// tb_tm_ram: self-checking testbench of the block RAM buffer.
//
// Writes random words to every address, then reads them back while writing
// new data elsewhere; checks the one-cycle read latency and that a read of an
// address written in the same cycle returns the old word (read-first).
module tb_tm_ram;

  localparam int DEPTH = 256, WIDTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic we;
  logic [7:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  tm_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input string what, input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] old;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom(), $urandom()};
      model[a] = wdata;
    end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      raddr = 8'(a);
      waddr = 8'(a);            // same-cycle write to the address being read
      wdata = {$urandom(), $urandom()};
      old = model[a];
      model[a] = wdata;
      @(posedge clk); #1;
      check($sformatf("read-first %0d", a), rdata, old);
    end
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); raddr = 8'(a);
      @(posedge clk); #1;
      check($sformatf("read %0d", a), rdata, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
