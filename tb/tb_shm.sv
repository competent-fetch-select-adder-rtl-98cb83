// tb_shm: exhaustive self-checking test of the SHM add-one circuit.
// The default 3-bit SHM is checked for all eight inputs against b + 1
// (mod 8), including the all-ones input whose result wraps to zero. SHMs
// of 1, 2, 4, 5 and 6 bits (the widths used by blocks 3 to 5 of the 16-bit
// adder and the degenerate small ones) are checked the same way. A
// watchdog ends a hung run as a failure.
module tb_shm;
  logic [2:0] b3, x3;
  logic [0:0] b1, x1;
  logic [1:0] b2, x2;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  shm dut3 (.b(b3), .x(x3));
  shm #(.N(1)) dut1 (.b(b1), .x(x1));
  shm #(.N(2)) dut2 (.b(b2), .x(x2));
  shm #(.N(4)) dut4 (.b(b4), .x(x4));
  shm #(.N(5)) dut5 (.b(b5), .x(x5));
  shm #(.N(6)) dut6 (.b(b6), .x(x6));

  task automatic check(input int n, input int bin, input int xout);
    int expect_x;
    expect_x = (bin + 1) % (1 << n);
    checks++;
    if (xout != expect_x) begin
      failures++;
      $display("FAIL N=%0d b=%0d x=%0d expected %0d", n, bin, xout, expect_x);
    end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      b3 = 3'(v); b1 = 1'(v); b2 = 2'(v); b4 = 4'(v); b5 = 5'(v); b6 = 6'(v);
      #1;
      if (v < 8)  check(3, v, int'(x3));
      if (v < 2)  check(1, v, int'(x1));
      if (v < 4)  check(2, v, int'(x2));
      if (v < 16) check(4, v, int'(x4));
      if (v < 32) check(5, v, int'(x5));
      check(6, v, int'(x6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
