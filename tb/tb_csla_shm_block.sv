// tb_csla_shm_block: exhaustive self-checking test of one carry-select
// group (RCA + SHM + output multiplexers).
// The default 2-bit group (block 2 of the 16-bit adder) and the 3-, 4- and
// 5-bit groups (blocks 3 to 5) get every a, b and cin; {cout, sum} must
// equal a + b + cin. The test also counts how often each group selected
// the RCA result (cin = 0) and the SHM result (cin = 1), and how often the
// SHM's increment rippled through every sum bit into the carry; each must
// happen at least once. A watchdog ends a hung run as a failure.
module tb_csla_shm_block;
  logic [1:0] a2, b2, s2;  logic c2, o2;
  logic [2:0] a3, b3, s3;  logic c3, o3;
  logic [3:0] a4, b4, s4;  logic c4, o4;
  logic [4:0] a5, b5, s5;  logic c5, o5;
  int checks = 0, failures = 0;
  int n_rca_sel = 0, n_shm_sel = 0, n_shm_ripple = 0;

  csla_shm_block dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(o2));
  csla_shm_block #(.N(3)) dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3), .cout(o3));
  csla_shm_block #(.N(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(o4));
  csla_shm_block #(.N(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(o5));

  task automatic check(input int n, input int a, input int b, input int c,
                       input int got);
    int expect_v;
    expect_v = a + b + c;
    checks++;
    if (got != expect_v) begin
      failures++;
      $display("FAIL N=%0d a=%0d b=%0d cin=%0d -> %0d expected %0d",
               n, a, b, c, got, expect_v);
    end
    if (c == 0) n_rca_sel++;
    else        n_shm_sel++;
    // a + b = 2^n - 1 with cin = 1: the SHM's +1 carries through all sum bits
    if (c == 1 && a + b == (1 << n) - 1) n_shm_ripple++;
  endtask

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      {a2, b2, c2} = 5'(v);
      {a3, b3, c3} = 7'(v);
      {a4, b4, c4} = 9'(v);
      {a5, b5, c5} = 11'(v);
      #1;
      if (v < (1 << 5)) check(2, int'(a2), int'(b2), int'(c2), int'({o2, s2}));
      if (v < (1 << 7)) check(3, int'(a3), int'(b3), int'(c3), int'({o3, s3}));
      if (v < (1 << 9)) check(4, int'(a4), int'(b4), int'(c4), int'({o4, s4}));
      check(5, int'(a5), int'(b5), int'(c5), int'({o5, s5}));
    end
    $display("selected RCA result: %0d, SHM result: %0d, SHM full ripple: %0d",
             n_rca_sel, n_shm_sel, n_shm_ripple);
    if (n_rca_sel == 0)    begin failures++; $display("FAIL RCA result never selected"); end
    if (n_shm_sel == 0)    begin failures++; $display("FAIL SHM result never selected"); end
    if (n_shm_ripple == 0) begin failures++; $display("FAIL SHM never rippled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
