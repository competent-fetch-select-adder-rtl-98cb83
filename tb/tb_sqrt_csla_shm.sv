// tb_sqrt_csla_shm: end-to-end self-checking test of the 16-bit square-root
// carry-select adder at its default size (no parameter overrides).
//
// Directed corner cases (zero, all ones, a full carry ripple from bit 0 to
// the carry out, alternating patterns) are followed by 200,000 random
// (a, b, cin) vectors; every result {cout, sum} is compared with a + b + cin
// computed in integer arithmetic. Alongside, the test works out from the
// operands, independently of the design, the carry that enters each of the
// groups 1..4 and counts, per group, how often the group had to deliver
// its RCA result (carry 0), its SHM result (carry 1), and its SHM result
// with the increment rippling through all of the group's sum bits. It also
// counts vectors whose carry crossed every group boundary. Each of these
// must occur at least once. A watchdog ends a hung run as a failure.
module tb_sqrt_csla_shm;
  import csla_pkg::*;

  localparam int W  = 16;
  localparam int NG = num_groups(W);
  localparam int NRAND = 200000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_rca_sel   [NG];
  int n_shm_sel   [NG];
  int n_shm_ripple[NG];
  int n_full_ripple = 0;

  sqrt_csla_shm dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic longint carry_into(input longint x, input longint y,
                                        input longint c, input int bitpos);
    longint m;
    m = (longint'(1) << bitpos) - 1;
    return (((x & m) + (y & m) + c) >> bitpos) & 1;
  endfunction

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                       input logic tc);
    longint expect_v, got;
    bit all_carry;
    a = ta; b = tb_; cin = tc;
    #1;
    expect_v = longint'(ta) + longint'(tb_) + longint'(tc);
    got      = longint'({cout, sum});
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%0b -> %h expected %h", ta, tb_, tc, got, expect_v);
    end
    all_carry = 1'b1;
    for (int k = 1; k < NG; k++) begin
      int lsb, gw;
      longint c, gsum;
      lsb  = grp_lsb(k);
      gw   = grp_width(k, W);
      c    = carry_into(longint'(ta), longint'(tb_), longint'(tc), lsb);
      gsum = ((longint'(ta) >> lsb) & ((longint'(1) << gw) - 1)) +
             ((longint'(tb_) >> lsb) & ((longint'(1) << gw) - 1));
      if (c == 0) begin
        n_rca_sel[k]++;
        all_carry = 1'b0;
      end else begin
        n_shm_sel[k]++;
        if (gsum == (longint'(1) << gw) - 1) n_shm_ripple[k]++;
      end
    end
    if (all_carry && tc && ((ta ^ tb_) == '1)) n_full_ripple++;
  endtask

  initial begin
    foreach (n_rca_sel[k]) begin
      n_rca_sel[k] = 0; n_shm_sel[k] = 0; n_shm_ripple[k] = 0;
    end
    // directed corners
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);          // carry ripples from bit 0 to cout
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h5555, 16'h5555, 1'b0);
    apply(16'h7FFF, 16'h0001, 1'b0);
    apply(16'h0003, 16'h0000, 1'b1); // carry out of group 0 only
    // per group: carry in = 1 and group operand sum all ones
    for (int k = 1; k < NG; k++) begin
      logic [W-1:0] ga;
      ga = '0;
      for (int i = 0; i < grp_width(k, W); i++) ga[grp_lsb(k) + i] = 1'b1;
      apply(ga | 16'h0003, 16'h0000, 1'b1);
    end
    for (int n = 0; n < NRAND; n++)
      apply(W'($urandom), W'($urandom), 1'($urandom));

    for (int k = 1; k < NG; k++) begin
      $display("group %0d [%0d:%0d]: RCA result %0d, SHM result %0d, SHM full ripple %0d",
               k, grp_lsb(k) + grp_width(k, W) - 1, grp_lsb(k),
               n_rca_sel[k], n_shm_sel[k], n_shm_ripple[k]);
      if (n_rca_sel[k] == 0 || n_shm_sel[k] == 0 || n_shm_ripple[k] == 0) begin
        failures++;
        $display("FAIL group %0d did not exercise every selection", k);
      end
    end
    $display("carry crossed every group: %0d", n_full_ripple);
    if (n_full_ripple == 0) begin
      failures++;
      $display("FAIL full carry ripple never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NRAND * 2 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
