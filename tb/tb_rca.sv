// tb_rca: exhaustive self-checking test of the ripple-carry adder.
// The default 2-bit adder (block 1 of the 16-bit design) and a 5-bit copy
// are driven with every a, b and ci; {co, s} must equal a + b + ci.
// A watchdog ends a hung run as a failure.
module tb_rca;
  localparam int NB = 5;

  logic [1:0]    a2, b2, s2;
  logic          ci2, co2;
  logic [NB-1:0] a5, b5, s5;
  logic          ci5, co5;
  int checks = 0, failures = 0;

  rca dut2 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));
  rca #(.N(NB)) dut5 (.a(a5), .b(b5), .ci(ci5), .s(s5), .co(co5));

  initial begin
    a2 = '0; b2 = '0; ci2 = 1'b0;
    a5 = '0; b5 = '0; ci5 = 1'b0;
    for (int v = 0; v < (1 << 5); v++) begin
      {a2, b2, ci2} = 5'(v);
      #1;
      checks++;
      if ({co2, s2} !== 3'(int'(a2) + int'(b2) + int'(ci2))) begin
        failures++;
        $display("FAIL N=2 a=%0d b=%0d ci=%0b -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int v = 0; v < (1 << (2 * NB + 1)); v++) begin
      {a5, b5, ci5} = (2 * NB + 1)'(v);
      #1;
      checks++;
      if ({co5, s5} !== (NB + 1)'(int'(a5) + int'(b5) + int'(ci5))) begin
        failures++;
        $display("FAIL N=%0d a=%0d b=%0d ci=%0b -> %0d", NB, a5, b5, ci5, {co5, s5});
      end
    end
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
