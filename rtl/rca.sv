// rca: N-bit ripple-carry adder made of N full adders.
//
// {co, s} = a + b + ci. The carry ripples from bit 0 to bit N-1 through
// one full adder per bit. It serves as block 1 of the adder (with the
// external carry in) and as the first level of every carry-select group
// (with ci tied to 0). The default N = 2 is the width of block 1 and of
// the first level of block 2. Combinational.
module rca #(
  parameter int N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co
);

  logic [N:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[N];

endmodule
