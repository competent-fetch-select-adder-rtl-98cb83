// full_adder: one-bit full adder, the cell of every ripple-carry adder in
// the design.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). The design only names its full
// adders (a 28-transistor CMOS cell); the gate structure below is the
// textbook one and is this implementation's choice. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end

endmodule
