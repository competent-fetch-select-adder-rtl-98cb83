// mux2: 2:1 multiplexer, the single cell the SHM and the output selection
// of each carry-select group are built from.
//
// f = i1 when sel is 1, i0 when sel is 0. The port names i0, i1, sel and f
// are those of the multiplexer cell of the SHM schematic; the assignment
// of i1 to sel = 1 is the usual convention for that cell and is assumed
// here. Purely combinational, no clock.
module mux2 (
  input  logic i0,
  input  logic i1,
  input  logic sel,
  output logic f
);

  always_comb f = sel ? i1 : i0;

endmodule
