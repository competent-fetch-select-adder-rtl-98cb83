// shm: Special Hardware using Multiplexers, an add-one circuit.
//
// x = b + 1 (mod 2^N), built only from inverters and 2:1 multiplexers:
//   x[0] = ~b[0]                                   (inverter)
//   x[1] = x[0] ? b[1] : ~b[1]                     (mux 1, sel = x[0])
//   for i >= 2:
//     c[i] = x[i-1] ? 1'b0 : b[i-1]                (carry mux, i1 grounded)
//     x[i] = c[i]   ? ~b[i] : b[i]                 (bit mux, sel = c[i])
// c[i] is the carry into bit i. The carry mux works because, when
// x[i-1] = 0, b[i-1] equals the carry into bit i-1, so their AND is b[i-1];
// when x[i-1] = 1 the two differ and the AND is 0.
// For N = 3 this is the three-inverter, three-multiplexer circuit of the
// design, wired as its schematic shows. The extension to other N (one
// inverter per bit, 2N-3 multiplexers) follows the design's statement that
// the logic extends to any width; it reproduces the design's transistor
// counts for the 4-, 5- and 6-bit SHMs of blocks 3 to 5. The carry passes
// 2(N-1) multiplexer levels, so the SHM is slower than an XOR-based
// increment but smaller. Combinational; N must be at least 1.
module shm #(
  parameter int N = 3
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);

  logic [N-1:0] nb;   // inverted inputs

  assign nb = ~b;
  assign x[0] = nb[0];

  if (N >= 2) begin : g_bit1
    mux2 u_mux_x1 (.i0(nb[1]), .i1(b[1]), .sel(x[0]), .f(x[1]));
  end

  for (genvar i = 2; i < N; i++) begin : g_bit
    logic c;   // carry into bit i
    mux2 u_mux_c (.i0(b[i-1]), .i1(1'b0),  .sel(x[i-1]), .f(c));
    mux2 u_mux_x (.i0(b[i]),   .i1(nb[i]), .sel(c),      .f(x[i]));
  end

endmodule
