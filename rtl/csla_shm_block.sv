// csla_shm_block: one N-bit group of the carry-select adder, using an SHM
// in place of the second ripple-carry adder.
//
// Three levels:
//   1. an N-bit ripple-carry adder computes {r_co, r_s} = a + b with carry
//      in 0;
//   2. an (N+1)-bit SHM adds one to {r_co, r_s}, giving the result for a
//      carry in of 1 (the value never wraps, since a + b <= 2^(N+1) - 2);
//   3. N+1 2:1 multiplexers select the level-1 result when the previous
//      group's carry `cin` is 0 and the SHM result when it is 1.
// Outputs: sum = (a + b + cin) mod 2^N, cout = carry out of the group.
// Both candidate results are ready before `cin` arrives, so the group adds
// only one multiplexer delay to the carry chain. The default N = 2 is
// block 2 of the 16-bit adder. Combinational.
module csla_shm_block #(
  parameter int N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] r0;   // level 1: a + b (carry in 0)
  logic [N:0] r1;   // level 2: a + b + 1 from the SHM
  logic [N:0] sel_out;

  rca #(.N(N)) u_rca (
    .a (a),
    .b (b),
    .ci(1'b0),
    .s (r0[N-1:0]),
    .co(r0[N])
  );

  shm #(.N(N+1)) u_shm (
    .b(r0),
    .x(r1)
  );

  for (genvar i = 0; i <= N; i++) begin : g_mux
    mux2 u_mux (.i0(r0[i]), .i1(r1[i]), .sel(cin), .f(sel_out[i]));
  end

  assign sum  = sel_out[N-1:0];
  assign cout = sel_out[N];

endmodule
