// sqrt_csla_shm: square-root carry-select adder whose carry-in-1 paths are
// SHM add-one circuits instead of second ripple-carry adders.
//
// {cout, sum} = a + b + cin. The operand is split into groups that grow by
// one bit (see csla_pkg): group 0 is a ripple-carry adder fed by `cin`;
// every later group is a csla_shm_block that computes both possible
// results in parallel and picks one with the carry of the group below.
// With the default WIDTH = 16 the groups are 2, 2, 3, 4 and 5 bits wide
// (bits [1:0], [3:2], [6:4], [10:7], [15:11]), the five blocks of the
// 16-bit design; other widths follow the same rule with the last group
// clipped, which is this implementation's own generalisation.
// Purely combinational: no clock, no reset, result valid one carry-chain
// delay after the inputs settle.
module sqrt_csla_shm
  import csla_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int NG = num_groups(WIDTH);

  logic [NG:0] gc;   // gc[k] = carry into group k

  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int LSB = grp_lsb(k);
    localparam int W   = grp_width(k, WIDTH);

    if (k == 0) begin : g_rca
      rca #(.N(W)) u_rca (
        .a (a[LSB +: W]),
        .b (b[LSB +: W]),
        .ci(gc[k]),
        .s (sum[LSB +: W]),
        .co(gc[k+1])
      );
    end else begin : g_sel
      csla_shm_block #(.N(W)) u_blk (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .cin (gc[k]),
        .sum (sum[LSB +: W]),
        .cout(gc[k+1])
      );
    end
  end

  assign cout = gc[NG];

endmodule
