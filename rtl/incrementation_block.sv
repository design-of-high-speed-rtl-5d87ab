// incrementation_block: adds a one-bit carry to a W-bit value, sum = z + cin.
//
// Used in stages 2..Q of the carry skip adder: each such stage first adds its
// operand slices with carry in 0, giving the intermediate result z, and this
// block then adds in the carry that arrives from the previous stage. As in the
// published design, the block is a chain of half adders: bit i's half
// adder adds z_i and the carry of bit i-1. The carry out of the last half
// adder is brought out as cout, but the stage does not use it: the stage's
// carry comes from the skip logic, which is faster.
//
// Combinational, W half-adder delays from cin to sum[W-1].
module incrementation_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] z,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_ha
    half_adder u_ha (
      .x (z[i]),
      .y (c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
