// half_adder: one-bit half adder, s = x ^ y, co = x & y.
// The cell the incrementation block of the carry skip adder is chained from.
// Combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  assign s  = x ^ y;
  assign co = x & y;
endmodule
