// ks_adder: W-bit Kogge-Stone parallel-prefix adder with carry in and carry out.
//
// This is the adder used inside every stage of the carry skip adder in place of
// a ripple-carry block. Bit generate g_i = a_i & b_i and propagate
// p_i = a_i ^ b_i are formed first; the carry in is folded into bit 0's
// generate. Then ceil(log2 W) prefix levels follow: at level l each bit i with
// i >= 2^l combines its group (G, P) with the group 2^l bits below,
//   G = G_i | (P_i & G_{i-2^l}),  P = P_i & P_{i-2^l},
// so that after the last level G_i is the carry out of bits 0..i. Every node
// drives at most two nodes of the next level, the low fan-out the Kogge-Stone
// network is chosen for. sum_i = p_i ^ c_i with c_0 = cin and c_{i+1} = G_i.
//
// Purely combinational: no clock, no reset. The Kogge-Stone structure itself
// is the standard one; the published design gives only its name and role.
module ks_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;

  logic [W-1:0] p;   // bit propagate, kept for the sum
  logic [W-1:0] g0;  // bit generate, carry in folded into bit 0
  logic [W:0]   c;   // carry into each bit, c[W] is the carry out

  assign p  = a ^ b;
  always_comb begin
    g0    = a & b;
    g0[0] = (a[0] & b[0]) | (p[0] & cin);
  end

  // Prefix level l: each level has its own (G, P) vectors, go/po. The group
  // propagate leaving the last level is not needed (lint reports it unused).
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    logic [W-1:0] gi, pi_;  // group generate/propagate entering this level
    logic [W-1:0] go, po;   // and leaving it
    if (l == 0) begin : g_first
      assign gi  = g0;
      assign pi_ = p;
    end else begin : g_next
      assign gi  = g_level[l-1].go;
      assign pi_ = g_level[l-1].po;
    end
    for (genvar i = 0; i < W; i++) begin : g_node
      if (i >= D) begin : g_black
        assign go[i] = gi[i] | (pi_[i] & gi[i-D]);
        assign po[i] = pi_[i] & pi_[i-D];
      end else begin : g_pass
        assign go[i] = gi[i];
        assign po[i] = pi_[i];
      end
    end
  end

  if (LEVELS == 0) begin : g_no_prefix
    assign c = {g0, cin};
  end else begin : g_prefix_out
    assign c = {g_level[LEVELS-1].go, cin};
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
