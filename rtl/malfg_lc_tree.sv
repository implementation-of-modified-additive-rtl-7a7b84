// malfg_lc_tree: logical circuit, option 2 (the faster one).
//
// Forms the same feedback bit as option 1,
// a = (b_0 & c_0) ^ (b_1 & c_1) ^ ... ^ (b_{W-1} & c_{W-1}),
// with b the word in register 2_0 and c the control code, but combines the
// gated bits in a balanced tree of two-input XOR gates (malfg_xor_tree), so
// the longest path passes ceil(log2 W) XOR gates instead of W-1. This is what
// roughly halves the minimum clock period of the generator.
//
// Interface: b, c are W-bit inputs, a is the one-bit output. Combinational.
//
// The balanced XOR2 tree follows the generator's option-2 circuit, whose
// example has 20 inputs; the AND gating by c in front of it is taken over
// from option 1, so that both options compute the same function.
module malfg_lc_tree #(
  parameter int unsigned W = malfg_pkg::M_BITS
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic         a
);

  logic [W-1:0] g;

  always_comb begin
    g = b & c;
  end

  malfg_xor_tree #(.N(W)) u_tree (.x(g), .y(a));

endmodule
