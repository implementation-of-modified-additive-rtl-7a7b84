// malfg_lc_chain: logical circuit, option 1 (basic configuration).
//
// Forms the feedback bit a = (b_0 & c_0) ^ (b_1 & c_1) ^ ... ^ (b_{W-1} & c_{W-1}),
// where b is the word in register 2_0 and c the control code at the
// generator's control inputs. Each bit of c decides whether the matching bit
// of b takes part; with c = 2^(S+1)-1 the result is b_0 ^ ... ^ b_S.
// The gated bits are combined by two-input XOR gates one after another, so the
// path from b_0 to a passes W-1 XOR gates: small, but slow for wide words.
//
// Interface: b, c are W-bit inputs, a is the one-bit output. Combinational.
//
// The AND gating and the XOR chain follow the generator's option-1 circuit;
// the strictly linear order of the chain is this implementation's choice.
module malfg_lc_chain #(
  parameter int unsigned W = malfg_pkg::M_BITS
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic         a
);

  logic [W-1:0] g;     // gated bits

  // The running value is passed from one XOR2 stage to the next.
  always_comb begin
    logic acc;
    g   = b & c;
    acc = g[0];
    for (int unsigned k = 1; k < W; k++) begin
      acc = acc ^ g[k];
    end
    a = acc;
  end

endmodule
