// malfg_adder: the "coincidence" adder of the generator.
//
// Adds the two lagged words x = Q_{i-p} and y = Q_{i-q} and the one-bit
// feedback a, and keeps the low M bits: s = (x + y + a) mod 2^M. The feedback
// bit enters as the carry-in of the adder, so the three-operand sum costs no
// more than a plain two-operand M-bit adder; the carry out of the top bit is
// dropped, which is the "mod 2^M" of the recurrence.
//
// Interface: x, y are M-bit words, cin is the feedback bit a, s is the M-bit
// sum. Purely combinational: s is valid one adder delay after the inputs.
//
// The modulo-2^M sum with a as third operand is the generator's defining
// equation; feeding a in through the carry-in, and writing the adder as one
// M-bit addition rather than as an 8-bit plus a 4-bit adder slice, are choices
// of this implementation.
module malfg_adder #(
  parameter int unsigned M = malfg_pkg::M_BITS
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic         cin,
  output logic [M-1:0] s
);

  always_comb begin
    s = x + y + M'(cin);
  end

endmodule
