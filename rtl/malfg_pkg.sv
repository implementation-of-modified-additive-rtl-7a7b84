// malfg_pkg: shared constants of the modified additive lagged Fibonacci
// generator (MALFG).
//
// The generator forms Q_i = (Q_{i-P} + Q_{i-Q} + a) mod 2^M on every clock,
// where a is the XOR of the bits of the newest word that the control code
// selects. The defaults below are the evaluated configuration: 10-bit words
// with lags 3 and 8, i.e. Q_i = (Q_{i-3} + Q_{i-8} + a) mod 2^10.
// The option type names the two ways of building the XOR network: a chain of
// two-input XOR gates (option 1, the basic configuration) or a balanced tree
// of them (option 2, the faster one).
package malfg_pkg;

  // Word width m of every register and of the adder.
  parameter int unsigned M_BITS = 10;
  // Short lag p and long lag q of the recurrence.
  parameter int unsigned P_LAG = 3;
  parameter int unsigned Q_LAG = 8;

  // Structure of the XOR network ("logical circuit").
  typedef enum logic [0:0] {
    LC_CHAIN = 1'b0,  // option 1: gated bits XORed one after another
    LC_TREE  = 1'b1   // option 2: gated bits XORed in a balanced tree
  } lc_option_e;

endpackage
