// malfg_top: modified additive lagged Fibonacci generator (MALFG).
//
// A pseudorandom number generator that forms one M-bit word per clock by
//   Q_i = (Q_{i-P} + Q_{i-Q} + a) mod 2^M,
//   a   = XOR of the bits of Q_{i-1} selected by the control code c.
// The extra bit a, fed back from the newest word into the carry-in of the
// adder, is what sets this generator apart from a plain additive lagged
// Fibonacci generator and improves its statistics and period.
//
// Structure: a chain of Q registers 2_0 .. 2_{Q-1} (malfg_regs) shifts one
// place per clock; the adder (malfg_adder) sums the words in 2_{P-1} and
// 2_{Q-1} with a as carry-in and writes 2_0; the logical circuit forms a from
// 2_0 and c, either as an XOR chain (LC_OPTION = LC_CHAIN, option 1, the
// basic configuration) or as an XOR tree (LC_TREE, option 2, shorter path).
//
// Seeding: after the clear every register is zero, and the all-zero state
// maps onto itself, so the chain must be given a seed. While load is high,
// 2_0 takes the input word seed instead of the adder output; Q clocks of
// load fill the whole chain. This load path is this implementation's own
// addition; the document gives no way of setting the initial words.
//
// Interface: clk (the timed pulse), rst_n (asynchronous clear, active low),
// ce (clock enable; with ce low the state holds), load/seed (seed input),
// c (control code), q_out (word in register 2_0, the generator output),
// bit_out (its least significant bit, the output bit stream), a_out (the
// feedback bit currently formed). Timing: one new word per enabled clock;
// q_out is registered, a_out is combinational from q_out and c.
module malfg_top
  import malfg_pkg::*;
#(
  parameter int unsigned M         = M_BITS,
  parameter int unsigned P         = P_LAG,
  parameter int unsigned Q         = Q_LAG,
  parameter lc_option_e  LC_OPTION = LC_CHAIN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         load,
  input  logic [M-1:0] seed,
  input  logic [M-1:0] c,
  output logic [M-1:0] q_out,
  output logic         bit_out,
  output logic         a_out
);

  logic [Q-1:0][M-1:0] regs;
  logic [M-1:0]        sum;
  logic [M-1:0]        d;
  logic                a;

  // Logical circuit 3: feedback bit from register 2_0.
  if (LC_OPTION == LC_TREE) begin : g_lc_tree
    malfg_lc_tree #(.W(M)) u_lc (.b(regs[0]), .c(c), .a(a));
  end else begin : g_lc_chain
    malfg_lc_chain #(.W(M)) u_lc (.b(regs[0]), .c(c), .a(a));
  end

  // Coincidence adder 1: Q_{i-P} is in 2_{P-1}, Q_{i-Q} in 2_{Q-1}.
  malfg_adder #(.M(M)) u_add (
    .x  (regs[P-1]),
    .y  (regs[Q-1]),
    .cin(a),
    .s  (sum)
  );

  always_comb begin
    d = load ? seed : sum;
  end

  // Registers 2_0 .. 2_{Q-1}.
  malfg_regs #(.M(M), .Q(Q)) u_regs (
    .clk  (clk),
    .rst_n(rst_n),
    .ce   (ce),
    .d    (d),
    .q_o  (regs)
  );

  always_comb begin
    q_out   = regs[0];
    bit_out = regs[0][0];
    a_out   = a;
  end

  // The lags must satisfy 1 <= P < Q.
  if (P < 1 || P >= Q) begin : g_bad_lags
    $error("malfg_top: lags must satisfy 1 <= P < Q");
  end

endmodule
