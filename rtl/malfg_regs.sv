// malfg_regs: the chain of memory registers 2_0 .. 2_{Q-1} of the generator.
//
// On every clock with ce high the chain shifts: register 2_0 takes the new
// word d (the adder output, or a seed word while the generator is loaded) and
// each register 2_j takes the old content of 2_{j-1}. Just before the clock
// that forms Q_i, register 2_j therefore holds Q_{i-1-j}, so the lag-p and
// lag-q operands of the recurrence sit in registers 2_{p-1} and 2_{q-1}.
// The whole chain is brought out so that the caller picks its taps.
//
// Interface: clk, active-low asynchronous clear rst_n (clears every register
// to zero), clock enable ce, M-bit input word d, and q_o[j] = register 2_j.
// Timing: one word enters per enabled clock; q_o changes only on clk edges.
//
// The shift chain, the clock enable and the clear follow the generator's
// register stage (clock-enabled registers with a clear input); holding Q
// registers, not Q+1, is this implementation's reading of the lag indices.
module malfg_regs #(
  parameter int unsigned M = malfg_pkg::M_BITS,
  parameter int unsigned Q = malfg_pkg::Q_LAG
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [M-1:0]        d,
  output logic [Q-1:0][M-1:0] q_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_o <= '0;
    end else if (ce) begin
      q_o[0] <= d;
      for (int unsigned j = 1; j < Q; j++) begin
        q_o[j] <= q_o[j-1];
      end
    end
  end

endmodule
