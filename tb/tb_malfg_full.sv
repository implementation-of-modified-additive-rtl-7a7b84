// tb_malfg_full: full-size run of the generator at its default parameters
// (10-bit words, lags 3 and 8, XOR chain), the output bit stream judged like
// the generator's statistical evaluation, in which the stream is the least
// significant bit of register 2_0.
//
// Clears the generator, loads 8 fixed seed words, sets the control code to
// engage all ten bits, and then takes NBITS output bits. Every word is
// compared with the reference model. On the bit stream it applies the two
// simplest tests of the NIST suite at significance 0.01: the frequency
// (monobit) test and the runs test. It also checks that the state right
// after seeding does not recur within the run (the generator's period
// exceeds 10^9 clocks).
module tb_malfg_full;
  import malfg_model_pkg::*;

  localparam int unsigned NBITS = 1_000_000;

  logic       clk = 0, rst_n = 0, ce = 0, load = 0;
  logic [9:0] seed = '0, c = '0;
  logic [9:0] q_out;
  logic       bit_out, a_out;

  malfg_top dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .load(load), .seed(seed), .c(c),
    .q_out(q_out), .bit_out(bit_out), .a_out(a_out));

  malfg_model mdl;
  int checks = 0, failures = 0;
  int unsigned start_state[$];

  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (NBITS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static longint ones = 0, runs = 0, mism = 0;
    static bit prev = 0, recurred = 0;
    real pi_hat, s_obs, v_stat;
    static int unsigned seeds[8] = '{10'd1, 10'd2, 10'd3, 10'd5, 10'd8, 10'd13, 10'd21, 10'd34};
    mdl = new(10, 3, 8);
    @(negedge clk) rst_n = 1;
    c = '1;
    ce = 1;
    for (int j = 0; j < 8; j++) begin
      load = 1; seed = 10'(seeds[j]);
      @(posedge clk); #1;
      mdl.step(1, seeds[j], c);
      @(negedge clk);
    end
    load = 0;
    start_state = mdl.hist;
    for (int unsigned n = 0; n < NBITS; n++) begin
      @(posedge clk); #1;
      mdl.step(0, 0, c);
      checks++;
      if (int'(q_out) != mdl.newest()) begin
        mism++;
        failures++;
        if (mism < 10) $display("FAIL word %0d: %0d exp %0d", n, q_out, mdl.newest());
      end
      if (bit_out) ones++;
      if (n == 0 || bit_out != prev) runs++;
      prev = bit_out;
      if (mdl.same_state(start_state)) recurred = 1;
    end
    // NIST frequency test: |S_n| / sqrt(n) below 2.5758 (p >= 0.01).
    s_obs = fabs(real'(2 * ones - NBITS)) / $sqrt(real'(NBITS));
    pi_hat = real'(ones) / real'(NBITS);
    // NIST runs test statistic, same threshold.
    v_stat = fabs(real'(runs) - 2.0 * NBITS * pi_hat * (1.0 - pi_hat)) /
             (2.0 * $sqrt(2.0 * NBITS) * pi_hat * (1.0 - pi_hat));
    $display("bits=%0d ones=%0d runs=%0d monobit=%f runs_stat=%f", NBITS, ones, runs, s_obs, v_stat);
    checks++;
    if (s_obs >= 2.5758) begin failures++; $display("FAIL frequency test"); end
    checks++;
    if (v_stat >= 2.5758) begin failures++; $display("FAIL runs test"); end
    checks++;
    if (recurred) begin failures++; $display("FAIL state recurred within %0d clocks", NBITS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
