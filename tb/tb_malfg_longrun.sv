// tb_malfg_longrun: long run of the generator at its default parameters,
// as far toward the 10^9-bit evaluation sequence as a simulation allows.
//
// Seeds the default generator (10-bit words, lags 3 and 8, XOR chain, all
// ten control bits engaged) with 8 fixed words and takes NCLK output bits
// from the least significant bit of register 2_0. It checks that the full
// state (the last 8 words) seen right after seeding does not come back within
// the run, i.e. that the period exceeds NCLK clocks, and it applies the NIST
// frequency (monobit) and runs tests at significance 0.01 to the bit stream.
// Words are not compared with a model here; the other testbenches do that.
module tb_malfg_longrun;

  localparam longint unsigned NCLK = 64'd100_000_000;

  logic       clk = 0, rst_n = 0, ce = 0, load = 0;
  logic [9:0] seed = '0, c = '0;
  logic [9:0] q_out;
  logic       bit_out, a_out;

  malfg_top dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .load(load), .seed(seed), .c(c),
    .q_out(q_out), .bit_out(bit_out), .a_out(a_out));

  int checks = 0, failures = 0;
  logic [7:0][9:0] start_state, window;

  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (NCLK + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static longint unsigned ones = 0, runs = 0, recur_at = 0;
    static bit prev = 0;
    real pi_hat, s_obs, v_stat;
    @(negedge clk) rst_n = 1;
    c = '1;
    ce = 1;
    load = 1;
    for (int j = 0; j < 8; j++) begin
      seed = 10'(3 * j * j + 7);
      window = {window[6:0], seed};
      @(negedge clk);
    end
    load = 0;
    start_state = window;
    for (longint unsigned n = 0; n < NCLK; n++) begin
      @(posedge clk); #1;
      window = {window[6:0], q_out};
      if (bit_out) ones++;
      if (n == 0 || bit_out != prev) runs++;
      prev = bit_out;
      if (window == start_state && recur_at == 0) recur_at = n + 1;
    end
    s_obs  = fabs(real'(2 * ones) - real'(NCLK)) / $sqrt(real'(NCLK));
    pi_hat = real'(ones) / real'(NCLK);
    v_stat = fabs(real'(runs) - 2.0 * real'(NCLK) * pi_hat * (1.0 - pi_hat)) /
             (2.0 * $sqrt(2.0 * real'(NCLK)) * pi_hat * (1.0 - pi_hat));
    $display("bits=%0d ones=%0d runs=%0d monobit=%f runs_stat=%f", NCLK, ones, runs, s_obs, v_stat);
    checks++;
    if (recur_at != 0) begin failures++; $display("FAIL state recurred after %0d clocks", recur_at); end
    checks++;
    if (s_obs >= 2.5758) begin failures++; $display("FAIL frequency test"); end
    checks++;
    if (v_stat >= 2.5758) begin failures++; $display("FAIL runs test"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
