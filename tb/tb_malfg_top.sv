// tb_malfg_top: end-to-end test of the generator.
//
// Runs three generators on the same inputs: the evaluated configuration
// (10-bit words, lags 3 and 8) with the XOR chain (option 1) and with the
// XOR tree (option 2), and a wider one (16 bits, lags 5 and 17, tree) to
// exercise the parameters. After every clock each output (word of register
// 2_0, output bit, feedback bit) is compared with the reference model.
//
// Phases: clear, seed load (Q clocks), free running with the control code
// changed between all-zero (plain additive lagged Fibonacci), all-ones,
// prefix codes b_0..b_S and random codes, clock enable dropped at random,
// a reseed in mid-run. Counted mechanisms (each must occur): seed load,
// hold with ce low, feedback bit a = 1, adder wrap modulo 2^M, plain mode
// with c = 0, reseed. The rate check: every enabled clock produces a new word
// in register 2_0 one clock later. The period check: the state right after
// seeding does not come back within the run.
module tb_malfg_top;
  import malfg_pkg::*;
  import malfg_model_pkg::*;

  localparam int unsigned NCYC = 60000;

  logic        clk = 0, rst_n = 1, ce = 0, load = 0;
  logic [15:0] seed = '0, c = '0;

  logic [9:0]  q1, q2;
  logic        b1, b2, a1, a2;
  logic [15:0] q3;
  logic        b3, a3;

  malfg_top #(.LC_OPTION(LC_CHAIN)) dut1 (
    .clk(clk), .rst_n(rst_n), .ce(ce), .load(load), .seed(seed[9:0]), .c(c[9:0]),
    .q_out(q1), .bit_out(b1), .a_out(a1));
  malfg_top #(.LC_OPTION(LC_TREE)) dut2 (
    .clk(clk), .rst_n(rst_n), .ce(ce), .load(load), .seed(seed[9:0]), .c(c[9:0]),
    .q_out(q2), .bit_out(b2), .a_out(a2));
  malfg_top #(.M(16), .P(5), .Q(17), .LC_OPTION(LC_TREE)) dut3 (
    .clk(clk), .rst_n(rst_n), .ce(ce), .load(load), .seed(seed), .c(c),
    .q_out(q3), .bit_out(b3), .a_out(a3));

  malfg_model m10, m16;
  int checks = 0, failures = 0;
  int n_load = 0, n_hold = 0, n_a1 = 0, n_wrap = 0, n_plain = 0, n_reseed = 0;
  int n_gen = 0;
  int unsigned start_state[$];

  always #5 clk = ~clk;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic compare_all();
    chk("q chain", q1, m10.newest());
    chk("q tree", q2, m10.newest());
    chk("bit chain", b1, m10.newest() & 1);
    chk("bit tree", b2, m10.newest() & 1);
    chk("a chain", a1, m10.fb(c[9:0]));
    chk("a tree", a2, m10.fb(c[9:0]));
    chk("q wide", q3, m16.newest());
    chk("a wide", a3, m16.fb(c));
  endtask

  // One clock with the given inputs, stepping the models alongside.
  task automatic cycle(input bit ce_i, input bit load_i, input logic [15:0] seed_i);
    logic [9:0] q_before;
    @(negedge clk);
    ce = ce_i; load = load_i; seed = seed_i;
    q_before = q1;
    @(posedge clk); #1;
    if (ce_i) begin
      m10.step(load_i, seed_i[9:0], c[9:0]);
      m16.step(load_i, seed_i, c);
      if (load_i) n_load++;
      else begin
        n_gen++;
        if (m10.last_a) n_a1++;
        if (m10.last_wrap) n_wrap++;
        if (c == 0) n_plain++;
      end
    end else begin
      n_hold++;
      chk("hold keeps word", q1, q_before);
    end
    compare_all();
  endtask

  task automatic seed_chain();
    for (int j = 0; j < 17; j++) cycle(1, 1, 16'($urandom));
  endtask

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static bit recurred = 0;
    m10 = new(10, 3, 8);
    m16 = new(16, 5, 17);
    #1 rst_n = 0;
    #1 compare_all();
    @(negedge clk) rst_n = 1;
    // All-zero state is a fixed point: with c = all ones it must stay zero.
    c = '1;
    repeat (5) cycle(1, 0, '0);
    seed_chain();
    start_state = m10.hist;
    // Rate: the first generated word is in register 2_0 after one clock.
    cycle(1, 0, '0);
    for (int t = 0; t < NCYC; t++) begin
      if (t % 500 == 0) begin
        case ($urandom_range(3))
          0: c = '0;
          1: c = '1;
          2: c = (16'(1) << $urandom_range(1, 16)) - 1;
          default: c = 16'($urandom);
        endcase
      end
      if (t == NCYC / 2) begin
        seed_chain();
        n_reseed++;
        start_state = m10.hist;
      end
      cycle($urandom_range(9) != 0, 0, '0);
      if (m10.same_state(start_state)) recurred = 1;
    end
    if (recurred) begin failures++; $display("FAIL state recurred"); end
    $display("mechanisms: load=%0d hold=%0d a=1:%0d wrap=%0d plain=%0d reseed=%0d generated=%0d",
             n_load, n_hold, n_a1, n_wrap, n_plain, n_reseed, n_gen);
    if (n_load == 0)   begin failures++; $display("FAIL no seed load"); end
    if (n_hold == 0)   begin failures++; $display("FAIL no hold"); end
    if (n_a1 == 0)     begin failures++; $display("FAIL feedback bit never set"); end
    if (n_wrap == 0)   begin failures++; $display("FAIL adder never wrapped"); end
    if (n_plain == 0)  begin failures++; $display("FAIL plain mode never ran"); end
    if (n_reseed == 0) begin failures++; $display("FAIL no reseed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
