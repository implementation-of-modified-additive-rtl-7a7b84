// tb_malfg_regs: self-checking test of the register chain.
//
// Clears the chain, then shifts random words in with the clock enable
// toggled at random, and after every clock compares every register 2_j with
// a queue model: 2_0 holds the newest accepted word and 2_j the word accepted
// j enabled clocks earlier; a clock with ce low changes nothing. Also checks
// that the asynchronous clear empties the chain. Default size: 10-bit words,
// 8 registers.
module tb_malfg_regs;
  localparam int unsigned M = 10;
  localparam int unsigned Q = 8;

  logic                clk = 0, rst_n = 1, ce = 0;
  logic [M-1:0]        d = '0;
  logic [Q-1:0][M-1:0] q_o;
  int checks = 0, failures = 0, holds = 0;
  int unsigned model [Q];

  malfg_regs #(.M(M), .Q(Q)) dut (.clk(clk), .rst_n(rst_n), .ce(ce), .d(d), .q_o(q_o));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int j = 0; j < Q; j++) begin
      checks++;
      if (int'(q_o[j]) != model[j]) begin
        failures++;
        $display("FAIL %s reg %0d = %0d exp %0d", what, j, q_o[j], model[j]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[j]) model[j] = 0;
    #1 rst_n = 0;
    #1 compare("after clear");
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      d  = M'($urandom);
      ce = ($urandom_range(3) != 0);
      @(posedge clk); #1;
      if (ce) begin
        for (int j = Q-1; j > 0; j--) model[j] = model[j-1];
        model[0] = int'(d);
      end else begin
        holds++;
      end
      compare("shift");
    end
    // asynchronous clear in mid-cycle
    @(negedge clk); #2 rst_n = 0; #1;
    foreach (model[j]) model[j] = 0;
    compare("async clear");
    if (holds == 0) begin failures++; $display("FAIL no hold exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
