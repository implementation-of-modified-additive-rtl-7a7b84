// tb_malfg_adder: self-checking test of the coincidence adder.
//
// Drives corner cases (zero, all ones, carry into the dropped top bit) and
// random words with both carry-in values at the default width of 10 bits,
// and compares s with (x + y + cin) mod 1024 worked out in integer
// arithmetic. A watchdog ends the run if it hangs.
module tb_malfg_adder;
  localparam int unsigned M = 10;
  localparam int unsigned MOD = 1 << M;

  logic [M-1:0] x, y, s;
  logic         cin;
  int checks = 0, failures = 0;
  int wraps = 0;

  malfg_adder #(.M(M)) dut (.x(x), .y(y), .cin(cin), .s(s));

  task automatic check(input int unsigned xi, input int unsigned yi, input bit ci);
    int unsigned exp;
    x = M'(xi); y = M'(yi); cin = ci;
    #1;
    exp = (xi + yi + ci) % MOD;
    if (xi + yi + ci >= MOD) wraps++;
    checks++;
    if (int'(s) != exp) begin
      failures++;
      $display("FAIL x=%0d y=%0d cin=%0d s=%0d exp=%0d", xi, yi, ci, s, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(0, 0, 1);
    check(MOD-1, 0, 1);
    check(MOD-1, MOD-1, 1);
    check(511, 512, 0);
    check(511, 512, 1);
    for (int i = 0; i < 2000; i++)
      check($urandom_range(MOD-1), $urandom_range(MOD-1), 1'($urandom));
    if (wraps == 0) begin
      failures++;
      $display("FAIL no modulo wrap exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
