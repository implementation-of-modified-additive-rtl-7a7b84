// tb_malfg_lc_tree: self-checking test of the logical circuit (XOR tree).
//
// For widths 10 (the generator's word) and 20 (the widest printed example of
// the XOR network) it applies every single-bit control code, the codes
// 0 .. 2^(S+1)-1 that select bits b_0 .. b_S, and random b/c pairs, and
// compares a with the parity of (b & c) counted bit by bit in the testbench.
module tb_malfg_lc_tree;
  logic [9:0]  b10, c10;
  logic [19:0] b20, c20;
  logic        a10, a20;
  int checks = 0, failures = 0;

  malfg_lc_tree #(.W(10)) dut10 (.b(b10), .c(c10), .a(a10));
  malfg_lc_tree #(.W(20)) dut20 (.b(b20), .c(c20), .a(a20));

  function automatic bit parity(input logic [19:0] v, input int w);
    int n = 0;
    for (int k = 0; k < w; k++) if (v[k]) n++;
    return bit'(n % 2);
  endfunction

  task automatic check(input logic [19:0] b, input logic [19:0] c);
    bit e10, e20;
    b10 = b[9:0]; c10 = c[9:0]; b20 = b; c20 = c;
    #1;
    e10 = parity(b & c, 10);
    e20 = parity(b & c, 20);
    checks += 2;
    if (a10 != e10) begin failures++; $display("FAIL W=10 b=%h c=%h a=%0d", b10, c10, a10); end
    if (a20 != e20) begin failures++; $display("FAIL W=20 b=%h c=%h a=%0d", b20, c20, a20); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20; k++) begin
      check(20'(1) << k, 20'(1) << k);
      check(20'hFFFFF, 20'(1) << k);
      check(20'hFFFFF ^ (20'(1) << k), 20'hFFFFF);
    end
    for (int s = 0; s < 20; s++) check(20'($urandom), (20'(1) << (s + 1)) - 1);
    for (int i = 0; i < 2000; i++) check(20'($urandom), 20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
