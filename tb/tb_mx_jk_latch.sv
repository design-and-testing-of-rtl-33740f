// tb_mx_jk_latch -- self-check of the JK latch.
// J and K are set at random while E = 0; the next-state value on gate 3's R
// output (garbage[5]) is then compared with J.Q' + K'.Q. Unless J = K = 1
// (which would make the level-sensitive loop oscillate), E is pulsed and Q
// and Q' are compared with the behavioural next state. Q must not move while
// E = 0.
`timescale 1ns/1ps
module tb_mx_jk_latch;
  logic e = 0, j = 0, k = 0;  // E = 1 with J = K = 1 at power-up would oscillate
  logic q, qn;
  logic [6:0] g;
  logic model;
  int checks = 0, failures = 0, toggles_seen = 0;

  mx_jk_latch dut (.e(e), .j(j), .k(k), .q(q), .qn(qn), .garbage(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (e=%0b j=%0b k=%0b q=%0b qn=%0b model=%0b)", what, e, j, k, q, qn, model); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 0; j = 0; k = 1; #1; e = 1; #1; e = 0; #1; model = 0;   // reset through K
    check(q == 0 && qn == 1, "reset");
    for (int i = 0; i < 300; i++) begin
      logic nxt;
      j = 1'($urandom_range(1)); k = 1'($urandom_range(1)); #1;
      nxt = (j & ~model) | (~k & model);
      check(q == model && qn == ~model, "hold while E = 0");
      check(g[5] == nxt, "next state J.Q' + K'.Q");
      if (j & k) toggles_seen++;
      else begin
        e = 1; #1; model = nxt;
        check(q == model && qn == ~model, "update while E = 1");
        e = 0; #1;
      end
    end
    check(toggles_seen > 0, "toggle next state exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
