// tb_iic_ctrl: self-checking testbench of the ping-pong control circuit.
//
// Streams random symbols for 200 cycles after reset and compares every cycle
// with a reference built from the cycle number alone: din goes to SIPO-1 in
// counts 0..15 and to SIPO-2 in counts 16..31, enable1 is high at count 16,
// enable2 at count 0 (not right after reset), load at counts 1 and 17 (not
// at the first count 1), sel_d1 equals count >= 16. It also checks the
// period of enable1/enable2 (32 cycles) and of load (16 cycles).
module tb_iic_ctrl;
  logic       clk = 1'b0;
  logic       rst_n, din;
  logic       din1, din2, enable1, enable2, sel_d1, load;
  logic [4:0] phase;
  int         checks = 0, failures = 0;
  int         n_en1 = 0, n_en2 = 0, n_load = 0;

  iic_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what, input int cyc);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    int c;
    rst_n = 1'b0;
    din   = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 200; cyc++) begin
      din = 1'($urandom);
      #1;
      c = cyc % 32;
      check(din1 == (din && c < 16), "din1 steering", cyc);
      check(din2 == (din && c >= 16), "din2 steering", cyc);
      check(enable1 == (c == 16), "enable1 at count 16", cyc);
      check(enable2 == (c == 0 && cyc > 0), "enable2 from delayed terminal count", cyc);
      check(load == (c == 17 || (c == 1 && cyc > 1)), "load one cycle after an enable", cyc);
      check(sel_d1 == (c >= 16), "mux select", cyc);
      check(phase == 5'(c), "counter value", cyc);
      n_en1  += int'(enable1);
      n_en2  += int'(enable2);
      n_load += int'(load);
      @(negedge clk);
    end
    // 200 cycles: enable1 at 16,48,...,176 (6); enable2 at 32,...,192 (6);
    // load at 17,33,...,193 (12)
    check(n_en1 == 6, "enable1 count", 200);
    check(n_en2 == 6, "enable2 count", 200);
    check(n_load == 12, "load count (one word per 16 cycles)", 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
