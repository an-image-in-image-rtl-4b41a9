// tb_iic_transmitter: self-checking testbench of the transmitter.
//
// Streams a cover bit plane made of random runs (like the MSB plane of a
// natural image) and a random message, pixel by pixel on the msg/msg_ack
// handshake. The reference computes, for substring k, the number of
// positions where cover symbols 16k..16k+15 agree with the repetition-coded
// pixel k (bit 3 on symbols 0..8, bit 2 on 9..13, bit 1 on 14, bit 0 on 15)
// and expects tout = 1 iff at least 9 agree. Each tout_valid must come in
// cycle 16k+35, i.e. one modulated bit per 16 cycles.
module tb_iic_transmitter;
  logic       clk = 1'b0;
  logic       rst_n, din;
  logic [3:0] msg;
  logic       msg_ack, tout, tout_valid;
  int         checks = 0, failures = 0;

  iic_transmitter dut (.*);

  always #5 clk = ~clk;

  localparam int NSUB = 64;
  localparam int NSYM = 16 * NSUB;
  logic       cov[NSYM];
  logic [3:0] pix[NSUB];
  int         n_one = 0, n_zero = 0;

  initial begin
    #200000;
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

  function automatic logic ref_tout(int k);
    int agree;
    agree = 0;
    for (int s = 0; s < 16; s++) begin
      logic c;
      c = (s < 9) ? pix[k][3] : (s < 14) ? pix[k][2] : (s == 14) ? pix[k][1] : pix[k][0];
      agree += int'(cov[16 * k + s] == c);
    end
    return agree >= 9;
  endfunction

  initial begin
    int kmsg, kout;
    logic b;
    b = 1'b0;
    for (int i = 0; i < NSYM; i++) begin
      if ($urandom % 6 == 0) b = ~b;
      cov[i] = b;
    end
    for (int k = 0; k < NSUB; k++) pix[k] = 4'($urandom);
    rst_n = 1'b0;
    din   = 1'b0;
    msg   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    kmsg = 0;
    kout = 0;
    for (int cyc = 0; cyc < NSYM + 40; cyc++) begin
      din = (cyc < NSYM) ? cov[cyc] : 1'b0;
      msg = (kmsg < NSUB) ? pix[kmsg] : 4'h0;
      #1;
      if (msg_ack) begin
        check(cyc == 16 * kmsg + 17, "message pixel taken in cycle 16k+17", cyc);
        kmsg++;
      end
      if (tout_valid && kout < NSUB) begin
        check(cyc == 16 * kout + 35, "modulated bit k in cycle 16k+35", cyc);
        check(tout == ref_tout(kout), $sformatf("modulated bit %0d", kout), cyc);
        if (tout) n_one++;
        else n_zero++;
        kout++;
      end
      @(negedge clk);
    end
    check(kout == NSUB, "all modulated bits produced", 0);
    check(n_one > 0 && n_zero > 0, "both in-phase and out-of-phase substrings seen", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
