// tb_iic_redundancy_intro: self-checking testbench of the repetition coder.
//
// Presents all 16 message pixels (and random ones) with take pulses at
// random times. After each take, f must hold the coded pixel until the next
// take: positions 15..7 carry bit 3, positions 6..2 bit 2, position 1 bit 1
// and position 0 bit 0, and the word has 9*m[3] + 5*m[2] + m[1] + m[0] ones.
// m changes every cycle, so a coder that does not hold f fails.
module tb_iic_redundancy_intro;
  logic        clk = 1'b0;
  logic        rst_n, take;
  logic [3:0]  m;
  logic [15:0] f;
  int          checks = 0, failures = 0;

  iic_redundancy_intro dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] held;
    int         ntake;
    rst_n = 1'b0;
    take  = 1'b0;
    m     = '0;
    held  = '0;
    ntake = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      take = ($urandom % 3 == 0);
      m    = (take && ntake < 16) ? 4'(ntake) : 4'($urandom);
      #1;
      for (int b = 0; b < 16; b++) begin
        logic e;
        if (b >= 7)      e = held[3];
        else if (b >= 2) e = held[2];
        else if (b == 1) e = held[1];
        else             e = held[0];
        checks++;
        if (f[b] !== e) begin
          failures++;
          $display("FAIL cycle %0d: pixel %0d bit %0d", cyc, held, b);
        end
      end
      checks++;
      if ($countones(f) != 9 * held[3] + 5 * held[2] + held[1] + held[0]) begin
        failures++;
        $display("FAIL cycle %0d: pixel %0d weight %0d", cyc, held, $countones(f));
      end
      if (take) begin
        held = m;
        ntake++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
