// tb_iic_sipo: self-checking testbench of the SIPO with output register.
//
// Shifts a random stream in and pulses en at irregular times; after each
// pulse the output must equal the 16 symbols received before the pulse cycle,
// the oldest in bit 15, and must hold until the next pulse.
module tb_iic_sipo;
  logic        clk = 1'b0;
  logic        rst_n, sin, en;
  logic [15:0] q;
  logic [15:0] hist;      // last 16 symbols, newest in bit 0
  logic [15:0] expect_q;
  int          checks = 0, failures = 0;

  iic_sipo dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    sin      = 1'b0;
    en       = 1'b0;
    hist     = '0;
    expect_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      sin = 1'($urandom);
      en  = (cyc % 16 == 0 && cyc > 0) || ($urandom % 23 == 0);
      #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", cyc, q, expect_q);
      end
      if (en) expect_q = hist;
      hist = {hist[14:0], sin};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
