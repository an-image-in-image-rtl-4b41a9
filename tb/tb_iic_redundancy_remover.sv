// tb_iic_redundancy_remover: self-checking testbench of the majority decoder.
//
// Loads a random 16-bit string every 16 cycles (with the 9- and 5-symbol
// parts biased to give counts near the thresholds) and checks that m_valid
// is high exactly 10 cycles after each load, that m[3] is 1 iff at least 5 of
// f[15:7] are 1, m[2] iff at least 3 of f[6:2] are 1, and m[1:0] = f[1:0].
module tb_iic_redundancy_remover;
  logic        clk = 1'b0;
  logic        rst_n, load;
  logic [15:0] f;
  logic [3:0]  m;
  logic        m_valid;
  int          checks = 0, failures = 0;

  iic_redundancy_remover dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  localparam int NSUB = 60;
  logic [3:0] exp_m[NSUB];

  initial begin
    int k;
    rst_n = 1'b0;
    load  = 1'b0;
    f     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    k = 0;
    for (int cyc = 0; cyc < 16 * NSUB + 30; cyc++) begin
      load = (cyc >= 3 && (cyc - 3) % 16 == 0 && k < NSUB);
      f    = 16'($urandom);
      if (load) begin
        int o9, o5;
        o9 = 0;
        o5 = 0;
        for (int b = 7; b < 16; b++) o9 += int'(f[b]);
        for (int b = 2; b < 7; b++)  o5 += int'(f[b]);
        exp_m[k] = {o9 >= 5, o5 >= 3, f[1], f[0]};
      end
      #1;
      if (cyc >= 13 && (cyc - 13) % 16 == 0 && (cyc - 13) / 16 < NSUB) begin
        int j;
        j = (cyc - 13) / 16;
        check(m_valid, "m_valid 10 cycles after load", cyc);
        check(m == exp_m[j], $sformatf("decoded %h expected %h", m, exp_m[j]), cyc);
      end else begin
        check(!m_valid, "no m_valid outside decision cycles", cyc);
      end
      if (load) k++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
