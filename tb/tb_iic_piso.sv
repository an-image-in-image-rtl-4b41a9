// tb_iic_piso: self-checking testbench of the PISO (16-bit and 4-bit).
//
// Loads random words back to back (every W cycles) and with gaps, and checks
// that sout shows d[W-1] first, one bit per cycle, that active is high for
// exactly W cycles after a load and that the register is zero-filled.
module tb_iic_piso;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        load16, load4;
  logic [15:0] d16;
  logic [3:0]  d4;
  logic        s16, a16, s4, a4;
  int          checks = 0, failures = 0;

  iic_piso #(.W(16)) dut16 (.clk, .rst_n, .load(load16), .d(d16), .sout(s16), .active(a16));
  iic_piso #(.W(4))  dut4  (.clk, .rst_n, .load(load4),  .d(d4),  .sout(s4),  .active(a4));

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

  initial begin
    logic [15:0] w16;
    logic [3:0]  w4;
    int          pos16, pos4;   // bit index due next, -1 = idle
    int          next16, next4;
    rst_n  = 1'b0;
    load16 = 1'b0;
    load4  = 1'b0;
    d16    = '0;
    d4     = '0;
    w16    = '0;
    w4     = '0;
    pos16  = -1;
    pos4   = -1;
    next16 = 3;
    next4  = 2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      load16 = (cyc == next16);
      load4  = (cyc == next4);
      d16    = 16'($urandom);
      d4     = 4'($urandom);
      #1;
      check(a16 == (pos16 >= 0), "active (16)", cyc);
      check(s16 == (pos16 >= 0 ? w16[pos16] : 1'b0), "sout (16)", cyc);
      check(a4 == (pos4 >= 0), "active (4)", cyc);
      check(s4 == (pos4 >= 0 ? w4[pos4] : 1'b0), "sout (4)", cyc);
      if (pos16 >= 0) pos16--;
      if (pos4 >= 0) pos4--;
      if (load16) begin
        w16    = d16;
        pos16  = 15;
        next16 = cyc + 16 + (($urandom % 3 == 0) ? int'($urandom % 20) : 0);
      end
      if (load4) begin
        w4    = d4;
        pos4  = 3;
        next4 = cyc + 4 + (($urandom % 2 == 0) ? int'($urandom % 9) : 0);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
