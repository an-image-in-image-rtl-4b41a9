// tb_iic_receiver: self-checking testbench of the receiver.
//
// Streams a random cover bit plane and random modulated bits (on the
// tin/t_ack handshake). For substring k the reference keeps the cover
// symbols 16k..16k+15 when bit k is 1 and inverts them when it is 0, then
// decodes bit 3 as the majority (>= 5) of symbols 0..8, bit 2 as the
// majority (>= 3) of symbols 9..13, bit 1 = symbol 14 and bit 0 = symbol 15.
// Checks m in cycle 16k+27 and the serial copy on n, MSB first, in cycles
// 16k+28..16k+31.
module tb_iic_receiver;
  logic       clk = 1'b0;
  logic       rst_n, din, tin;
  logic       t_ack;
  logic [3:0] m;
  logic       m_valid, n, n_valid;
  int         checks = 0, failures = 0;

  iic_receiver dut (.*);

  always #5 clk = ~clk;

  localparam int NSUB = 64;
  localparam int NSYM = 16 * NSUB;
  logic       cov[NSYM];
  logic       tbits[NSUB];

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

  function automatic logic [3:0] ref_pix(int k);
    int   o9, o5;
    logic s[16];
    for (int i = 0; i < 16; i++) s[i] = tbits[k] ? cov[16 * k + i] : !cov[16 * k + i];
    o9 = 0;
    o5 = 0;
    for (int i = 0; i < 9; i++)  o9 += int'(s[i]);
    for (int i = 9; i < 14; i++) o5 += int'(s[i]);
    return {o9 >= 5, o5 >= 3, s[14], s[15]};
  endfunction

  initial begin
    int kt, km, kn, nb;
    logic [3:0] cur;
    for (int i = 0; i < NSYM; i++) cov[i] = 1'($urandom);
    for (int k = 0; k < NSUB; k++) tbits[k] = 1'($urandom);
    rst_n = 1'b0;
    din   = 1'b0;
    tin   = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    kt = 0;
    km = 0;
    kn = 0;
    nb = 0;
    cur = '0;
    for (int cyc = 0; cyc < NSYM + 40; cyc++) begin
      din = (cyc < NSYM) ? cov[cyc] : 1'b0;
      tin = (kt < NSUB) ? tbits[kt] : 1'b0;
      #1;
      if (t_ack) begin
        check(cyc == 16 * kt + 17, "modulated bit taken in cycle 16k+17", cyc);
        kt++;
      end
      if (m_valid && km < NSUB) begin
        check(cyc == 16 * km + 27, "pixel k decoded in cycle 16k+27", cyc);
        check(m == ref_pix(km), $sformatf("pixel %0d: %h expected %h", km, m, ref_pix(km)), cyc);
        km++;
      end
      if (n_valid && kn < NSUB) begin
        cur = ref_pix(kn);
        check(cyc == 16 * kn + 28 + nb, "serial bit timing", cyc);
        check(n == cur[3 - nb], "serial pixel bit", cyc);
        nb++;
        if (nb == 4) begin
          nb = 0;
          kn++;
        end
      end
      @(negedge clk);
    end
    check(km == NSUB && kn == NSUB, "all pixels decoded", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
