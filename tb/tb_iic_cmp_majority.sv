// tb_iic_cmp_majority: self-checking testbench of the comparator and
// majority encoder.
//
// Loads a (d, f) pair every 16 cycles, as the control circuit does, with f
// chosen to give every match count from 0 to 16 (8 and 9 straddle the
// threshold; 16 tests the full match). For each substring loaded in cycle L,
// tout_valid must be high exactly in cycle L+17, tout must be 1 iff at least
// 9 of the 16 positions agree, and match_cnt must equal the number of
// matches (held at 15 for a full match). tout_valid must be low otherwise.
module tb_iic_cmp_majority;
  logic        clk = 1'b0;
  logic        rst_n, load;
  logic [15:0] d, f;
  logic        tout, tout_valid;
  logic [3:0]  match_cnt;
  int          checks = 0, failures = 0;
  int          n_valid = 0;

  iic_cmp_majority dut (.*);

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

  // word with exactly n positions equal to w
  function automatic logic [15:0] with_matches(logic [15:0] w, int n);
    logic [15:0] r;
    int          perm[16];
    r = ~w;
    for (int i = 0; i < 16; i++) perm[i] = i;
    for (int i = 15; i > 0; i--) begin
      int j, t;
      j       = int'($urandom % (i + 1));
      t       = perm[i];
      perm[i] = perm[j];
      perm[j] = t;
    end
    for (int i = 0; i < n; i++) r[perm[i]] = w[perm[i]];
    return r;
  endfunction

  localparam int NSUB = 40;
  int exp_cnt[NSUB];

  initial begin
    int k;
    rst_n = 1'b0;
    load  = 1'b0;
    d     = '0;
    f     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    k = 0;
    for (int cyc = 0; cyc < 16 * NSUB + 40; cyc++) begin
      // loads at cycles 5, 21, 37, ...
      load = (cyc >= 5 && (cyc - 5) % 16 == 0 && k < NSUB);
      if (load) begin
        int n;
        n          = (k < 17) ? k : int'($urandom % 17);
        d          = 16'($urandom);
        f          = with_matches(d, n);
        exp_cnt[k] = n;
      end else begin
        d = 16'($urandom);   // d and f only matter while load is high
        f = 16'($urandom);
      end
      #1;
      if (cyc >= 22 && (cyc - 22) % 16 == 0 && (cyc - 22) / 16 < NSUB) begin
        int j;
        j = (cyc - 22) / 16;
        check(tout_valid, "tout_valid 17 cycles after load", cyc);
        check(tout == (exp_cnt[j] >= 9), $sformatf("tout for %0d matches", exp_cnt[j]), cyc);
        check(match_cnt == 4'((exp_cnt[j] > 15) ? 15 : exp_cnt[j]), "match count", cyc);
      end else begin
        check(!tout_valid, "no tout_valid outside decision cycles", cyc);
      end
      n_valid += int'(tout_valid);
      if (load) k++;
      @(negedge clk);
    end
    check(n_valid == NSUB, "one decision per substring", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
