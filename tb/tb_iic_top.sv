// tb_iic_top: end-to-end testbench at full size (256x256 cover, 64x64 message).
//
// Generates a smooth 8-bit 256x256 cover image and a 4-bit 64x64 message
// image by formula, then
//   1. runs the transmitter over the whole cover (65,536 pixels, raster
//      order) and the whole message (4,096 pixels), collects the 4,096-bit
//      modulated image and checks every bit and its cycle (16k+35) against a
//      reference model;
//   2. runs the receiver three times, playing the channel between the ends:
//      A) clean cover, clean modulated image;
//      B) clean cover, 30 % of the modulated bits inverted;
//      C) cover with additive noise (MSB flips near mid-grey), clean bits;
//      each pixel is checked against the reference decoder, with its cycle
//      (16k+27) and its serial copy;
//   3. prints how much of the message each pass recovers (informative): exact
//      pixels, the mutual information I(X;Y) in bits between message and
//      decoded pixels, and the symbol error rate p(e) between the cover bit
//      plane and the coded message after the transmitter's phase choice.
// It counts the mechanisms of the design: words from SIPO-1 and SIPO-2,
// modulated 1s and 0s, a saturated (full 16/16) match count, kept and
// complemented substrings, majority decisions that outvoted disagreeing
// copies, and serial output. Each must occur at least once.
module tb_iic_top;
  logic       clk = 1'b0;
  logic       tx_rst_n, rx_rst_n;
  logic [7:0] tx_cover_pix, rx_cover_pix;
  logic [3:0] tx_msg;
  logic       tx_msg_ack, tx_tout, tx_tout_valid;
  logic       rx_tin, rx_t_ack;
  logic [3:0] rx_m;
  logic       rx_m_valid, rx_n, rx_n_valid;
  int         checks = 0, failures = 0;

  iic_top dut (.*);

  always #5 clk = ~clk;

  localparam int CW   = 256;          // cover width and height
  localparam int MW   = 64;           // message width and height
  localparam int NPIX = CW * CW;      // cover pixels = symbols
  localparam int NSUB = MW * MW;      // message pixels = substrings

  logic [7:0] cov[NPIX];
  logic [7:0] cov_noisy[NPIX];
  logic [3:0] msg_img[NSUB];
  logic       tbits[NSUB];            // modulated image from the transmitter
  logic       chan[NSUB];             // modulated image as received

  // mechanism counters
  int n_sipo1 = 0, n_sipo2 = 0, n_t1 = 0, n_t0 = 0, n_sat = 0;
  int n_keep = 0, n_compl = 0, n_outvote = 0, n_serial = 0;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what, input int cyc);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic logic coded_sym(logic [3:0] p, int s);
    return (s < 9) ? p[3] : (s < 14) ? p[2] : (s == 14) ? p[1] : p[0];
  endfunction

  function automatic int agreements(int k);
    int a;
    a = 0;
    for (int s = 0; s < 16; s++) a += int'(cov[16 * k + s][7] == coded_sym(msg_img[k], s));
    return a;
  endfunction

  // mutual information (bits) of a 16x16 joint histogram of n samples
  function automatic real mutual_info(ref int joint[16][16], input int n);
    real px[16], py[16], mi;
    for (int i = 0; i < 16; i++) begin
      px[i] = 0.0;
      py[i] = 0.0;
    end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        px[i] += real'(joint[i][j]) / n;
        py[j] += real'(joint[i][j]) / n;
      end
    mi = 0.0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (joint[i][j] > 0) begin
          real pxy;
          pxy = real'(joint[i][j]) / n;
          mi += pxy * $ln(pxy / (px[i] * py[j])) / $ln(2.0);
        end
    return mi;
  endfunction

  function automatic logic [3:0] decode(ref logic [7:0] c[NPIX], logic t, int k, output int o9, output int o5);
    logic s[16];
    for (int i = 0; i < 16; i++) s[i] = t ? c[16 * k + i][7] : !c[16 * k + i][7];
    o9 = 0;
    o5 = 0;
    for (int i = 0; i < 9; i++)  o9 += int'(s[i]);
    for (int i = 9; i < 14; i++) o5 += int'(s[i]);
    return {o9 >= 5, o5 >= 3, s[14], s[15]};
  endfunction

  // ---------------- transmitter run ----------------
  task automatic run_tx();
    int kmsg, kout, mism;
    mism = 0;
    tx_rst_n = 1'b0;
    repeat (3) @(negedge clk);
    tx_rst_n = 1'b1;
    kmsg = 0;
    kout = 0;
    // the last modulated bit comes in cycle NPIX+19
    for (int cyc = 0; cyc < NPIX + 20; cyc++) begin
      tx_cover_pix = (cyc < NPIX) ? cov[cyc] : 8'h00;
      tx_msg       = (kmsg < NSUB) ? msg_img[kmsg] : 4'h0;
      #1;
      n_sipo1 += int'(dut.u_tx.enable1);
      n_sipo2 += int'(dut.u_tx.enable2);
      if (tx_msg_ack && kmsg < NSUB) begin
        check(cyc == 16 * kmsg + 17, "message pixel k taken in cycle 16k+17", cyc);
        kmsg++;
      end
      if (tx_tout_valid) begin
        int a;
        a = agreements(kout);
        check(kout < NSUB, "no extra modulated bits", cyc);
        check(cyc == 16 * kout + 35, "modulated bit k in cycle 16k+35", cyc);
        check(tx_tout == (a >= 9), $sformatf("modulated bit %0d (%0d agreements)", kout, a), cyc);
        if (a == 16 && dut.u_tx.u_maj.match_cnt == 4'd15 && tx_tout) n_sat++;
        if (kout < NSUB) tbits[kout] = tx_tout;
        mism += tx_tout ? 16 - a : a;
        if (tx_tout) n_t1++;
        else n_t0++;
        kout++;
      end
      @(negedge clk);
    end
    check(kmsg == NSUB, "every message pixel taken", 0);
    check(kout == NSUB, "one modulated bit per message pixel", 0);
    $display("TX: symbol error rate p(e) = %0.4f (%0d of %0d)", real'(mism) / NPIX, mism, NPIX);
    tx_rst_n = 1'b0;
  endtask

  // ---------------- receiver run ----------------
  task automatic run_rx(input string name, ref logic [7:0] c[NPIX]);
    int kt, km, kn, nb, exact, msb_ok;
    int joint[16][16];
    logic [3:0] cur;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) joint[i][j] = 0;
    rx_rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rx_rst_n = 1'b1;
    kt     = 0;
    km     = 0;
    kn     = 0;
    nb     = 0;
    exact  = 0;
    msb_ok = 0;
    // the last pixel is decoded in cycle NPIX+11, its serial copy ends in NPIX+15
    for (int cyc = 0; cyc < NPIX + 16; cyc++) begin
      rx_cover_pix = (cyc < NPIX) ? c[cyc] : 8'h00;
      rx_tin       = (kt < NSUB) ? chan[kt] : 1'b0;
      #1;
      if (rx_t_ack) begin
        if (rx_tin) n_keep++;
        else n_compl++;
        kt++;
      end
      if (rx_m_valid) begin
        int o9, o5;
        logic [3:0] e;
        e = decode(c, chan[km], km, o9, o5);
        check(cyc == 16 * km + 27, "pixel k decoded in cycle 16k+27", cyc);
        check(rx_m == e, $sformatf("%s: pixel %0d = %h, expected %h", name, km, rx_m, e), cyc);
        if ((o9 != 0 && o9 != 9) || (o5 != 0 && o5 != 5)) n_outvote++;
        if (rx_m == msg_img[km]) exact++;
        joint[msg_img[km]][rx_m]++;
        if (rx_m[3:2] == msg_img[km][3:2]) msb_ok++;
        km++;
      end
      if (rx_n_valid) begin
        int o9, o5;
        cur = decode(c, chan[kn], kn, o9, o5);
        check(rx_n == cur[3 - nb], "serial pixel bit", cyc);
        n_serial++;
        nb++;
        if (nb == 4) begin
          nb = 0;
          kn++;
        end
      end
      @(negedge clk);
    end
    check(kt == NSUB && km == NSUB && kn == NSUB, $sformatf("%s: all pixels decoded", name), 0);
    $display("%s: %0d of %0d pixels exact, %0d with both upper bits right, I(X;Y) = %0.3f bits",
             name, exact, NSUB, msb_ok, mutual_info(joint, NSUB));
    rx_rst_n = 1'b0;
  endtask

  initial begin
    int flips;
    // smooth cover: sum of two slow ramps and a product term, 0..255
    for (int y = 0; y < CW; y++)
      for (int x = 0; x < CW; x++)
        cov[y * CW + x] = 8'((x * x) / 200 + (y * 3) / 2 + (x * y) / 300 + 40 * ((x / 64 + y / 48) % 2));
    // distorted cover: additive noise of up to +-12 grey levels, clipped
    for (int i = 0; i < NPIX; i++) begin
      int v;
      v = int'(cov[i]) + int'($urandom % 25) - 12;
      cov_noisy[i] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
    end
    // message: a nearly two-level logo (as low-entropy as the messages the
    // scheme is meant for): a white disc and a light-grey bar on black
    for (int y = 0; y < MW; y++)
      for (int x = 0; x < MW; x++)
        msg_img[y * MW + x] = ((x - 32) * (x - 32) + (y - 28) * (y - 28) < 300) ? 4'd15 :
                              (y >= 52 && y < 58 && x >= 8 && x < 56)       ? 4'd12 : 4'd0;

    begin
      int hist[16][16];
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) hist[i][j] = 0;
      for (int k = 0; k < NSUB; k++) hist[msg_img[k]][msg_img[k]]++;
      $display("message entropy H(X) = %0.3f bits", mutual_info(hist, NSUB));
    end

    tx_rst_n     = 1'b0;
    rx_rst_n     = 1'b0;
    tx_cover_pix = '0;
    rx_cover_pix = '0;
    tx_msg       = '0;
    rx_tin       = 1'b0;

    run_tx();

    for (int k = 0; k < NSUB; k++) chan[k] = tbits[k];
    run_rx("A clean", cov);

    flips = 0;
    for (int k = 0; k < NSUB; k++) begin
      chan[k] = tbits[k];
      if ($urandom % 10 < 3) begin
        chan[k] = !tbits[k];
        flips++;
      end
    end
    $display("B: %0d of %0d modulated bits inverted", flips, NSUB);
    run_rx("B 30% channel noise", cov);

    for (int k = 0; k < NSUB; k++) chan[k] = tbits[k];
    run_rx("C noisy cover", cov_noisy);

    $display("mechanisms: sipo1=%0d sipo2=%0d tout1=%0d tout0=%0d saturated=%0d keep=%0d complement=%0d outvoted=%0d serial=%0d",
             n_sipo1, n_sipo2, n_t1, n_t0, n_sat, n_keep, n_compl, n_outvote, n_serial);
    check(n_sipo1 > 0, "SIPO-1 words", 0);
    check(n_sipo2 > 0, "SIPO-2 words", 0);
    check(n_t1 > 0, "in-phase substrings", 0);
    check(n_t0 > 0, "out-of-phase substrings", 0);
    check(n_sat > 0, "full 16-symbol match (counter held at 15)", 0);
    check(n_keep > 0, "kept substrings in the receiver", 0);
    check(n_compl > 0, "complemented substrings in the receiver", 0);
    check(n_outvote > 0, "majority decisions over disagreeing copies", 0);
    check(n_serial > 0, "serial pixel output", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
