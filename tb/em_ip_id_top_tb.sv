// em_ip_id_top_tb: end-to-end test of the IP-identity salware at its
// default sizes (16-bit ID, BFSK ring N = 6 / K = 10, on-off ring K = 6).
//
// The testbench plays the outside ID checker: it raises a channel's enable,
// recovers the bits from the radiating ring node with an edge-counting
// receiver (one window per shift-register clock) and compares them with the
// identity 0101000111110011 written out here.
//   1. Both channels idle: no carrier may appear.
//   2. BFSK channel at 1 Mbps for two whole words: a bit is 1 when the
//      window holds fewer edges than the midpoint of f0 and f1; the first
//      word must be complete 16 us after enable, well inside 500 us.
//   3. On-off channel at 1, 2, 4 and 16 Mbps, one word each, re-enabled for
//      each rate: a bit is 1 when the window holds at least half the edges
//      of a full f0 bit.
//   4. Both channels together at 1 Mbps for one word.
// Every mechanism is counted (silence while disabled, f0 and f1 bits,
// carrier on and off bits, word wrap-around, restart at bit 0 after a new
// enable, bit-rate changes) and one that never happened is a failure.
module em_ip_id_top_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [15:0] ID = 16'b0101_0001_1111_0011;
  // Carrier periods of the default rings, from their gate delays.
  localparam longint unsigned P_F0_BFSK = 2 * (247 + 6 * 247);    // 289 MHz
  localparam longint unsigned P_F1_BFSK = 2 * (247 + 16 * 247);   // 119 MHz
  localparam longint unsigned P_F0_OOK  = 2 * (136 + 6 * 247);    // 309 MHz

  int checks = 0, failures = 0;
  int n_silent = 0, n_f0 = 0, n_f1 = 0, n_on = 0, n_off = 0;
  int n_wrap = 0, n_restart = 0, n_rate = 0;

  longint unsigned half_clk_ps = 500_000;   // 1 MHz: 1 Mbps
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable_bfsk = 1'b0, enable_ook = 1'b0;
  logic em_bfsk, em_ook, id_bit_bfsk, id_bit_ook, id_first_bfsk, id_first_ook;

  always #(half_clk_ps) clk = ~clk;

  em_ip_id_top dut (
    .clk(clk), .rst_n(rst_n),
    .enable_bfsk(enable_bfsk), .enable_ook(enable_ook),
    .em_bfsk(em_bfsk), .em_ook(em_ook),
    .id_bit_bfsk(id_bit_bfsk), .id_bit_ook(id_bit_ook),
    .id_first_bfsk(id_first_bfsk), .id_first_ook(id_first_ook)
  );

  int unsigned     cnt_bfsk, cnt_ook;
  longint unsigned per_bfsk, per_ook;
  em_edge_demod u_rx_bfsk (.win_clk(clk), .rf(em_bfsk), .count(cnt_bfsk), .period_ps(per_bfsk));
  em_edge_demod u_rx_ook  (.win_clk(clk), .rf(em_ook),  .count(cnt_ook),  .period_ps(per_ook));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decide one bit from a window's edge count.
  function automatic bit bfsk_bit(int unsigned edges, longint unsigned bit_ps);
    // 1 (f1) when below the midpoint of the f0 and f1 edge counts.
    return edges * 2 < (bit_ps / P_F0_BFSK + bit_ps / P_F1_BFSK);
  endfunction

  function automatic bit ook_bit(int unsigned edges, longint unsigned bit_ps);
    return edges * 2 >= bit_ps / P_F0_OOK;
  endfunction

  // Receive n_bits from the channels that are enabled, starting at the
  // first bit of a word. Call at (or 1 ps after) the clock edge at which
  // that bit went onto the transmitter; returns 1 ps after the last edge.
  task automatic receive(input int n_bits, input bit use_bfsk, input bit use_ook);
    longint unsigned bit_ps = 2 * half_clk_ps;
    bit got;
    #1;
    if (use_bfsk) check(id_first_bfsk, "BFSK first_bit at the start of a word");
    if (use_ook)  check(id_first_ook, "OOK first_bit at the start of a word");
    for (int b = 0; b < n_bits; b++) begin
      int idx = b % 16;
      if (b > 0 && idx == 0) n_wrap++;
      @(posedge clk);
      #1;
      if (use_bfsk) begin
        got = bfsk_bit(cnt_bfsk, bit_ps);
        check(got == ID[15 - idx], $sformatf("BFSK bit %0d: %0d edges read as %b", b, cnt_bfsk, got));
        if (got) n_f1++; else n_f0++;
        check(id_first_bfsk == ((b + 1) % 16 == 0), $sformatf("BFSK first_bit after bit %0d", b));
      end
      if (use_ook) begin
        got = ook_bit(cnt_ook, bit_ps);
        check(got == ID[15 - idx], $sformatf("OOK %0d ps bit %0d: %0d edges read as %b",
                                             bit_ps, b, cnt_ook, got));
        if (got) n_on++; else n_off++;
        check(id_first_ook == ((b + 1) % 16 == 0), $sformatf("OOK first_bit after bit %0d", b));
      end
    end
  endtask

  task automatic expect_silence(input longint unsigned span_ps);
    int unsigned e_b = u_rx_bfsk.edges, e_o = u_rx_ook.edges;
    #(span_ps);
    check(u_rx_bfsk.edges == e_b && u_rx_ook.edges == e_o, "carrier while disabled");
    if (u_rx_bfsk.edges == e_b && u_rx_ook.edges == e_o) n_silent++;
  endtask

  initial begin : stim
    longint unsigned t_en;
    longint unsigned rates_mbps [4] = '{1, 2, 4, 16};

    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. Idle device.
    expect_silence(5_000_000);

    // 2. BFSK identity, two words at 1 Mbps.
    @(posedge clk);
    enable_bfsk <= 1'b1;
    t_en = longint'($time);
    n_restart++;
    receive(16, 1'b1, 1'b0);
    check(longint'($time) - 1 - t_en == 16 * 2 * half_clk_ps,
          $sformatf("one word took %0d ps", longint'($time) - 1 - t_en));
    check(longint'($time) - t_en < 500_000_000, "identification within 500 us");
    receive(16, 1'b1, 1'b0);
    n_wrap++;                  // second call started on a new word
    check(per_bfsk == P_F0_BFSK || per_bfsk == P_F1_BFSK,
          $sformatf("BFSK carrier period %0d ps", per_bfsk));
    @(posedge clk);
    enable_bfsk <= 1'b0;
    #(P_F1_BFSK);
    expect_silence(3_000_000);

    // 3. On-off identity at each data rate, re-enabled for each.
    foreach (rates_mbps[r]) begin
      if (2 * half_clk_ps != 1_000_000 / rates_mbps[r]) begin
        half_clk_ps = 500_000 / rates_mbps[r];
        n_rate++;
      end
      repeat (2) @(posedge clk);
      enable_ook <= 1'b1;
      n_restart++;
      receive(16, 1'b0, 1'b1);
      @(posedge clk);
      enable_ook <= 1'b0;
      #(P_F0_OOK);
      expect_silence(2_000_000);
    end
    check(per_ook == P_F0_OOK, $sformatf("on-off carrier period %0d ps", per_ook));

    // 4. Both channels at once, 1 Mbps.
    half_clk_ps = 500_000;
    n_rate++;
    repeat (2) @(posedge clk);
    enable_bfsk <= 1'b1;
    enable_ook  <= 1'b1;
    n_restart++;
    receive(16, 1'b1, 1'b1);
    @(posedge clk);
    enable_bfsk <= 1'b0;
    enable_ook  <= 1'b0;
    #(P_F1_BFSK);
    expect_silence(2_000_000);

    $display("mechanisms: silent=%0d f0=%0d f1=%0d on=%0d off=%0d wrap=%0d restart=%0d rate=%0d",
             n_silent, n_f0, n_f1, n_on, n_off, n_wrap, n_restart, n_rate);
    check(n_silent > 0, "disabled silence never checked");
    check(n_f0 > 0, "no f0 bit");
    check(n_f1 > 0, "no f1 bit");
    check(n_on > 0, "no carrier-on bit");
    check(n_off > 0, "no carrier-off bit");
    check(n_wrap > 0, "no word wrap-around");
    check(n_restart > 1, "no restart after a new enable");
    check(n_rate > 0, "no bit-rate change");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
