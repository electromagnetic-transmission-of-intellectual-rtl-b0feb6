// bfsk_table1_tb: the BFSK transmitter over the whole resource sweep of its
// characterisation table, N = 0..4 and K = 1..5 on a flash-based FPGA.
//
// Twenty-five transmitters are built side by side with gate delays fitted
// to that FPGA (1299 ps for NAND plus multiplexer, 700 ps per delay
// element; the fit is this testbench's own, the table gives frequencies
// only). For each size the testbench checks that the carrier periods for
// data 0 and data 1 are exactly those of the ring's structure, that f0
// depends on N only and falls as N grows, that f1 is below f0 and falls as
// K grows, and that both lie within 15 % of the measured table values (the
// measurements also depend on placement, which the model does not see).
module bfsk_table1_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T_G = 1299, T_D = 700;

  // Measured frequencies in MHz, [N][K-1].
  localparam int unsigned F0_MHZ [5][5] = '{
    '{385, 383, 384, 385, 381}, '{272, 272, 270, 271, 269}, '{168, 169, 169, 168, 168},
    '{146, 147, 146, 145, 144}, '{123, 121, 122, 121, 119}};
  localparam int unsigned F1_MHZ [5][5] = '{
    '{280, 210, 151, 130, 111}, '{189, 156, 120, 106, 93}, '{144, 124, 100, 91, 79},
    '{128, 112, 92, 84, 74}, '{110, 98, 83, 77, 70}};

  int checks = 0, failures = 0;

  logic enable = 1'b0, data = 1'b0, win = 1'b0;
  logic            ro  [5][5];
  int unsigned     cnt [5][5];
  longint unsigned per [5][5];

  for (genvar n = 0; n < 5; n++) begin : g_n
    for (genvar k = 1; k <= 5; k++) begin : g_k
      bfsk_transmitter #(.N(n), .K(k), .T_NAND_PS(650), .T_MUX_PS(649), .T_DELAY_PS(T_D))
        u_tx (.enable(enable), .data(data), .ro_out(ro[n][k-1]));
      em_edge_demod u_rx (.win_clk(win), .rf(ro[n][k-1]), .count(cnt[n][k-1]),
                          .period_ps(per[n][k-1]));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near_table(real mhz, int unsigned ref_mhz, real tol);
    return mhz > real'(ref_mhz) * (1.0 - tol) && mhz < real'(ref_mhz) * (1.0 + tol);
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    longint unsigned p0 [5][5], p1 [5][5];
    #10_000;
    enable = 1'b1;
    #100_000;
    foreach (per[n, k]) p0[n][k] = per[n][k];
    data = 1'b1;
    #100_000;
    foreach (per[n, k]) p1[n][k] = per[n][k];

    foreach (p0[n, k]) begin
      real m0, m1;
      m0 = 1.0e6 / real'(p0[n][k]);
      m1 = 1.0e6 / real'(p1[n][k]);
      $display("N=%0d K=%0d  f0 %6.1f MHz (table %0d)  f1 %6.1f MHz (table %0d)",
               n, k + 1, m0, F0_MHZ[n][k], m1, F1_MHZ[n][k]);
      check(p0[n][k] == 64'(2 * (T_G + n * T_D)), $sformatf("N=%0d K=%0d f0 period", n, k + 1));
      check(p1[n][k] == 64'(2 * (T_G + (n + k + 1) * T_D)), $sformatf("N=%0d K=%0d f1 period", n, k + 1));
      check(p1[n][k] > p0[n][k], $sformatf("N=%0d K=%0d f1 below f0", n, k + 1));
      check(p0[n][k] == p0[n][0], $sformatf("N=%0d: f0 must not depend on K", n));
      if (n > 0) check(p0[n][k] > p0[n-1][k], $sformatf("f0 must fall with N (N=%0d)", n));
      if (k > 0) check(p1[n][k] > p1[n][k-1], $sformatf("f1 must fall with K (N=%0d K=%0d)", n, k + 1));
      check(near_table(m0, F0_MHZ[n][k], 0.15), $sformatf("N=%0d K=%0d f0 off the table", n, k + 1));
      check(near_table(m1, F1_MHZ[n][k], 0.15), $sformatf("N=%0d K=%0d f1 off the table", n, k + 1));
    end

    // Disabled again: every ring stops.
    enable = 1'b0;
    #20_000;
    win = 1'b1;
    #50_000;
    win = 1'b0;
    #10;
    win = 1'b1;
    #1;
    foreach (cnt[n, k]) check(cnt[n][k] == 0, $sformatf("N=%0d K=%0d still runs", n, k + 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
