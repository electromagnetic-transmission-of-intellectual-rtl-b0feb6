// ook_transmitter_tb: checks the on-off ring-oscillator model.
//
// The prototype size (K = 6) and a second size (K = 3) are exercised. The
// ring must be silent while disabled, and also while enabled with data 0;
// with enable and data at 1 it must run at the period worked out here from
// the gate delays, within 1 % of 309 MHz for K = 6. It must start within
// one period of data rising and stop, resting at 0 on its output node,
// within one trip of data falling. The ID pattern is then sent at 1, 2, 4
// and 16 Mbps and each bit window must hold the expected edge count: about
// f0 / rate for a 1 and none for a 0.
module ook_transmitter_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TD = 247, TN = 68, TM = 68;
  localparam longint unsigned P_A = 64'(2 * (TN + TM + 6 * TD));   // 3236
  localparam longint unsigned P_B = 64'(2 * (TN + TM + 3 * TD));

  int checks = 0, failures = 0;

  logic enable = 1'b0, data = 1'b0;
  logic ro_a, ro_b;

  ook_transmitter dut_a (.enable(enable), .data(data), .ro_out(ro_a));
  ook_transmitter #(.K(3)) dut_b (.enable(enable), .data(data), .ro_out(ro_b));

  // Bit clock with a run-time period, for the data-rate sweep.
  longint unsigned half_bit_ps = 500_000;
  logic bit_clk = 1'b0;
  always #(half_bit_ps) bit_clk = ~bit_clk;

  int unsigned     cnt_a, cnt_b;
  longint unsigned per_a, per_b;
  em_edge_demod u_dem_a (.win_clk(bit_clk), .rf(ro_a), .count(cnt_a), .period_ps(per_a));
  em_edge_demod u_dem_b (.win_clk(bit_clk), .rf(ro_b), .count(cnt_b), .period_ps(per_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #300_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int unsigned e0, eb;
    longint unsigned t0;
    bit [15:0] pattern;
    longint unsigned rates_mbps [4] = '{1, 2, 4, 16};
    longint unsigned bit_ps, want;

    #20_000;
    // Disabled, data 1: silent.
    data = 1'b1;
    e0 = u_dem_a.edges; eb = u_dem_b.edges;
    #100_000;
    check(u_dem_a.edges == e0 && u_dem_b.edges == eb, "ring runs while disabled");

    // Enabled, data 0: silent.
    data = 1'b0;
    enable = 1'b1;
    #20_000;
    e0 = u_dem_a.edges;
    #100_000;
    check(u_dem_a.edges == e0, "ring runs while data is 0");

    // data 1: start latency and carrier period.
    t0 = longint'($time);
    data = 1'b1;
    @(posedge ro_a);
    check(longint'($time) - t0 <= P_A, $sformatf("start latency %0d ps", longint'($time) - t0));
    #50_000;
    check(per_a == P_A, $sformatf("period A %0d ps, want %0d", per_a, P_A));
    check(per_b == P_B, $sformatf("period B %0d ps, want %0d", per_b, P_B));
    check(per_a > 0 && 1.0e6 / real'(per_a) > 305.9 && 1.0e6 / real'(per_a) < 312.1,
          $sformatf("f0 = %f MHz, want 309 +- 1 %%", 1.0e6 / real'(per_a)));

    // data 0: stops within one trip, output node resting at 0.
    data = 1'b0;
    #(P_A);
    e0 = u_dem_a.edges;
    #100_000;
    check(u_dem_a.edges == e0, "ring still runs after data fell");
    check(ro_a == 1'b0, "off ring output must rest at 0");

    // The ID pattern at each data rate of the on-off prototype.
    pattern = 16'b0101_0001_1111_0011;
    foreach (rates_mbps[r]) begin
      bit_ps = 1_000_000 / rates_mbps[r];
      @(posedge bit_clk);
      half_bit_ps = bit_ps / 2;
      @(posedge bit_clk);
      @(posedge bit_clk);
      for (int i = 15; i >= 0; i--) begin
        data = pattern[i];
        @(posedge bit_clk);
        #1;
        if (pattern[i]) begin
          want = bit_ps / P_A;
          check(cnt_a + 1 >= want && cnt_a <= want + 1,
                $sformatf("%0d Mbps bit %0d: %0d edges, want about %0d",
                          rates_mbps[r], i, cnt_a, want));
          want = bit_ps / P_B;
          check(cnt_b + 1 >= want && cnt_b <= want + 1, "K=3 edges per 1 bit");
        end else begin
          // Only the tail of a preceding 1 may leak into a 0 window.
          check(cnt_a <= 1, $sformatf("%0d Mbps bit %0d: %0d edges in a 0",
                                      rates_mbps[r], i, cnt_a));
          check(cnt_b <= 1, "K=3 edges in a 0 bit");
        end
      end
    end

    enable = 1'b0;
    data   = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
