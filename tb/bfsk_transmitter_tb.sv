// bfsk_transmitter_tb: checks the BFSK ring-oscillator model.
//
// Two instances are exercised: the prototype size (N = 6, K = 10) and a
// size from the resource sweep (N = 4, K = 5). For each it checks that the
// ring is silent while disabled, that data = 0 gives the short-ring period
// and data = 1 the long-ring period (computed here from the gate delays),
// that the prototype lands within 1 % of 289 MHz and 119 MHz, that the
// ring starts within one period of enable and stops within one loop delay
// after it, and that at 1 Mbps each bit window holds the expected number of
// carrier edges.
module bfsk_transmitter_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TD = 247, TN = 124, TM = 123;
  // Expected periods, from the ring's structure: one inversion per loop.
  localparam longint unsigned P0_A = 64'(2 * (TN + TM + 6 * TD));         // 3458
  localparam longint unsigned P1_A = 64'(2 * (TN + TM + 16 * TD));        // 8398
  localparam longint unsigned P0_B = 64'(2 * (TN + TM + 4 * TD));
  localparam longint unsigned P1_B = 64'(2 * (TN + TM + 9 * TD));

  int checks = 0, failures = 0;

  logic enable = 1'b0, data = 1'b0;
  logic ro_a, ro_b;

  bfsk_transmitter dut_a (.enable(enable), .data(data), .ro_out(ro_a));
  bfsk_transmitter #(.N(4), .K(5)) dut_b (.enable(enable), .data(data), .ro_out(ro_b));

  // 1 MHz bit clock for the data-rate part.
  logic bit_clk = 1'b0;
  always #500000 bit_clk = ~bit_clk;

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

  // Count rising edges of the prototype ring over a span of time.
  function automatic int unsigned edges_a();
    return u_dem_a.edges;
  endfunction

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int unsigned e0;
    longint unsigned t_en, t_first;
    bit [15:0] pattern;

    // Disabled: settle, then no edge may appear.
    #20_000;
    e0 = edges_a();
    #100_000;
    check(edges_a() == e0, "ring runs while disabled");

    // Enable with data 0: start-up latency, then the f0 period.
    @(negedge bit_clk);
    t_en = longint'($time);
    enable = 1'b1;
    @(posedge ro_a);
    t_first = longint'($time);
    check(t_first - t_en <= P0_A, $sformatf("start latency %0d ps", t_first - t_en));
    #50_000;
    check(per_a == P0_A, $sformatf("f0 period A %0d ps, want %0d", per_a, P0_A));
    check(per_b == P0_B, $sformatf("f0 period B %0d ps, want %0d", per_b, P0_B));
    check(per_a > 0 && 1.0e6 / real'(per_a) > 286.1 && 1.0e6 / real'(per_a) < 291.9,
          $sformatf("f0 = %f MHz, want 289 +- 1 %%", 1.0e6 / real'(per_a)));

    // data 1: the long ring, f1.
    data = 1'b1;
    #50_000;
    check(per_a == P1_A, $sformatf("f1 period A %0d ps, want %0d", per_a, P1_A));
    check(per_b == P1_B, $sformatf("f1 period B %0d ps, want %0d", per_b, P1_B));
    check(per_a > 0 && 1.0e6 / real'(per_a) > 117.8 && 1.0e6 / real'(per_a) < 120.2,
          $sformatf("f1 = %f MHz, want 119 +- 1 %%", 1.0e6 / real'(per_a)));
    check(P0_A < P1_A, "f0 must be above f1");

    // 1 Mbps: one bit per bit_clk period; count carrier edges per bit.
    pattern = 16'b0101_0001_1111_0011;
    @(posedge bit_clk);
    for (int i = 15; i >= 0; i--) begin
      data = pattern[i];
      @(posedge bit_clk);
      #1;
      if (pattern[i]) begin
        check(cnt_a >= 1_000_000 / P1_A - 1 && cnt_a <= 1_000_000 / P1_A + 1,
              $sformatf("bit %0d: %0d edges, want about %0d", i, cnt_a, 1_000_000 / P1_A));
        check(cnt_b >= 1_000_000 / P1_B - 1 && cnt_b <= 1_000_000 / P1_B + 1, "B f1 edges per bit");
      end else begin
        check(cnt_a >= 1_000_000 / P0_A - 1 && cnt_a <= 1_000_000 / P0_A + 1,
              $sformatf("bit %0d: %0d edges, want about %0d", i, cnt_a, 1_000_000 / P0_A));
        check(cnt_b >= 1_000_000 / P0_B - 1 && cnt_b <= 1_000_000 / P0_B + 1, "B f0 edges per bit");
      end
    end

    // Disable: the ring must stop within one trip round the long loop.
    enable = 1'b0;
    #(P1_A);
    e0 = edges_a();
    #100_000;
    check(edges_a() == e0, "ring still runs after disable");
    check(ro_a == 1'b1, "stopped ring must rest at 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
