// id_shift_register_tb: checks the circular ID shift register.
//
// Two instances run side by side: the 16-bit prototype identity and an
// 8-bit word. After reset each must present its first ID bit. With enable
// held for three words, data must follow the ID MSB first, one bit per
// clock, wrapping around (compared with a reference model kept here as a
// bit index), and first_bit must mark exactly the first bit of each word.
// Dropping enable mid-word and raising it again must restart at bit 0.
module id_shift_register_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [15:0] ID16 = 16'b0101_0001_1111_0011;
  localparam logic [7:0]  ID8  = 8'hC5;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic d16, f16, d8, f8;

  always #5000 clk = ~clk;

  id_shift_register dut16 (.clk(clk), .rst_n(rst_n), .enable(enable), .data(d16), .first_bit(f16));
  id_shift_register #(.ID_W(8), .ID(ID8)) dut8 (.clk(clk), .rst_n(rst_n), .enable(enable),
                                                 .data(d8), .first_bit(f8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the index of the bit that must be on data now.
  int i16, i8;

  task automatic send(input int n_bits);
    for (int b = 0; b < n_bits; b++) begin
      #1000;   // sample mid-cycle, after the edge that set this bit
      check(d16 == ID16[15 - i16], $sformatf("16-bit word: bit %0d is %b", i16, d16));
      check(f16 == (i16 == 0), $sformatf("16-bit word: first_bit at index %0d", i16));
      check(d8 == ID8[7 - i8], $sformatf("8-bit word: bit %0d is %b", i8, d8));
      check(f8 == (i8 == 0), $sformatf("8-bit word: first_bit at index %0d", i8));
      @(posedge clk);
      i16 = (i16 + 1) % 16;
      i8  = (i8 + 1) % 8;
    end
  endtask

  initial begin : stim
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1000;
    check(d16 == ID16[15] && f16, "after reset: first bit of the 16-bit ID");
    check(d8 == ID8[7] && f8, "after reset: first bit of the 8-bit ID");

    // enable is raised just after an edge, so bit 0 lasts one clock.
    i16 = 0; i8 = 0;
    @(posedge clk);
    enable <= 1'b1;
    send(48);

    // Drop enable in mid-word: the register reloads and holds bit 0.
    enable <= 1'b0;
    repeat (3) @(posedge clk);
    #1000;
    check(d16 == ID16[15] && f16, "disabled: holds first bit of the 16-bit ID");
    check(d8 == ID8[7] && f8, "disabled: holds first bit of the 8-bit ID");
    @(posedge clk);
    enable <= 1'b1;
    i16 = 0; i8 = 0;
    send(20);

    // Asynchronous reset in mid-word.
    #1000;
    rst_n = 1'b0;
    #10;
    check(d16 == ID16[15] && f16, "reset reloads the 16-bit ID");
    check(d8 == ID8[7] && f8, "reset reloads the 8-bit ID");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
