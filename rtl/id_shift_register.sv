// id_shift_register: circular shift register that holds the IP identity and
// presents it, one bit per clock, to the electromagnetic transmitter.
//
// While enable is 0 the register is (re)loaded with ID, so every activation
// starts with the first ID bit. While enable is 1 it rotates left by one
// position on each rising clock edge; data is the register's most
// significant bit, so the ID goes out MSB first and repeats every ID_WIDTH
// clocks for as long as enable stays high. With the 1 MHz clock of the
// prototype the bit rate is 1 Mbps; the on-off transmitter was also run at
// 2, 4 and 16 Mbps, which only needs a faster clock here.
//
// Timing: enable is expected to change just after a rising edge (it comes
// from the ID checker through the device's clock domain). The first bit is
// on data from the clock edge before enable rises until the first edge that
// samples enable high, i.e. exactly one clock; the following bits each last
// one clock. first_bit is 1 while bit 0 of the word is on data.
//
// The 16-bit demonstration ID, the 1 MHz clock and the cyclic repetition are
// the published prototype's. The MSB-first order, the reload while disabled,
// the active-low asynchronous reset and first_bit are this design's own.
module id_shift_register
  import em_tx_pkg::*;
#(
  parameter int unsigned         ID_W = ID_WIDTH,
  parameter logic [ID_W-1:0]     ID   = DEMO_ID
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic data,
  output logic first_bit
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [ID_W-1:0]         sr;
  logic [$clog2(ID_W)-1:0] pos;   // index of the ID bit now on data

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= ID;
      pos <= '0;
    end else if (!enable) begin
      sr  <= ID;
      pos <= '0;
    end else begin
      sr  <= {sr[ID_W-2:0], sr[ID_W-1]};
      pos <= (pos == $clog2(ID_W)'(ID_W - 1)) ? '0 : pos + 1'b1;
    end
  end

  assign data      = sr[ID_W-1];
  assign first_bit = (pos == '0);

  // The rotation must never lose the word: after a full turn it is ID again.
  property p_word_kept;
    @(posedge clk) disable iff (!rst_n) (first_bit && enable) |-> (sr == ID);
  endproperty
  a_word_kept: assert property (p_word_kept);
endmodule
