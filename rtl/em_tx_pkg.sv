// em_tx_pkg: constants shared by the electromagnetic IP-identity transmitter.
//
// The identity is a 16-bit word sent most significant bit first, one bit
// per clock of the ID shift register (1 MHz gives 1 Mbps). Two transmitter
// versions share it: the BFSK ring oscillator (two carriers, f0 for a 0 and
// f1 for a 1) and the on-off ring oscillator (one carrier, present for a 1).
//
// The sizes N = 6, K = 10 (BFSK) and K = 6 (on-off) and the demonstration ID
// 0101000111110011 are the values of the Cyclone III prototype. The gate and
// delay-element delays are this design's own choice: they are fitted so the
// models oscillate at the measured 289 MHz / 119 MHz (BFSK) and 309 MHz
// (on-off). One delay element then costs 247 ps; NAND plus multiplexer add
// 247 ps in the BFSK ring and 136 ps in the on-off ring.
package em_tx_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Length of the identity word and its demonstration value.
  localparam int unsigned ID_WIDTH = 16;
  localparam logic [ID_WIDTH-1:0] DEMO_ID = 16'b0101_0001_1111_0011;

  // BFSK ring: N delays for data 0 (f0), N+K delays for data 1 (f1).
  localparam int unsigned BFSK_N = 6;
  localparam int unsigned BFSK_K = 10;

  // On-off ring: K delays, oscillating at f0 while data is 1.
  localparam int unsigned OOK_K = 6;

  // Propagation delays of the behavioural ring models, in picoseconds.
  localparam int unsigned DELAY_ELEM_PS  = 247;  // one delay element (one LUT)
  localparam int unsigned BFSK_T_NAND_PS = 124;
  localparam int unsigned BFSK_T_MUX_PS  = 123;
  localparam int unsigned OOK_T_NAND_PS  = 68;
  localparam int unsigned OOK_T_MUX_PS   = 68;

endpackage
