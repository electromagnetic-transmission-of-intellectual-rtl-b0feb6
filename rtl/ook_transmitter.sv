// ook_transmitter: second, on-off version of the electromagnetic transmitter
// (behavioural model).
//
// A single carrier is used: the ring oscillates at f0 while the data bit is
// 1 and is stopped while it is 0. The ring is a NAND gate, K delay elements
// and a 2:1 multiplexer closing the loop. A second NAND combines enable and
// data into the active-low select of that multiplexer: when both are 1 it
// passes the end of the delay chain back to the ring NAND, which then
// oscillates; otherwise it passes a constant 0, the ring NAND output goes to
// 1 and the chain settles at 1, so the carrier stops within one delay of
// the loop. The enable also goes to the ring NAND, so a disabled
// transmitter never runs. Half period: T_NAND_PS + T_MUX_PS + K * T_DELAY_PS.
//
// Ports: enable and data are logic levels; ro_out is the ring node that
// radiates (multiplexer output).
//
// One multiplexer, K delay elements and two NAND gates follow the published
// description, as does K = 6 for a 309 MHz carrier. How the two NANDs and the
// multiplexer are wired is this design's reading of that description, and
// the gate delays are fitted to 309 MHz.
//
// This is a behavioural model, not synthesizable logic: the ring is a
// deliberate combinational loop, which lint and synthesis tools report as
// such; that warning is expected for this model and stands. Unlike the BFSK
// ring this one is kept at gate level: it always restarts from rest with a
// single wavefront, so ideal delays model it faithfully.
module ook_transmitter
  import em_tx_pkg::*;
#(
  parameter int unsigned K          = OOK_K,
  parameter int unsigned T_NAND_PS  = OOK_T_NAND_PS,
  parameter int unsigned T_MUX_PS   = OOK_T_MUX_PS,
  parameter int unsigned T_DELAY_PS = DELAY_ELEM_PS
) (
  input  logic enable,
  input  logic data,
  output logic ro_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [K:0] tap;       // tap[0]: ring NAND output, tap[i]: i-th delay
  logic       mux_out;
  logic       stop_n;    // second NAND: 0 when enable and data are both 1

  assign #(T_NAND_PS) stop_n = ~(enable & data);

  // Ring NAND: the only inverting stage of the loop.
  assign #(T_NAND_PS) tap[0] = ~(enable & mux_out);

  // Delay elements: in the FPGA each is one LUT used as a buffer and kept
  // from being optimised away. Inertial delay: pulses shorter than
  // T_DELAY_PS are swallowed, as by a real gate.
  for (genvar i = 0; i < K; i++) begin : g_delay
    assign #(T_DELAY_PS) tap[i+1] = tap[i];
  end

  // Close the ring while sending a 1, break it with a constant 0 otherwise.
  assign #(T_MUX_PS) mux_out = stop_n ? 1'b0 : tap[K];

  assign ro_out = mux_out;

  initial begin
    assert (K >= 1) else $error("ook_transmitter: K must be at least 1");
  end
endmodule
