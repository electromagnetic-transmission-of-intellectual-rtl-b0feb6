// bfsk_transmitter: ultra-lightweight BFSK transmitter built from one
// configurable ring oscillator (behavioural model).
//
// The hardware is a ring of a NAND gate, a chain of N+K delay elements and
// a 2:1 multiplexer that feeds the NAND back. The data bit drives the
// multiplexer select: with data = 0 the ring closes after the first N delay
// elements and oscillates at f0; with data = 1 it closes after all N+K and
// oscillates at the lower f1. The NAND's other input is the enable: while
// it is 0 the NAND output sits at 1, every ring node settles to 1 and
// nothing radiates, so the ring only draws power while the ID checker asks
// for the identity. The NAND is the only inversion in the loop, so one half
// period is one trip round the selected loop:
//   half(data) = T_NAND_PS + T_MUX_PS + (data ? N+K : N) * T_DELAY_PS.
// In an FPGA the ring takes N+K+1 LUT4 (NAND and multiplexer share one).
//
// This model reproduces the ring's fundamental mode at its output node, the
// multiplexer output: while enabled it toggles after each half period, the
// half period being chosen from data at the start of each half cycle, so a
// new bit changes the carrier within one trip round the ring, as the loop
// length does in silicon. When enable falls the output returns to 1 at the
// end of the current half cycle and stays there. A gate-level model with
// ideal delays is not used here: after a switch to the long loop it keeps
// several wavefronts circulating and runs at a multiple of f1, which a real
// ring sheds through noise and gate non-idealities.
//
// Ports: enable and data are logic levels (data is normally the output of
// the ID shift register, changing once per bit period); ro_out is the
// radiating ring node.
//
// Ring structure, tap choice and the meaning of data follow the published
// transmitter; N = 6, K = 10 are the Cyclone III prototype's sizes. The gate
// delays are fitted to the measured 289 MHz and 119 MHz and are this model's
// own numbers: in silicon they depend on placement and routing. Not
// synthesizable: the real part is a deliberate combinational loop of LUT
// primitives held in place with keep and placement constraints. A tool
// that drops the delays sees the toggling output as a combinational loop;
// that warning is expected for this model and stands.
module bfsk_transmitter
  import em_tx_pkg::*;
#(
  parameter int unsigned N          = BFSK_N,
  parameter int unsigned K          = BFSK_K,
  parameter int unsigned T_NAND_PS  = BFSK_T_NAND_PS,
  parameter int unsigned T_MUX_PS   = BFSK_T_MUX_PS,
  parameter int unsigned T_DELAY_PS = DELAY_ELEM_PS
) (
  input  logic enable,
  input  logic data,
  output logic ro_out
);
  timeunit 1ps;
  timeprecision 1ps;

  // One trip round the short (f0) and the long (f1) loop.
  localparam int unsigned HALF_F0_PS = T_NAND_PS + T_MUX_PS + N * T_DELAY_PS;
  localparam int unsigned HALF_F1_PS = T_NAND_PS + T_MUX_PS + (N + K) * T_DELAY_PS;

  logic ro;

  always begin : ring
    if (!enable) begin
      ro = 1'b1;                  // stopped ring: every node at 1
      @(posedge enable);
    end else if (data) begin
      #(HALF_F1_PS);
      ro = enable ? ~ro : 1'b1;
    end else begin
      #(HALF_F0_PS);
      ro = enable ? ~ro : 1'b1;
    end
  end

  assign ro_out = ro;

  initial begin
    assert (K >= 1) else $error("bfsk_transmitter: K must be at least 1");
  end
endmodule
