// em_ip_id_top: IP-identity salware that answers an outside ID checker over
// the electromagnetic side channel.
//
// Two identity channels stand side by side, one per published transmitter
// version. Each has its own circular ID shift register clocked by clk (1 MHz
// gives 1 Mbps) and its own enable, which is driven from outside the device
// by the ID checker:
//   - BFSK channel: the ID bits select the carrier of bfsk_transmitter,
//     f0 (289 MHz) for a 0 and f1 (119 MHz) for a 1.
//   - On-off channel: the ID bits switch the single 309 MHz carrier of
//     ook_transmitter on (1) and off (0).
// While an enable is low its ring oscillator is stopped and its register
// holds the ID ready, so each activation sends the word from its first bit
// and then repeats it for as long as the enable stays high.
//
// Ports: clk and rst_n (active-low asynchronous reset) clock the shift
// registers; enable_bfsk / enable_ook start a channel; em_bfsk / em_ook are
// the radiating ring nodes; id_bit_* and id_first_* show the bit each
// channel is sending and mark the first bit of the word.
//
// Both transmitters are behavioural ring-oscillator models (delays in ps),
// so this top is for simulation; the shift registers are synthesizable.
// Two independent channels in one top is this design's way of keeping both
// published versions together; the prototype carried one at a time.
module em_ip_id_top
  import em_tx_pkg::*;
#(
  parameter int unsigned     ID_W   = ID_WIDTH,
  parameter logic [ID_W-1:0] ID     = DEMO_ID,
  parameter int unsigned     N      = BFSK_N,
  parameter int unsigned     K_BFSK = BFSK_K,
  parameter int unsigned     K_OOK  = OOK_K
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable_bfsk,
  input  logic enable_ook,
  output logic em_bfsk,
  output logic em_ook,
  output logic id_bit_bfsk,
  output logic id_bit_ook,
  output logic id_first_bfsk,
  output logic id_first_ook
);
  timeunit 1ps;
  timeprecision 1ps;

  id_shift_register #(.ID_W(ID_W), .ID(ID)) u_id_bfsk (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (enable_bfsk),
    .data      (id_bit_bfsk),
    .first_bit (id_first_bfsk)
  );

  bfsk_transmitter #(.N(N), .K(K_BFSK)) u_bfsk (
    .enable (enable_bfsk),
    .data   (id_bit_bfsk),
    .ro_out (em_bfsk)
  );

  id_shift_register #(.ID_W(ID_W), .ID(ID)) u_id_ook (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (enable_ook),
    .data      (id_bit_ook),
    .first_bit (id_first_ook)
  );

  ook_transmitter #(.K(K_OOK)) u_ook (
    .enable (enable_ook),
    .data   (id_bit_ook),
    .ro_out (em_ook)
  );
endmodule
