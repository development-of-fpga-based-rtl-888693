// can_eedc_node: one CAN controller with EEDC error correction.
//
// Joins a bit-timing prescaler, the transmitter (can_tx) and the receiver
// (can_rx). The node's contribution to the wired-AND bus is the AND of what
// the transmitter and the receiver drive (1 = recessive); both read the
// same bus value. The receiver is told when the node's own transmitter is
// sending, so that the node neither acknowledges nor delivers its own
// frames, but it receives a frame whose arbitration the node lost.
//
// Interface: a frame is offered on req_valid_i / req_frame_i and taken when
// req_ready_o pulses; tx_done_o reports that it went out. Received frames
// appear on rx_valid_o / rx_frame_o with the EEDC correction status. Status
// pulses report every CAN error event seen by the node. can_tx_o and
// can_rx_i are the bus pins. One bit lasts CLK_HZ / BIT_RATE cycles.
//
// The controller structure is this design's; the document describes the
// controller by its function only.
module can_eedc_node
  import eedc_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned BIT_RATE = 1_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       can_rx_i,
  output logic       can_tx_o,
  input  logic       req_valid_i,
  input  can_frame_t req_frame_i,
  output logic       req_ready_o,
  output logic       tx_done_o,
  output logic       rx_valid_o,
  output can_frame_t rx_frame_o,
  output logic       rx_corr_data_o,
  output logic       rx_corr_check_o,
  output logic [6:0] rx_err_pos_o,
  output logic       arb_lost_o,
  output logic       bit_err_o,
  output logic       ack_err_o,
  output logic       stuff_bit_o,
  output logic       stuff_err_o,
  output logic       form_err_o,
  output logic       eedc_err_o
);

  logic tx_pt, sample_pt;
  logic tx_bit, rx_drive, tx_active;

  can_bit_timing #(.CLK_HZ(CLK_HZ), .BIT_RATE(BIT_RATE)) u_timing (
    .clk, .rst_n, .tx_pt_o(tx_pt), .sample_pt_o(sample_pt)
  );

  can_tx u_tx (
    .clk, .rst_n,
    .tx_pt_i    (tx_pt),
    .sample_pt_i(sample_pt),
    .bus_i      (can_rx_i),
    .tx_o       (tx_bit),
    .req_valid_i,
    .req_frame_i,
    .req_ready_o,
    .done_o     (tx_done_o),
    .active_o   (tx_active),
    .arb_lost_o,
    .bit_err_o,
    .ack_err_o,
    .stuff_o    (stuff_bit_o)
  );

  can_rx u_rx (
    .clk, .rst_n,
    .tx_pt_i     (tx_pt),
    .sample_pt_i (sample_pt),
    .bus_i       (can_rx_i),
    .own_i       (tx_active),
    .drive_o     (rx_drive),
    .valid_o     (rx_valid_o),
    .frame_o     (rx_frame_o),
    .corr_data_o (rx_corr_data_o),
    .corr_check_o(rx_corr_check_o),
    .err_pos_o   (rx_err_pos_o),
    .stuff_err_o,
    .form_err_o,
    .eedc_err_o
  );

  assign can_tx_o = tx_bit & rx_drive;

endmodule
