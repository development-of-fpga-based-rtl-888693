// can_eedc_system: two EEDC CAN controllers on a CAN bus emulated inside
// the FPGA, with a frame-replay memory feeding one of them.
//
// Node 0 transmits the frames stored in can_frame_replay, in order, as a
// recorded bus trace would be played back; node 1 is driven by the host
// and receives what node 0 sends (and can itself transmit, so that the two
// compete for the bus by bitwise arbitration). The bus is a wired AND of
// the two nodes' outputs (0 = dominant). Each node reads the bus through
// an XOR with noise_i[n]: holding noise_i[n] high for one bit inverts that
// bit as that node sees it, which emulates a disturbed bit at one receiver
// and exercises EEDC correction and the CAN error handling.
//
// Interface: the replay memory is loaded with wr_en_i / wr_addr_i /
// wr_frame_i and played with start_i and count_i. Node 1 takes frames on
// host_req_valid_i / host_req_frame_i. rx_*_o[n] carry what node n
// received; the err/status vectors carry each node's CAN event pulses.
// One bit is CLK_HZ / BIT_RATE clock cycles (50 cycles by default).
//
// The emulated on-chip bus, the replayed traffic and the EEDC controller
// follow the document's test set-up; the number of nodes and the noise
// input are this design's choices.
module can_eedc_system
  import eedc_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BIT_RATE     = 1_000_000,
  parameter int unsigned REPLAY_DEPTH = 64,
  localparam int unsigned AW          = $clog2(REPLAY_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // replay memory
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  can_frame_t    wr_frame_i,
  input  logic          start_i,
  input  logic [AW:0]   count_i,
  output logic          replay_busy_o,
  output logic          replay_done_o,
  output logic [15:0]   replay_sent_o,
  // host transmit port of node 1
  input  logic          host_req_valid_i,
  input  can_frame_t    host_req_frame_i,
  output logic          host_req_ready_o,
  output logic          host_tx_done_o,
  // bus disturbance, one bit per node
  input  logic [1:0]    noise_i,
  output logic          bus_o,
  // receive side of each node
  output logic [1:0]    rx_valid_o,
  output can_frame_t    rx_frame_o [2],
  output logic [1:0]    rx_corr_data_o,
  output logic [1:0]    rx_corr_check_o,
  output logic [6:0]    rx_err_pos_o [2],
  // CAN event pulses of each node
  output logic [1:0]    arb_lost_o,
  output logic [1:0]    bit_err_o,
  output logic [1:0]    ack_err_o,
  output logic [1:0]    stuff_bit_o,
  output logic [1:0]    stuff_err_o,
  output logic [1:0]    form_err_o,
  output logic [1:0]    eedc_err_o
);

  logic [1:0]  node_tx;
  logic [1:0]  req_valid, req_ready, tx_done;
  can_frame_t  req_frame [2];

  can_frame_replay #(.DEPTH(REPLAY_DEPTH)) u_replay (
    .clk, .rst_n,
    .wr_en_i, .wr_addr_i, .wr_frame_i,
    .start_i, .count_i,
    .req_valid_o(req_valid[0]),
    .req_frame_o(req_frame[0]),
    .req_ready_i(req_ready[0]),
    .tx_done_i  (tx_done[0]),
    .busy_o     (replay_busy_o),
    .done_o     (replay_done_o),
    .sent_o     (replay_sent_o)
  );

  assign req_valid[1]     = host_req_valid_i;
  assign req_frame[1]     = host_req_frame_i;
  assign host_req_ready_o = req_ready[1];
  assign host_tx_done_o   = tx_done[1];

  assign bus_o = &node_tx;

  for (genvar n = 0; n < 2; n++) begin : g_node
    can_eedc_node #(.CLK_HZ(CLK_HZ), .BIT_RATE(BIT_RATE)) u_node (
      .clk, .rst_n,
      .can_rx_i       (bus_o ^ noise_i[n]),
      .can_tx_o       (node_tx[n]),
      .req_valid_i    (req_valid[n]),
      .req_frame_i    (req_frame[n]),
      .req_ready_o    (req_ready[n]),
      .tx_done_o      (tx_done[n]),
      .rx_valid_o     (rx_valid_o[n]),
      .rx_frame_o     (rx_frame_o[n]),
      .rx_corr_data_o (rx_corr_data_o[n]),
      .rx_corr_check_o(rx_corr_check_o[n]),
      .rx_err_pos_o   (rx_err_pos_o[n]),
      .arb_lost_o     (arb_lost_o[n]),
      .bit_err_o      (bit_err_o[n]),
      .ack_err_o      (ack_err_o[n]),
      .stuff_bit_o    (stuff_bit_o[n]),
      .stuff_err_o    (stuff_err_o[n]),
      .form_err_o     (form_err_o[n]),
      .eedc_err_o     (eedc_err_o[n])
    );
  end

endmodule
