// can_frame_replay: on-chip memory of recorded CAN frames and the sequencer
// that plays them back onto the bus through a node's transmitter.
//
// The host loads up to DEPTH frames through the write port. A start pulse
// plays entries 0 .. count_i-1 in order: each entry is read from the memory
// (one cycle of read latency), offered to the transmitter on
// req_valid_o / req_frame_o, and the next one is fetched only after the
// transmitter reports tx_done_i, so frames leave in the stored order even
// when some of them have to be repeated. busy_o is high during playback,
// done_o pulses after the last frame and sent_o counts the frames sent.
//
// Replaying stored bus traffic is how the document exercises its
// controller; the memory depth (64 frames) and the load interface are this
// design's choices.
module can_frame_replay
  import eedc_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  can_frame_t wr_frame_i,
  input  logic       start_i,
  input  logic [AW:0] count_i,
  output logic       req_valid_o,
  output can_frame_t req_frame_o,
  input  logic       req_ready_i,
  input  logic       tx_done_i,
  output logic       busy_o,
  output logic       done_o,
  output logic [15:0] sent_o
);

  typedef enum logic [1:0] { P_IDLE, P_READ, P_OFFER, P_WAIT } state_t;

  can_frame_t     mem [DEPTH];
  state_t         state;
  logic [AW:0]    idx;
  logic [AW:0]    count;
  can_frame_t     rd_q;

  always_ff @(posedge clk)
    if (wr_en_i) mem[wr_addr_i] <= wr_frame_i;

  always_ff @(posedge clk)
    rd_q <= mem[idx[AW-1:0]];

  assign req_valid_o = (state == P_OFFER);
  assign req_frame_o = rd_q;
  assign busy_o      = (state != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= P_IDLE;
      idx    <= '0;
      count  <= '0;
      done_o <= 1'b0;
      sent_o <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        P_IDLE: if (start_i) begin
          idx   <= '0;
          count <= count_i;
          if (count_i != '0) state <= P_READ;
          else               done_o <= 1'b1;
        end
        P_READ:  state <= P_OFFER;
        P_OFFER: if (req_ready_i) state <= P_WAIT;
        P_WAIT: if (tx_done_i) begin
          sent_o <= sent_o + 16'd1;
          if (idx + 1'b1 == count) begin
            state  <= P_IDLE;
            done_o <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= P_READ;
          end
        end
        default: ;
      endcase
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("DEPTH must be a power of two");

endmodule
