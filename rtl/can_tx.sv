// can_tx: CAN 2.0A frame transmitter with an EEDC field in place of the CRC.
//
// On a request the frame is latched and its EEDC-protected span (SOF,
// identifier, RTR, IDE, r0, DLC, data) is encoded by eedc_encoder; the
// redundancy bits follow the data immediately, replacing the 15-bit CRC
// sequence. The transmitter waits for an idle bus (11 recessive bits),
// sends SOF and then the span plus redundancy bits with bit stuffing (a
// complementary bit after five equal bits, including after the last
// redundancy bit), followed by the delimiter, a recessive ACK slot, the ACK
// delimiter and seven EOF bits.
//
// Every bit is read back at the sample point (bit monitoring). A recessive
// bit overwritten by a dominant one inside the arbitration field (identifier
// and RTR) means another node won arbitration: the transmitter falls silent
// and retries when the bus is idle. Any other mismatch is a bit error, and a
// recessive ACK slot is an acknowledgement error: both are answered with an
// error flag of six dominant bits, after which the frame is sent again
// automatically once the bus is idle.
//
// Interface: req_valid_i / req_frame_i are taken when req_ready_o is high
// (one cycle). done_o pulses when the frame has gone out with no error.
// tx_o is the value driven onto the wired-AND bus (1 = recessive), bus_i the
// bus value read back. Drive changes at tx_pt_i, reads happen at
// sample_pt_i. active_o is high while this node is sending a frame.
//
// The frame layout and the error mechanisms are CAN's as the document lists
// them; the EEDC field replacing the CRC is the document's proposal; the
// automatic-retry policy without error counters is this design's choice.
module can_tx
  import eedc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_pt_i,
  input  logic       sample_pt_i,
  input  logic       bus_i,
  output logic       tx_o,
  input  logic       req_valid_i,
  input  can_frame_t req_frame_i,
  output logic       req_ready_o,
  output logic       done_o,
  output logic       active_o,
  output logic       arb_lost_o,
  output logic       bit_err_o,
  output logic       ack_err_o,
  output logic       stuff_o      // pulses for every stuff bit sent
);

  localparam int unsigned LW = $clog2(CAN_MAX_D + 1);
  localparam int unsigned FW = CAN_MAX_D + CAN_MAX_R;

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT, S_FRAME, S_DELIM, S_ACK, S_ACKDEL, S_EOF, S_ERR
  } state_t;

  state_t         state;
  can_frame_t     frame;
  logic [3:0]     rec_cnt;      // consecutive recessive bits seen
  logic [6:0]     idx;          // frame bits sent, SOF = bit 0
  logic [2:0]     run;          // length of the current run of equal bits
  logic           last;         // value of the previous bit sent
  logic           stuff_now;    // the next bit is a stuff bit
  logic [2:0]     cnt;          // EOF / error flag bit counter
  logic [FW-1:0]  code;
  logic [3:0]     nchk;
  logic [6:0]     span;
  logic [6:0]     total;
  logic [CAN_MAX_D-1:0] enc_in;

  // Protected span, left aligned; unused data bytes must be zero.
  always_comb begin
    logic [63:0] dmask;
    dmask  = frame.data & ~(64'hFFFF_FFFF_FFFF_FFFF >> {can_nbytes(frame.rtr, frame.dlc), 3'b000});
    enc_in = {1'b0, frame.id, frame.rtr, 1'b0, 1'b0, frame.dlc, dmask};
    span   = can_eedc_len(frame.rtr, frame.dlc);
  end

  eedc_encoder #(.MAX_D(CAN_MAX_D), .MAX_R(CAN_MAX_R)) u_enc (
    .data_i (enc_in),
    .len_i  (LW'(span)),
    .check_o(),
    .nchk_o (nchk),
    .code_o (code)
  );

  assign total = span + 7'(nchk);

  wire bus_idle = (rec_cnt >= 4'(CAN_IDLE_BITS));
  wire cur_bit  = stuff_now ? ~last : code[FW-1-32'(idx)];
  wire in_arb   = (idx >= 7'd1) && (idx <= 7'd12);

  assign req_ready_o = (state == S_IDLE) && req_valid_i;
  assign active_o    = (state inside {S_FRAME, S_DELIM, S_ACK, S_ACKDEL, S_EOF});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      frame      <= '0;
      rec_cnt    <= '0;
      idx        <= '0;
      run        <= '0;
      last       <= 1'b1;
      stuff_now  <= 1'b0;
      cnt        <= '0;
      tx_o       <= 1'b1;
      done_o     <= 1'b0;
      arb_lost_o <= 1'b0;
      bit_err_o  <= 1'b0;
      ack_err_o  <= 1'b0;
      stuff_o    <= 1'b0;
    end else begin
      done_o     <= 1'b0;
      arb_lost_o <= 1'b0;
      bit_err_o  <= 1'b0;
      ack_err_o  <= 1'b0;
      stuff_o    <= 1'b0;

      if (req_ready_o) begin
        frame <= req_frame_i;
        state <= S_WAIT;
      end

      // Drive the bit for the coming bit period.
      if (tx_pt_i) begin
        unique case (state)
          S_WAIT: if (bus_idle) begin
            tx_o      <= 1'b0;           // SOF
            state     <= S_FRAME;
            idx       <= '0;
            stuff_now <= 1'b0;
          end else tx_o <= 1'b1;
          S_FRAME: tx_o <= cur_bit;
          S_ERR:   tx_o <= 1'b0;
          default: tx_o <= 1'b1;
        endcase
      end

      // Read the bus back and advance.
      if (sample_pt_i) begin
        rec_cnt <= bus_i ? ((rec_cnt == 4'(CAN_IDLE_BITS)) ? rec_cnt : rec_cnt + 4'd1) : 4'd0;
        unique case (state)
          S_FRAME: begin
            if (bus_i != tx_o) begin
              if (tx_o && in_arb && !stuff_now) begin
                arb_lost_o <= 1'b1;
                tx_o       <= 1'b1;
                state      <= S_WAIT;
              end else begin
                bit_err_o <= 1'b1;
                state     <= S_ERR;
                cnt       <= '0;
              end
            end else if (stuff_now) begin
              stuff_o   <= 1'b1;
              stuff_now <= 1'b0;
              last      <= tx_o;
              run       <= 3'd1;
              if (idx == total) state <= S_DELIM;
            end else begin
              logic [2:0] run_n;
              run_n     = (idx != '0 && tx_o == last) ? run + 3'd1 : 3'd1;
              run       <= run_n;
              last      <= tx_o;
              idx       <= idx + 7'd1;
              stuff_now <= (run_n == 3'(CAN_STUFF_RUN));
              if (idx + 7'd1 == total && run_n != 3'(CAN_STUFF_RUN)) state <= S_DELIM;
            end
          end
          S_DELIM: if (!bus_i) begin
            bit_err_o <= 1'b1; state <= S_ERR; cnt <= '0;
          end else state <= S_ACK;
          S_ACK: if (bus_i) begin
            ack_err_o <= 1'b1; state <= S_ERR; cnt <= '0;
          end else state <= S_ACKDEL;
          S_ACKDEL: if (!bus_i) begin
            bit_err_o <= 1'b1; state <= S_ERR; cnt <= '0;
          end else begin
            state <= S_EOF; cnt <= '0;
          end
          S_EOF: if (!bus_i) begin
            bit_err_o <= 1'b1; state <= S_ERR; cnt <= '0;
          end else if (cnt == 3'(CAN_EOF_BITS - 1)) begin
            done_o <= 1'b1;
            state  <= S_IDLE;
          end else cnt <= cnt + 3'd1;
          S_ERR: if (cnt == 3'(CAN_ERRFLAG_BITS - 1)) state <= S_WAIT;
                 else cnt <= cnt + 3'd1;
          default: ;
        endcase
      end
    end
  end

  // An attempt ends in at most one of: success, lost arbitration, bit
  // error, acknowledgement error.
  assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({done_o, arb_lost_o, bit_err_o, ack_err_o}));

endmodule
