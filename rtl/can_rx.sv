// can_rx: CAN 2.0A frame receiver that checks and corrects the EEDC field.
//
// After 11 recessive bits the bus is idle and a dominant bit is taken as
// SOF. Bits are de-stuffed (after five equal bits the next one is dropped;
// if it is not the complement, a stuff error is raised) and stored left
// aligned as the EEDC-protected span. Once the DLC is in, the span length
// D = 19 + 8 * bytes and the redundancy length r = clog2(D + 1) + 1 are
// known, and the next r de-stuffed bits are taken as the EEDC field. At the
// delimiter eedc_decoder checks the block:
//  - no error or a single corrected error: the frame is acknowledged
//    (dominant ACK slot) and, after a clean EOF, delivered with the
//    corrected content; a correction needs no retransmission;
//  - an uncorrectable error: no acknowledgement, and an error flag of six
//    dominant bits after the ACK delimiter, so that the sender repeats the
//    frame.
// Fixed-form bits (delimiter, ACK delimiter, EOF) must be recessive, and
// the IDE bit must be dominant (only base frames are handled); otherwise a
// form error is raised and an error flag sent at once.
//
// Interface: bus_i is the bus value (1 = recessive), drive_o the value this
// receiver puts on the wired-AND bus (ACK and error flags). own_i is high
// while the same node's transmitter is sending; such a frame is neither
// acknowledged nor delivered. valid_o pulses at the end of EOF with frame_o
// and the correction status. Reads at sample_pt_i, drives at tx_pt_i.
//
// Error detection follows the CAN mechanisms the document lists; EEDC
// decoding in place of the CRC comparison is the document's proposal; the
// placement of the error flag for an uncorrectable block follows CAN's CRC
// error rule.
module can_rx
  import eedc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_pt_i,
  input  logic       sample_pt_i,
  input  logic       bus_i,
  input  logic       own_i,
  output logic       drive_o,
  output logic       valid_o,
  output can_frame_t frame_o,
  output logic       corr_data_o,   // delivered frame had a data bit corrected
  output logic       corr_check_o,  // delivered frame had a redundancy bit corrected
  output logic [6:0] err_pos_o,     // position of the corrected bit (1 = SOF)
  output logic       stuff_err_o,
  output logic       form_err_o,
  output logic       eedc_err_o     // uncorrectable EEDC error
);

  localparam int unsigned LW = $clog2(CAN_MAX_D + 1);

  typedef enum logic [2:0] {
    R_IDLE, R_FRAME, R_DELIM, R_ACK, R_ACKDEL, R_EOF, R_ERR
  } state_t;

  state_t               state;
  logic [3:0]           rec_cnt;
  logic [CAN_MAX_D-1:0] dvec;
  logic [CAN_MAX_R-1:0] cvec;
  logic [6:0]           pos;        // de-stuffed bits received, SOF included
  logic [2:0]           run;
  logic                 last;
  logic [2:0]           cnt;
  logic                 own;
  logic                 uncorr;
  logic [6:0]           span, total;
  logic [3:0]           nchk;
  logic [CAN_MAX_D-1:0] dec_data;
  logic [LW-1:0]        dec_pos;
  logic                 dec_cd, dec_cc, dec_unc;

  // Field positions inside the left-aligned span (1-based bit p sits at
  // dvec[CAN_MAX_D - p]).
  wire       f_rtr = dvec[CAN_MAX_D-13];
  wire [3:0] f_dlc = dvec[CAN_MAX_D-16 -: 4];

  always_comb begin
    span  = can_eedc_len(f_rtr, f_dlc);
    nchk  = eedc_nchk_hw(span);
    total = span + 7'(nchk);
  end

  eedc_decoder #(.MAX_D(CAN_MAX_D), .MAX_R(CAN_MAX_R)) u_dec (
    .data_i      (dvec),
    .len_i       (LW'(span)),
    .check_i     (cvec),
    .data_o      (dec_data),
    .check_o     (),
    .syndrome_o  (),
    .err_pos_o   (dec_pos),
    .ok_o        (),
    .corr_data_o (dec_cd),
    .corr_check_o(dec_cc),
    .uncorr_o    (dec_unc)
  );

  wire bus_idle = (rec_cnt >= 4'(CAN_IDLE_BITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      rec_cnt      <= '0;
      dvec         <= '0;
      cvec         <= '0;
      pos          <= '0;
      run          <= '0;
      last         <= 1'b1;
      cnt          <= '0;
      own          <= 1'b0;
      uncorr       <= 1'b0;
      drive_o      <= 1'b1;
      valid_o      <= 1'b0;
      frame_o      <= '0;
      corr_data_o  <= 1'b0;
      corr_check_o <= 1'b0;
      err_pos_o    <= '0;
      stuff_err_o  <= 1'b0;
      form_err_o   <= 1'b0;
      eedc_err_o   <= 1'b0;
    end else begin
      valid_o     <= 1'b0;
      stuff_err_o <= 1'b0;
      form_err_o  <= 1'b0;
      eedc_err_o  <= 1'b0;

      if (tx_pt_i)
        drive_o <= !((state == R_ACK && !uncorr && !own) || state == R_ERR);

      if (sample_pt_i) begin
        rec_cnt <= bus_i ? ((rec_cnt == 4'(CAN_IDLE_BITS)) ? rec_cnt : rec_cnt + 4'd1) : 4'd0;
        unique case (state)
          R_IDLE: if (bus_idle && !bus_i) begin
            state <= R_FRAME;
            dvec  <= '0;
            cvec  <= '0;
            dvec[CAN_MAX_D-1] <= 1'b0;
            pos   <= 7'd1;
            run   <= 3'd1;
            last  <= 1'b0;
          end
          R_FRAME: begin
            if (run == 3'(CAN_STUFF_RUN)) begin
              // stuff bit expected
              if (bus_i == last) begin
                stuff_err_o <= 1'b1;
                state       <= R_ERR;
                cnt         <= '0;
              end else begin
                run  <= 3'd1;
                last <= bus_i;
                if (pos == total) state <= R_DELIM;
              end
            end else begin
              logic [2:0] run_n;
              run_n = (bus_i == last) ? run + 3'd1 : 3'd1;
              run   <= run_n;
              last  <= bus_i;
              pos   <= pos + 7'd1;
              if (pos < span)
                dvec[CAN_MAX_D-1-32'(pos)] <= bus_i;
              else
                cvec[CAN_MAX_R-1-32'(pos - span)] <= bus_i;
              if (pos + 7'd1 == 7'd14 && bus_i) begin
                form_err_o <= 1'b1;          // extended frame: not handled
                state      <= R_ERR;
                cnt        <= '0;
              end else if (pos + 7'd1 == total && run_n != 3'(CAN_STUFF_RUN))
                state <= R_DELIM;
            end
          end
          R_DELIM: begin
            own    <= own_i;
            uncorr <= dec_unc;
            if (!bus_i) begin
              form_err_o <= 1'b1; state <= R_ERR; cnt <= '0;
            end else state <= R_ACK;
          end
          R_ACK: state <= R_ACKDEL;
          // An uncorrectable block takes precedence: the sender's own
          // ACK-error flag may already pull the ACK delimiter dominant.
          R_ACKDEL: if (uncorr) begin
            eedc_err_o <= !own;
            state      <= R_ERR;
            cnt        <= '0;
          end else if (!bus_i) begin
            form_err_o <= 1'b1; state <= R_ERR; cnt <= '0;
          end else begin
            state <= R_EOF; cnt <= '0;
          end
          R_EOF: if (!bus_i) begin
            form_err_o <= 1'b1; state <= R_ERR; cnt <= '0;
          end else if (cnt == 3'(CAN_EOF_BITS - 1)) begin
            state <= R_IDLE;
            if (!own) begin
              valid_o            <= 1'b1;
              frame_o.id         <= dec_data[CAN_MAX_D-2 -: CAN_ID_W];
              frame_o.rtr        <= dec_data[CAN_MAX_D-13];
              frame_o.dlc        <= dec_data[CAN_MAX_D-16 -: 4];
              frame_o.data       <= dec_data[63:0];
              corr_data_o        <= dec_cd;
              corr_check_o       <= dec_cc;
              err_pos_o          <= 7'(dec_pos);
            end
          end else cnt <= cnt + 3'd1;
          R_ERR: if (cnt == 3'(CAN_ERRFLAG_BITS - 1)) state <= R_IDLE;
                 else cnt <= cnt + 3'd1;
          default: ;
        endcase
      end
    end
  end

  // A frame is either delivered or rejected, never both in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({valid_o, stuff_err_o, form_err_o, eedc_err_o}));

endmodule
