// eedc_pkg: constants, types and helper functions shared by the EEDC CAN
// controller.
//
// The Enhanced Error Detection-Correction (EEDC) code protects a block of D
// bits with r redundancy bits that are appended directly after the data,
// instead of being interleaved at power-of-two positions as in a Hamming
// code. Data bits are numbered 1..D in transmission order. The first r-1
// redundancy bits are parities: the k-th one (k = 0, 1, ...) is the even
// parity of every data bit whose position number has bit k set. The last
// redundancy bit is the even parity of the other r-1 redundancy bits.
//
// Vectors that carry an EEDC block are left aligned: position 1 is the MSB
// of the vector, and any bits beyond position D must be zero. Check words
// are also left aligned, in transmission order (MSB first out).
//
// In the CAN frame (2.0A, 11-bit identifier) the EEDC field replaces the
// 15-bit CRC sequence and covers the same span as the CRC would: start of
// frame through the end of the data field.
package eedc_pkg;

  localparam int unsigned CAN_ID_W       = 11;
  localparam int unsigned CAN_MAX_BYTES  = 8;
  // SOF + ID(11) + RTR + IDE + r0 + DLC(4)
  localparam int unsigned CAN_HDR_BITS   = 19;
  localparam int unsigned CAN_MAX_D      = CAN_HDR_BITS + 8 * CAN_MAX_BYTES; // 83
  // Number of EEDC bits for the longest block: clog2(83+1) + 1
  localparam int unsigned CAN_MAX_R      = 8;
  localparam int unsigned CAN_STUFF_RUN  = 5;   // stuff after 5 equal bits
  localparam int unsigned CAN_EOF_BITS   = 7;
  localparam int unsigned CAN_IDLE_BITS  = 11;  // ACK delim + EOF + IFS
  localparam int unsigned CAN_ERRFLAG_BITS = 6;

  // A CAN 2.0A data or remote frame as seen by the host.
  typedef struct packed {
    logic [CAN_ID_W-1:0] id;
    logic                rtr;
    logic [3:0]          dlc;
    logic [63:0]         data;   // byte 0 in bits 63:56, sent first
  } can_frame_t;

  // Number of redundancy bits the EEDC construction needs for d data bits:
  // enough parity bits to name every position 1..d, plus the parity of
  // those parity bits.
  function automatic int unsigned eedc_nchk(input int unsigned d);
    int unsigned k;
    k = 0;
    while ((32'd1 << k) < d + 1) k++;
    return k + 1;
  endfunction

  // Data bytes carried by a frame: none for remote frames, DLC capped at 8.
  function automatic logic [3:0] can_nbytes(input logic rtr, input logic [3:0] dlc);
    if (rtr) return 4'd0;
    return (dlc > 4'd8) ? 4'd8 : dlc;
  endfunction

  // Length of the EEDC-protected span of a frame (SOF through data field).
  function automatic logic [6:0] can_eedc_len(input logic rtr, input logic [3:0] dlc);
    return 7'(CAN_HDR_BITS) + {can_nbytes(rtr, dlc), 3'b000};
  endfunction

  // Redundancy bit count for a protected span of d bits (d <= 127).
  function automatic logic [3:0] eedc_nchk_hw(input logic [6:0] d);
    logic [3:0] k;
    k = 4'd0;
    for (int i = 0; i < 7; i++)
      if ((8'd1 << i) < {1'b0, d} + 8'd1) k = 4'(i + 1);
    return k + 4'd1;
  endfunction

endpackage
