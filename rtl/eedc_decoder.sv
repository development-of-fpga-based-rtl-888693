// eedc_decoder: combinational EEDC checker and single-error corrector.
//
// Recomputes the position parities of the received data bits (the same
// accumulator as eedc_encoder) and compares them with the received
// redundancy bits. The K-bit difference is the syndrome s; the parity of
// the received position-parity bits against the received last bit gives p.
//   s == 0, p == 0 : no error.
//   s != 0, p == 0 : one data bit is wrong, at position s; it is inverted
//                    (uncorrectable if s points beyond the data).
//   p == 1, s has at most one bit set : one redundancy bit is wrong; the
//                    data is good and the redundancy bits are repaired.
//   p == 1, s has two or more bits set : uncorrectable error detected.
// Two data-bit errors give p == 0 and a wrong s, so, as with a Hamming
// code, they may be miscorrected; the code guarantees single-error
// correction only.
//
// Interface: data_i is left aligned with len_i valid bits; check_i holds the
// received redundancy bits left aligned in transmission order. Outputs are
// the corrected data and check word, the syndrome, the error position (1
// based, 0 for none or for an error in the redundancy bits) and one-hot
// status flags. Purely combinational.
//
// The syndrome-and-correct procedure follows the document's description of
// the Hamming decoder applied to the EEDC bit placement; the treatment of
// the last redundancy bit is this design's reading of its role in the
// worked example.
module eedc_decoder
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = CAN_MAX_D,
  parameter int unsigned MAX_R = CAN_MAX_R,
  localparam int unsigned LW   = $clog2(MAX_D + 1)
) (
  input  logic [MAX_D-1:0] data_i,
  input  logic [LW-1:0]    len_i,
  input  logic [MAX_R-1:0] check_i,
  output logic [MAX_D-1:0] data_o,
  output logic [MAX_R-1:0] check_o,
  output logic [LW-1:0]    syndrome_o,
  output logic [LW-1:0]    err_pos_o,
  output logic             ok_o,          // no error
  output logic             corr_data_o,   // single data-bit error corrected
  output logic             corr_check_o,  // single redundancy-bit error corrected
  output logic             uncorr_o       // error detected, not correctable
);

  logic [LW-1:0] acc, rcv, s;
  logic [3:0]    k;
  logic          p;

  always_comb begin
    acc = '0;
    for (int unsigned i = 1; i <= MAX_D; i++)
      if (i <= 32'(len_i) && data_i[MAX_D-i])
        acc ^= LW'(i);
  end

  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < LW; i++)
      if ((32'd1 << i) < 32'(len_i) + 1) k = 4'(i + 1);
  end

  // Received position parities and the received parity-of-parities bit.
  always_comb begin
    rcv = '0;
    p   = 1'b0;
    for (int unsigned j = 0; j < LW; j++)
      if (j < 32'(k)) begin
        rcv[j] = check_i[MAX_R-1-j];
        p     ^= check_i[MAX_R-1-j];
      end
    for (int unsigned j = 0; j < MAX_R; j++)
      if (j == 32'(k)) p ^= check_i[MAX_R-1-j];
    s = acc ^ rcv;
  end

  always_comb begin
    logic s_le1;  // at most one bit of s set
    s_le1        = (s & (s - LW'(1))) == '0;
    syndrome_o   = s;
    data_o       = data_i;
    check_o      = check_i;
    err_pos_o    = '0;
    ok_o         = 1'b0;
    corr_data_o  = 1'b0;
    corr_check_o = 1'b0;
    uncorr_o     = 1'b0;
    if (s == '0 && !p) begin
      ok_o = 1'b1;
    end else if (!p) begin
      if (s <= len_i) begin
        corr_data_o = 1'b1;
        err_pos_o   = s;
        for (int unsigned i = 1; i <= MAX_D; i++)
          if (32'(s) == i) data_o[MAX_D-i] = ~data_i[MAX_D-i];
      end else begin
        uncorr_o = 1'b1;
      end
    end else if (s_le1) begin
      corr_check_o = 1'b1;
      for (int unsigned j = 0; j < MAX_R; j++) begin
        if (j < LW && j < 32'(k) && s[j]) check_o[MAX_R-1-j] = ~check_i[MAX_R-1-j];
        if (j == 32'(k) && s == '0)       check_o[MAX_R-1-j] = ~check_i[MAX_R-1-j];
      end
    end else begin
      uncorr_o = 1'b1;
    end
  end

endmodule
