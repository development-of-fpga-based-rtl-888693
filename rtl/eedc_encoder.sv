// eedc_encoder: combinational EEDC encoder.
//
// Computes the redundancy bits of the Enhanced Error Detection-Correction
// code for a block of `len` data bits and appends them right after the data.
// Data bit at position i (1 = first transmitted, held in data_i[MAX_D-i]) is
// folded into an accumulator as acc ^= i when the bit is 1. Bit k of the
// accumulator is then the even parity of all data bits whose position has
// bit k set, which is the parity rule of the document's worked example
// (positions 1,3,5,7 / 2,3,6,7 / 4,5,6,7 for a 7-bit word). With
// K = clog2(len+1) such parity bits, the last redundancy bit is the even
// parity of those K bits, so r = K + 1.
//
// Interface: data_i is left aligned; bits beyond position len are ignored.
// check_o holds the r redundancy bits left aligned in transmission order
// (parity for position bit 0 first, the parity-of-parities last); nchk_o is
// r. code_o is the complete code word: the data followed by the redundancy
// bits, left aligned. Purely combinational, no latency.
//
// The parity rule and the placement after the data follow the document;
// deriving r from the highest position number (rather than from the
// inequality (D + r + 1) <= 2^r alone) is what makes the worked example's
// construction single-error-correcting for every length.
module eedc_encoder
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = CAN_MAX_D,
  parameter int unsigned MAX_R = CAN_MAX_R,
  localparam int unsigned LW   = $clog2(MAX_D + 1)
) (
  input  logic [MAX_D-1:0]       data_i,
  input  logic [LW-1:0]          len_i,
  output logic [MAX_R-1:0]       check_o,
  output logic [3:0]             nchk_o,
  output logic [MAX_D+MAX_R-1:0] code_o
);

  logic [LW-1:0] acc;
  logic [3:0]    k;       // number of position parity bits

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

  always_comb begin
    logic par;
    check_o = '0;
    par     = 1'b0;
    for (int unsigned j = 0; j < LW; j++)
      if (j < 32'(k)) begin
        check_o[MAX_R-1-j] = acc[j];
        par ^= acc[j];
      end
    for (int unsigned j = 0; j < MAX_R; j++)
      if (j == 32'(k)) check_o[MAX_R-1-j] = par;
    nchk_o = k + 4'd1;
  end

  always_comb begin
    logic [MAX_D-1:0] masked;
    for (int unsigned i = 1; i <= MAX_D; i++)
      masked[MAX_D-i] = (i <= 32'(len_i)) ? data_i[MAX_D-i] : 1'b0;
    code_o = {masked, {MAX_R{1'b0}}} | ({check_o, {MAX_D{1'b0}}} >> len_i);
  end

  initial assert (MAX_R >= eedc_nchk(MAX_D))
    else $error("MAX_R too small for MAX_D");

endmodule
