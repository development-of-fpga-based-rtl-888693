// can_bit_timing: bit-rate prescaler for the CAN controller.
//
// Divides the system clock into CAN bit periods of CLK_HZ / BIT_RATE clock
// cycles. tx_pt_o pulses for one cycle at the start of every bit (where a
// node changes the value it drives) and sample_pt_o pulses once per bit at
// SAMPLE_PCT percent of the bit (where every node reads the bus). The
// counter restarts on reset only: all nodes of the emulated bus run from
// the same clock and reset, so no resynchronisation is needed.
//
// The bit rates of the CAN standard (10 kbit/s to 1 Mbit/s) are the
// document's; the 50 MHz clock and the 75 % sample point are this design's
// choice.
module can_bit_timing #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BIT_RATE   = 1_000_000,
  parameter int unsigned SAMPLE_PCT = 75,
  localparam int unsigned CPB       = CLK_HZ / BIT_RATE,
  localparam int unsigned SP        = CPB * SAMPLE_PCT / 100,
  localparam int unsigned CW        = $clog2(CPB)
) (
  input  logic clk,
  input  logic rst_n,
  output logic tx_pt_o,
  output logic sample_pt_o
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    cnt <= '0;
    else if (cnt == CW'(CPB - 1))  cnt <= '0;
    else                           cnt <= cnt + CW'(1);

  assign tx_pt_o     = (cnt == '0);
  assign sample_pt_o = (cnt == CW'(SP));

  initial assert (CPB >= 4 && SP > 0 && SP < CPB)
    else $error("bit period too short for the chosen clock");

endmodule
