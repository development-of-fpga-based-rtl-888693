// eedc_data_rate_tb: frame length and payload rate for frames of 1 to 8
// data bytes, on the complete system at its default parameters
// (1 Mbit/s).
//
// Replays four random frames of each length and measures on the bus the
// time from one SOF to the next, which must equal the frame's own stuffed
// length plus the 3-bit intermission. For comparison, the testbench also
// builds the same frame with the classical 15-bit CRC sequence
// (x^15+x^14+x^10+x^8+x^7+x^4+x^3+1 over SOF..data, stuffed the same
// way) and requires every EEDC frame to be shorter. It prints the mean
// bits per frame and the payload rate for both.
module eedc_data_rate_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  localparam int CPB = 50, SP = 37;
  localparam int PER = 4;
  localparam int NF  = 8 * PER + 1;   // one extra frame closes the last gap

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic       wr_en = 0, start = 0, rbusy, rdone, bus;
  logic [5:0] wa = 0;
  logic [6:0] cnt = 0;
  can_frame_t wf, hf;
  logic [1:0] rv;
  can_frame_t rxf [2];

  can_eedc_system u_dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_addr_i(wa), .wr_frame_i(wf), .start_i(start),
    .count_i(cnt), .replay_busy_o(rbusy), .replay_done_o(rdone), .replay_sent_o(),
    .host_req_valid_i(1'b0), .host_req_frame_i(hf), .host_req_ready_o(),
    .host_tx_done_o(), .noise_i(2'b00), .bus_o(bus), .rx_valid_o(rv),
    .rx_frame_o(rxf), .rx_corr_data_o(), .rx_corr_check_o(), .rx_err_pos_o(),
    .arb_lost_o(), .bit_err_o(), .ack_err_o(), .stuff_bit_o(),
    .stuff_err_o(), .form_err_o(), .eedc_err_o()
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Length of the same frame with a CRC-15 field: SOF..data, 15 CRC bits,
  // stuffed, plus the 10-bit trailer and 3-bit intermission.
  function automatic int crc_frame_bits(can_frame_t f);
    bit span[MAXB];
    bit raw[MAXB];
    int d, nraw;
    logic [14:0] crc;
    stream_t s;
    ref_span(f, span, d);
    crc = '0;
    for (int i = 1; i <= d; i++) begin
      bit fb = span[i] ^ crc[14];
      crc = {crc[13:0], 1'b0};
      if (fb) crc ^= 15'h4599;
    end
    nraw = 0;
    for (int i = 1; i <= d; i++) raw[nraw++] = span[i];
    for (int i = 14; i >= 0; i--) raw[nraw++] = crc[i];
    ref_stuff(raw, nraw, s);
    return s.n + 3;
  endfunction

  int pcnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pcnt <= 0;
    else        pcnt <= (pcnt == CPB - 1) ? 0 : pcnt + 1;

  can_frame_t frames [NF];
  int sof_at [NF];
  int nsof = 0, rec = 0, bit_clock = 0, ngot = 0;
  bit in_frame = 0;

  always @(negedge clk) begin
    if (rv[1]) begin
      check(ngot < NF && rxf[1] == frames[ngot], $sformatf("frame %0d delivered", ngot));
      ngot++;
    end
    if (rst_n && pcnt == SP) begin
      bit_clock++;
      if (!in_frame && !bus && rec >= 11) begin
        in_frame = 1;
        if (nsof < NF) sof_at[nsof] = bit_clock;
        nsof++;
      end
      rec = bus ? rec + 1 : 0;
      if (in_frame && rec >= 11) in_frame = 0;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NF; k++) begin
      frames[k] = rand_frame(1 + (k / PER) % 8);
      @(negedge clk);
      wf = frames[k]; wa = 6'(k); wr_en = 1;
    end
    @(negedge clk);
    wr_en = 0;
    repeat (20 * CPB) @(negedge clk);
    cnt = 7'(NF); start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (!rdone && t0 < NF * 200 * CPB) begin @(negedge clk); t0++; end
    check(rdone, "replay finished");
    repeat (4 * CPB) @(negedge clk);
    check(ngot == NF && nsof == NF, $sformatf("%0d frames, %0d SOFs", ngot, nsof));

    $display("bytes  EEDC bits/frame  CRC bits/frame  EEDC payload kbit/s  CRC payload kbit/s");
    for (int n = 1; n <= 8; n++) begin
      int sum_e, sum_c;
      sum_e = 0;
      sum_c = 0;
      for (int k = (n - 1) * PER; k < n * PER; k++) begin
        stream_t s;
        int meas, cbits;
        ref_stream(frames[k], s);
        meas  = sof_at[k + 1] - sof_at[k];
        cbits = crc_frame_bits(frames[k]);
        check(meas == s.n + 3, $sformatf("frame %0d: %0d bits on the bus, expected %0d", k, meas, s.n + 3));
        check(meas < cbits, $sformatf("frame %0d: EEDC %0d bits not shorter than CRC %0d", k, meas, cbits));
        sum_e += meas;
        sum_c += cbits;
      end
      $display("%5d  %15.2f  %14.2f  %19.1f  %18.1f", n, real'(sum_e) / PER, real'(sum_c) / PER,
               1000.0 * 8 * n * PER / sum_e, 1000.0 * 8 * n * PER / sum_c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
