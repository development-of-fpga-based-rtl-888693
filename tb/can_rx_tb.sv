// can_rx_tb: plays reference bit streams onto a wired-AND bus shared with
// the receiver, with its own bit-timing strobes. Checks, for frames of
// 0..8 data bytes: the dominant ACK, delivery on the last EOF bit with the
// right content; a corrected single data-bit error (position reported,
// data restored, frame acknowledged); a corrected redundancy-bit error; an
// uncorrectable double error (no ACK, error flag after the ACK delimiter,
// nothing delivered); a stuff error; a form error in the delimiter; and
// that a frame sent by the node itself is neither acknowledged nor
// delivered.
module can_rx_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  localparam int CPB = 10, SP = 7;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   pcnt = 0;
  logic tx_pt, sample_pt;
  always_ff @(posedge clk) pcnt <= (pcnt == CPB - 1) ? 0 : pcnt + 1;
  assign tx_pt     = (pcnt == 0);
  assign sample_pt = (pcnt == SP);

  logic       tb_drv = 1, drive, own = 0;
  wire        bus = tb_drv & drive;
  logic       valid, cd, cc, serr, ferr, eerr;
  logic [6:0] epos;
  can_frame_t frame;

  can_rx u_dut (
    .clk, .rst_n, .tx_pt_i(tx_pt), .sample_pt_i(sample_pt), .bus_i(bus), .own_i(own),
    .drive_o(drive), .valid_o(valid), .frame_o(frame), .corr_data_o(cd),
    .corr_check_o(cc), .err_pos_o(epos), .stuff_err_o(serr), .form_err_o(ferr),
    .eedc_err_o(eerr)
  );

  bit  cap [512];
  int  n_valid, n_serr, n_ferr, n_eerr, valid_bit;
  can_frame_t got;
  bit  got_cd, got_cc;
  int  got_pos;
  int  bitno = -1;

  always @(negedge clk) begin
    if (valid) begin
      n_valid++; got = frame; got_cd = cd; got_cc = cc; got_pos = int'(epos);
      valid_bit = bitno;
    end
    if (serr) n_serr++;
    if (ferr) n_ferr++;
    if (eerr) n_eerr++;
    if (sample_pt && bitno >= 0 && bitno < 512) cap[bitno] = bus;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Plays b[0..n-1] followed by `tail` recessive bits; bitno tracks the bit
  // on the bus.
  task automatic play(input stream_t s, input int n, input int tail);
    n_valid = 0; n_serr = 0; n_ferr = 0; n_eerr = 0;
    for (int i = 0; i < n + tail; i++) begin
      @(negedge clk);
      while (!tx_pt) @(negedge clk);
      tb_drv = (i < n) ? s.b[i] : 1'b1;
      bitno = i;
    end
    @(negedge clk);
    while (!tx_pt) @(negedge clk);
    bitno = -1;
    tb_drv = 1;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s, t;
    can_frame_t f;
    int i, j, k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (15 * CPB) @(posedge clk);

    // Clean frames.
    for (int dlc = 0; dlc <= 8; dlc++) begin
      f = rand_frame(dlc);
      ref_stream(f, s);
      play(s, s.n, 4);
      check(cap[s.ack_idx] == 0, $sformatf("dlc %0d: no ACK", dlc));
      check(n_valid == 1 && got == f, $sformatf("dlc %0d: frame not delivered intact", dlc));
      check(valid_bit == s.n - 1 || valid_bit == s.n, $sformatf("dlc %0d: delivered at bit %0d, EOF ends at %0d", dlc, valid_bit, s.n - 1));
      check(!got_cd && !got_cc, "clean frame marked corrected");
    end

    // Remote frame.
    f = rand_frame(3); f.rtr = 1; f.data = '0;
    ref_stream(f, s);
    play(s, s.n, 4);
    check(n_valid == 1 && got == f && cap[s.ack_idx] == 0, "remote frame");

    // Single data-bit error anywhere in the span except the RTR, IDE, r0
    // and DLC bits (a wrong length moves the EEDC field), corrected.
    for (int n = 0; n < 20; n++) begin
      f = rand_frame(1 + n % 8);
      ref_stream(f, s);
      do i = int'($urandom_range(s.n_stuffed_end - 1));
      while (!flip_ok(s, i, -1) || s.upos[i] > s.span || i == 0 || (s.upos[i] >= 13 && s.upos[i] <= 19));
      t = s; t.b[i] ^= 1;
      play(t, t.n, 4);
      check(cap[s.ack_idx] == 0, "corrected frame not acknowledged");
      check(n_valid == 1 && got == f, $sformatf("data error at %0d not corrected", s.upos[i]));
      check(got_cd && got_pos == s.upos[i], $sformatf("position %0d reported as %0d", s.upos[i], got_pos));
    end

    // Single redundancy-bit error, corrected.
    for (int n = 0; n < 10; n++) begin
      f = rand_frame(n % 9);
      ref_stream(f, s);
      do i = int'($urandom_range(s.n_stuffed_end - 1));
      while (!flip_ok(s, i, -1) || s.upos[i] <= s.span);
      t = s; t.b[i] ^= 1;
      play(t, t.n, 4);
      check(n_valid == 1 && got == f && got_cc && !got_cd, "redundancy-bit error not corrected");
      check(cap[s.ack_idx] == 0, "ACK after redundancy-bit error");
    end

    // Uncorrectable: one data bit and one position-parity bit whose
    // syndrome has two or more bits set.
    for (int n = 0; n < 10; n++) begin
      int sy;
      f = rand_frame(2 + n % 7);
      ref_stream(f, s);
      do begin
        i = int'($urandom_range(s.n_stuffed_end - 1));
        j = int'($urandom_range(s.n_stuffed_end - 1));
        k = s.upos[j] - s.span - 1;                 // parity index
        sy = s.upos[i] ^ (1 << k);
      end while (!flip_ok(s, i, j) || s.upos[i] > s.span || i == 0 ||
                 (s.upos[i] >= 13 && s.upos[i] <= 19) ||
                 s.upos[j] <= s.span || k >= s.nchk - 1 || $countones(sy) < 2);
      t = s; t.b[i] ^= 1; t.b[j] ^= 1;
      play(t, t.n, 18);
      check(cap[s.ack_idx] == 1, "uncorrectable frame acknowledged");
      check(n_valid == 0 && n_eerr == 1, "uncorrectable frame not flagged");
      for (int e = 1; e <= 6; e++)
        check(cap[s.ack_idx + 1 + e] == 0, "error flag after ACK delimiter");
      repeat (12 * CPB) @(posedge clk);
    end

    // Stuff error: the first stuff bit replaced by a sixth equal bit.
    f = rand_frame(2); f.id = 11'h000;
    ref_stream(f, s);
    t = s;
    for (i = 0; t.upos[i] != 0; i++);
    t.b[i] ^= 1;
    play(t, i + 1, 20);
    check(n_serr == 1 && n_valid == 0, "stuff error");
    check(cap[i + 1] == 0 && cap[i + 6] == 0, "error flag after stuff error");
    repeat (12 * CPB) @(posedge clk);

    // Form error: dominant delimiter.
    f = rand_frame(1);
    ref_stream(f, s);
    t = s; t.b[s.n_stuffed_end] = 0;
    play(t, s.n_stuffed_end + 1, 20);
    check(n_ferr == 1 && n_valid == 0, "form error");
    repeat (12 * CPB) @(posedge clk);

    // Own frame: no ACK, not delivered.
    own = 1;
    f = rand_frame(4);
    ref_stream(f, s);
    play(s, s.n, 4);
    check(cap[s.ack_idx] == 1 && n_valid == 0, "own frame acknowledged or delivered");
    own = 0;

    // Back to normal.
    f = rand_frame(8);
    ref_stream(f, s);
    play(s, s.n, 4);
    check(n_valid == 1 && got == f, "frame after errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
