// can_eedc_system_tb: end-to-end test of the emulated CAN bus at the
// default parameters (50 MHz clock, 1 Mbit/s, 64-entry replay memory).
//
// Phase 1 loads 27 frames (every length 0..8, three times) into the replay
// memory and plays them from node 0 to node 1. While they are on the bus,
// the testbench inverts chosen bits as node 1 sees them:
//   a data bit and a redundancy bit (corrected, delivered, no repeat),
//   a data bit plus a parity bit (uncorrectable: no ACK, error flag,
//   repeat), the first stuff bit (stuff error, repeat) and the first EOF bit
//   (form error, repeat).
// Every frame must reach node 1 exactly once, in order and intact; a frame
// that went through undisturbed must be followed by the next SOF after
// exactly its own length plus the 3-bit intermission.
// Phase 2 plays one frame while the host makes node 1 send a frame with a
// lower identifier at the same moment: node 1 wins arbitration, node 0
// receives its frame and then sends its own.
// Each mechanism must occur at least once.
module can_eedc_system_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  localparam int CPB = 50, SP = 37;
  localparam int NF  = 27;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic       wr_en = 0, start = 0, rbusy, rdone, hreq = 0, hrdy, hdone, bus;
  logic [5:0] wa = 0;
  logic [6:0] cnt = 0;
  logic [15:0] sent;
  can_frame_t wf, hf;
  logic [1:0] noise = 0;
  logic [1:0] rv, rcd, rcc, arb, berr, aerr, stb, serr, ferr, eerr;
  can_frame_t rxf [2];
  logic [6:0] epos [2];

  can_eedc_system u_dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_addr_i(wa), .wr_frame_i(wf), .start_i(start),
    .count_i(cnt), .replay_busy_o(rbusy), .replay_done_o(rdone), .replay_sent_o(sent),
    .host_req_valid_i(hreq), .host_req_frame_i(hf), .host_req_ready_o(hrdy),
    .host_tx_done_o(hdone), .noise_i(noise), .bus_o(bus), .rx_valid_o(rv),
    .rx_frame_o(rxf), .rx_corr_data_o(rcd), .rx_corr_check_o(rcc), .rx_err_pos_o(epos),
    .arb_lost_o(arb), .bit_err_o(berr), .ack_err_o(aerr), .stuff_bit_o(stb),
    .stuff_err_o(serr), .form_err_o(ferr), .eedc_err_o(eerr)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Replica of the nodes' bit timing.
  int pcnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pcnt <= 0;
    else        pcnt <= (pcnt == CPB - 1) ? 0 : pcnt + 1;

  can_frame_t frames [NF];
  int         mode [NF];       // disturbance on the first attempt
  int         tries [NF];
  can_frame_t got1 [$];
  can_frame_t got0 [$];

  // Mechanism counters.
  int n_corr_d = 0, n_corr_c = 0, n_eedc = 0, n_stuff_err = 0, n_form = 0, n_ack = 0,
      n_bit = 0, n_arb = 0, n_stuff_bits = 0, n_rate_ok = 0, n_rate_bad = 0;

  // Bus monitor and disturbance injector.
  int  rec = 0, bitno = -1, flip_a = -1, flip_b = -1, cur = -1, cur_len = 0;
  bit  cur_clean = 0;
  int  last_sof = -1, last_len = 0, bit_clock = 0;
  bit  last_clean = 0;

  function automatic void plan(int e);
    stream_t s;
    int i, j, k, sy;
    ref_stream(frames[e], s);
    cur_len = s.n;
    flip_a = -1; flip_b = -1;
    cur_clean = (tries[e] > 0) || mode[e] == 0;
    if (tries[e] > 0) return;
    case (mode[e])
      1: begin                                  // one data bit
        i = 0;
        while (!(flip_ok(s, i, -1) && s.upos[i] > 19 && s.upos[i] <= s.span)) i++;
        flip_a = i;
      end
      2: begin                                  // one redundancy bit
        i = s.n_stuffed_end - 1;
        while (!(flip_ok(s, i, -1) && s.upos[i] > s.span)) i--;
        flip_a = i;
      end
      3: begin                                  // data bit + parity bit
        for (i = 1; i < s.n_stuffed_end && flip_a < 0; i++)
          for (j = 1; j < s.n_stuffed_end && flip_a < 0; j++) begin
            if (s.upos[i] <= 19 || s.upos[i] > s.span || s.upos[j] <= s.span) continue;
            k = s.upos[j] - s.span - 1;
            if (k >= s.nchk - 1) continue;
            sy = s.upos[i] ^ (1 << k);
            if ($countones(sy) >= 2 && flip_ok(s, i, j)) begin
              flip_a = i; flip_b = j;
            end
          end
      end
      4: begin                                  // first stuff bit after arbitration
        i = 14;
        while (s.upos[i] != 0) i++;
        flip_a = i;
      end
      5: flip_a = s.ack_idx + 2;                // first EOF bit
      default: ;
    endcase
  endfunction

  always @(negedge clk) begin
    if (rv[1]) got1.push_back(rxf[1]);
    if (rv[0]) got0.push_back(rxf[0]);
    if (rv[1] && rcd[1]) n_corr_d++;
    if (rv[1] && rcc[1]) n_corr_c++;
    if (eerr[1]) n_eedc++;
    if (serr[1]) n_stuff_err++;
    if (ferr[1]) n_form++;
    if (aerr[0]) n_ack++;
    if (berr[0]) n_bit++;
    if (|arb) n_arb++;
    if (stb[0]) n_stuff_bits++;
    noise[1] = 1'b0;
    if (rst_n && pcnt == SP) begin
      bit_clock++;
      if (bitno < 0 && !bus && rec >= 11) begin
        // SOF: check the spacing after an undisturbed replayed frame
        cur = (got1.size() < NF && cur >= -1 && rbusy) ? got1.size() : -2;
        if (last_sof >= 0 && last_clean && cur >= 0) begin
          if (bit_clock - last_sof == last_len + 3) n_rate_ok++;
          else begin
            n_rate_bad++;
            $display("frame spacing %0d, expected %0d", bit_clock - last_sof, last_len + 3);
          end
        end
        last_sof = bit_clock;
        bitno = 0;
        if (cur >= 0) begin
          plan(cur);
          tries[cur]++;
          last_len = cur_len;
          last_clean = cur_clean;
        end else last_clean = 0;
      end else if (bitno >= 0) bitno++;
      if (bitno >= 0 && (bitno == flip_a || bitno == flip_b)) begin
        noise[1] = 1'b1;
        last_clean = 0;
      end
      rec = bus ? rec + 1 : 0;
      if (bitno >= 0 && rec >= 11) begin
        bitno = -1;
        if (cur == -2) cur = -1;
      end
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
      frames[k] = rand_frame(k % 9);
      tries[k] = 0;
      mode[k] = 0;
    end
    frames[4].data[63:32] = 32'h0000_00FF;   // forced stuffing
    mode[3] = 1; mode[12] = 1; mode[21] = 1;
    mode[5] = 2; mode[16] = 2;
    mode[6] = 3; mode[17] = 3;
    mode[4] = 4;
    mode[8] = 5;

    for (int k = 0; k < NF; k++) begin
      @(negedge clk);
      wf = frames[k]; wa = 6'(k); wr_en = 1;
    end
    @(negedge clk);
    wr_en = 0;
    repeat (20 * CPB) @(negedge clk);

    // Phase 1: replay.
    cnt = 7'(NF); start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (!rdone && t0 < NF * 400 * CPB) begin @(negedge clk); t0++; end
    check(rdone, "replay finished");
    repeat (4 * CPB) @(negedge clk);
    check(got1.size() == NF, $sformatf("%0d of %0d frames delivered", got1.size(), NF));
    for (int k = 0; k < NF && k < got1.size(); k++)
      check(got1[k] == frames[k], $sformatf("frame %0d content", k));
    check(int'(sent) == NF, "replay sent count");
    for (int k = 0; k < NF; k++)
      check(tries[k] == ((mode[k] >= 3) ? 2 : 1), $sformatf("frame %0d sent %0d times", k, tries[k]));
    check(got0.size() == 0, "node 0 received nothing");

    // Phase 2: arbitration between replay and host.
    @(negedge clk);
    wf = rand_frame(3); wf.id = 11'h300; wa = 0; wr_en = 1;
    frames[0] = wf;
    @(negedge clk);
    wr_en = 0;
    hf = rand_frame(5); hf.id = 11'h2FF;
    repeat (20 * CPB) @(negedge clk);
    while (pcnt != 1) @(negedge clk);
    cnt = 7'd1; start = 1; hreq = 1;
    #1;
    while (!hrdy) @(negedge clk);
    @(negedge clk);
    start = 0;
    hreq = 0;
    t0 = 0;
    while (!rdone && t0 < 600 * CPB) begin @(negedge clk); t0++; end
    repeat (4 * CPB) @(negedge clk);
    check(got0.size() == 1 && got0[0] == hf, $sformatf("host frame won and delivered to node 0 (%0d)", got0.size()));
    check(got1.size() == NF + 1 && got1[NF] == frames[0], "replayed frame delivered after losing");

    // Every mechanism happened.
    check(n_corr_d >= 3, $sformatf("data-bit corrections %0d", n_corr_d));
    check(n_corr_c >= 2, $sformatf("redundancy-bit corrections %0d", n_corr_c));
    check(n_eedc >= 2, $sformatf("uncorrectable EEDC errors %0d", n_eedc));
    check(n_ack >= 2, $sformatf("ACK errors %0d", n_ack));
    check(n_stuff_err >= 1, $sformatf("stuff errors %0d", n_stuff_err));
    check(n_form >= 1, $sformatf("form errors %0d", n_form));
    check(n_bit >= 2, $sformatf("bit errors %0d", n_bit));
    check(n_arb >= 1, $sformatf("arbitration losses %0d", n_arb));
    check(n_stuff_bits >= 1, $sformatf("stuff bits %0d", n_stuff_bits));
    check(n_rate_ok >= 10 && n_rate_bad == 0, $sformatf("frame spacing ok %0d bad %0d", n_rate_ok, n_rate_bad));
    $display("mechanisms: corr_data=%0d corr_check=%0d eedc_err=%0d ack_err=%0d stuff_err=%0d form_err=%0d bit_err=%0d arb_lost=%0d stuff_bits=%0d spacing_ok=%0d",
             n_corr_d, n_corr_c, n_eedc, n_ack, n_stuff_err, n_form, n_bit, n_arb, n_stuff_bits, n_rate_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
