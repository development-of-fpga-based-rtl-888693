// can_frame_replay_tb: loads random frames into the replay memory, plays a
// part of them and stands in for the transmitter, accepting each offered
// frame after a random delay and reporting it sent some cycles later. The
// frames must arrive in stored order, one at a time, and the sent count and
// done pulse must match. A second run replays from entry 0 again.
module can_frame_replay_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       wr_en = 0, start = 0, rv, rr = 0, tdone = 0, busy, done;
  logic [5:0] wa = 0;
  logic [6:0] cnt = 0;
  logic [15:0] sent;
  can_frame_t wf, rf;
  can_frame_t ref_mem [64];

  can_frame_replay u_dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_addr_i(wa), .wr_frame_i(wf), .start_i(start),
    .count_i(cnt), .req_valid_o(rv), .req_frame_o(rf), .req_ready_i(rr), .tx_done_i(tdone),
    .busy_o(busy), .done_o(done), .sent_o(sent)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int sent0);
    @(negedge clk);
    cnt = 7'(n); start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < n; k++) begin
      int c = 0;
      while (!rv && c < 100) begin @(negedge clk); c++; end
      check(rv, "no frame offered");
      check(rf == ref_mem[k], $sformatf("entry %0d wrong", k));
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        check(rv && rf == ref_mem[k], "offer withdrawn");
      end
      rr = 1;
      @(negedge clk);
      rr = 0;
      repeat (2 + $urandom_range(10)) begin
        check(!rv, "second offer before done");
        @(negedge clk);
      end
      check(!done, "done too early");
      tdone = 1;
      @(negedge clk);
      tdone = 0;
    end
    check(done && !busy, "done pulse after last frame");
    check(int'(sent) == sent0 + n, "sent count");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      ref_mem[k] = rand_frame(k % 9);
      wf = ref_mem[k]; wa = 6'(k); wr_en = 1;
    end
    @(negedge clk);
    wr_en = 0;
    run(20, 0);
    run(64, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
