// eedc_decoder_tb: builds EEDC code words with the reference model for
// random data of every length 1..83, then presents them to the decoder
// with no error, one flipped data bit, one flipped redundancy bit and two
// flipped bits. Single errors must be reported as corrected, with the
// right position and the original data restored; a double error must
// never be reported as error-free. Also replays the 7-bit worked example
// with each of its 11 bits flipped in turn.
module eedc_decoder_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [CAN_MAX_D-1:0] data, data_o;
  logic [6:0]           len, syn, epos;
  logic [CAN_MAX_R-1:0] chk, chk_o;
  logic ok, cd, cc, unc;

  eedc_decoder u_dut (
    .data_i(data), .len_i(len), .check_i(chk), .data_o(data_o), .check_o(chk_o),
    .syndrome_o(syn), .err_pos_o(epos), .ok_o(ok), .corr_data_o(cd),
    .corr_check_o(cc), .uncorr_o(unc)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 800; t++) begin
      bit span[MAXB];
      bit rchk[16];
      int d, r, mode, e1, e2;
      logic [CAN_MAX_D-1:0] good_d;
      logic [CAN_MAX_R-1:0] good_c;
      if (t < 44) begin
        // worked example: 1001110 / 0110, each bit flipped in turn
        d = 7;
        for (int i = 0; i < MAXB; i++) span[i] = 0;
        span[1] = 1; span[4] = 1; span[5] = 1; span[6] = 1;
      end else begin
        d = 1 + int'($urandom_range(82));
        for (int i = 0; i < MAXB; i++) span[i] = 0;
        for (int p = 1; p <= d; p++) span[p] = 1'($urandom);
      end
      ref_eedc(span, d, rchk, r);
      good_d = '0;
      good_c = '0;
      for (int p = 1; p <= d; p++) good_d[CAN_MAX_D-p] = span[p];
      for (int j = 0; j < r; j++)  good_c[CAN_MAX_R-1-j] = rchk[j];
      if (t < 4) begin
        check(d != 7 || good_c[7:4] == 4'b0110, "example redundancy bits");
      end
      data = good_d;
      chk  = good_c;
      len  = 7'(d);
      mode = (t < 44) ? ((t % 11) < 7 ? 1 : 2) : int'($urandom_range(3));
      e1   = (t < 44) ? (t % 11) + 1 : 0;
      if (mode == 1) begin
        if (t >= 44) e1 = 1 + int'($urandom_range(d - 1));
        data[CAN_MAX_D-e1] = ~data[CAN_MAX_D-e1];
      end else if (mode == 2) begin
        e2 = (t < 44) ? e1 - 8 : int'($urandom_range(r - 1));
        chk[CAN_MAX_R-1-e2] = ~chk[CAN_MAX_R-1-e2];
      end else if (mode == 3) begin
        e1 = 1 + int'($urandom_range(d + r - 1));
        do e2 = 1 + int'($urandom_range(d + r - 1)); while (e2 == e1);
        if (e1 <= d) data[CAN_MAX_D-e1] = ~data[CAN_MAX_D-e1];
        else         chk[CAN_MAX_R-1-(e1-d-1)] = ~chk[CAN_MAX_R-1-(e1-d-1)];
        if (e2 <= d) data[CAN_MAX_D-e2] = ~data[CAN_MAX_D-e2];
        else         chk[CAN_MAX_R-1-(e2-d-1)] = ~chk[CAN_MAX_R-1-(e2-d-1)];
      end
      #1;
      case (mode)
        0: begin
          check(ok && !cd && !cc && !unc, $sformatf("t%0d len %0d: clean word flagged", t, d));
          check(data_o == good_d, "clean data changed");
        end
        1: begin
          check(cd && !ok && !cc && !unc, $sformatf("t%0d len %0d: data error at %0d not corrected", t, d, e1));
          check(32'(epos) == e1, $sformatf("t%0d: position %0d vs %0d", t, epos, e1));
          check(data_o == good_d, $sformatf("t%0d: data not restored", t));
        end
        2: begin
          check(cc && !ok && !cd && !unc, $sformatf("t%0d len %0d: check error not corrected", t, d));
          check(data_o == good_d && chk_o == good_c, $sformatf("t%0d: word not restored", t));
        end
        default:
          check(!ok, $sformatf("t%0d len %0d: double error %0d,%0d missed", t, d, e1, e2));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
