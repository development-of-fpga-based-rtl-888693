// eedc_random_error_tb: random-error behaviour of the EEDC code at every
// CAN frame length (span of 19 + 8n bits, n = 0..8).
//
// Encodes random blocks with eedc_encoder, inverts 1, 2 or 3 random bits of
// the code word (data and redundancy bits alike) and decodes with
// eedc_decoder. Single errors must all be corrected; double errors must
// never pass as error-free. For double and triple errors the testbench
// reports how many were flagged uncorrectable, how many were
// miscorrected, and how many slipped through undetected.
module eedc_random_error_tb;
  import eedc_pkg::*;

  localparam int LW = $clog2(CAN_MAX_D + 1);
  localparam int TRIALS = 3000;

  int checks = 0, failures = 0;

  logic [CAN_MAX_D-1:0] data, rdata, cdata;
  logic [LW-1:0]        len;
  logic [CAN_MAX_R-1:0] chk, rchk;
  logic [3:0]           nchk;
  logic ok, cd, cc, unc;

  eedc_encoder u_enc (.data_i(data), .len_i(len), .check_o(chk), .nchk_o(nchk), .code_o());
  eedc_decoder u_dec (
    .data_i(rdata), .len_i(len), .check_i(rchk), .data_o(cdata), .check_o(),
    .syndrome_o(), .err_pos_o(), .ok_o(ok), .corr_data_o(cd), .corr_check_o(cc), .uncorr_o(unc)
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

  initial begin
    int flagged [4], miscorr [4], fixed [4], missed [4];
    for (int e = 1; e <= 3; e++) begin
      flagged[e] = 0; miscorr[e] = 0; fixed[e] = 0; missed[e] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        int n, d, r, pos [3];
        n = t % 9;
        d = 19 + 8 * n;
        data = '0;
        for (int p = 1; p <= d; p++) data[CAN_MAX_D-p] = 1'($urandom);
        len = LW'(d);
        #1;
        r = int'(nchk);
        rdata = data;
        rchk  = chk;
        for (int k = 0; k < e; k++) begin
          bit dup;
          do begin
            pos[k] = 1 + int'($urandom_range(d + r - 1));
            dup = 0;
            for (int m = 0; m < k; m++) if (pos[m] == pos[k]) dup = 1;
          end while (dup);
          if (pos[k] <= d) rdata[CAN_MAX_D-pos[k]] = ~rdata[CAN_MAX_D-pos[k]];
          else             rchk[CAN_MAX_R-1-(pos[k]-d-1)] = ~rchk[CAN_MAX_R-1-(pos[k]-d-1)];
        end
        #1;
        if (unc)                     flagged[e]++;
        else if (ok)                 missed[e]++;
        else if (cdata == data)      fixed[e]++;
        else                         miscorr[e]++;
        if (e == 1) check((cd || cc) && cdata == data, $sformatf("single error at %0d not corrected", pos[0]));
        if (e == 2) check(!ok, "double error passed as clean");
      end
      $display("%0d-bit errors: %0d trials, corrected %0d, flagged %0d, miscorrected %0d, undetected %0d",
               e, TRIALS, fixed[e], flagged[e], miscorr[e], missed[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
