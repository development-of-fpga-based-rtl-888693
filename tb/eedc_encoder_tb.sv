// eedc_encoder_tb: checks the EEDC encoder against the 7-bit worked example
// (data 1001110 gives redundancy bits 0110 and code word 10011100110) and,
// at the CAN size, against a reference computed from the parity definition
// for random data of every length 1..83.
module eedc_encoder_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  int checks = 0, failures = 0;

  // 7-bit example instance
  logic [6:0]  ex_data;
  logic [2:0]  ex_len;
  logic [3:0]  ex_chk;
  logic [3:0]  ex_nchk;
  logic [10:0] ex_code;

  eedc_encoder #(.MAX_D(7), .MAX_R(4)) u_ex (
    .data_i(ex_data), .len_i(ex_len), .check_o(ex_chk), .nchk_o(ex_nchk), .code_o(ex_code)
  );

  // CAN-size instance
  logic [CAN_MAX_D-1:0] data;
  logic [6:0]           len;
  logic [CAN_MAX_R-1:0] chk;
  logic [3:0]           nchk;
  logic [CAN_MAX_D+CAN_MAX_R-1:0] code;

  eedc_encoder u_dut (.data_i(data), .len_i(len), .check_o(chk), .nchk_o(nchk), .code_o(code));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex_data = 7'b1001110;
    ex_len  = 3'd7;
    #1;
    check(ex_chk == 4'b0110, $sformatf("example check %b", ex_chk));
    check(ex_nchk == 4'd4, "example r = 4");
    check(ex_code == 11'b10011100110, $sformatf("example code %b", ex_code));

    for (int t = 0; t < 600; t++) begin
      bit span[MAXB];
      bit rchk[16];
      int d, r;
      logic [CAN_MAX_D+CAN_MAX_R-1:0] exp_code;
      d = (t < 83) ? t + 1 : 1 + int'($urandom_range(82));
      for (int i = 0; i < MAXB; i++) span[i] = 0;
      data = '0;
      for (int p = 1; p <= CAN_MAX_D; p++) begin
        bit v = 1'($urandom);
        data[CAN_MAX_D-p] = v;     // bits beyond d must be ignored
        if (p <= d) span[p] = v;
      end
      len = 7'(d);
      #1;
      ref_eedc(span, d, rchk, r);
      exp_code = '0;
      for (int p = 1; p <= d; p++) exp_code[CAN_MAX_D+CAN_MAX_R-p] = span[p];
      for (int j = 0; j < r; j++)  exp_code[CAN_MAX_D+CAN_MAX_R-d-1-j] = rchk[j];
      check(32'(nchk) == r, $sformatf("len %0d: r %0d vs %0d", d, nchk, r));
      check(code == exp_code, $sformatf("len %0d: code mismatch", d));
      for (int j = 0; j < r; j++)
        check(chk[CAN_MAX_R-1-j] == rchk[j], $sformatf("len %0d check bit %0d", d, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
