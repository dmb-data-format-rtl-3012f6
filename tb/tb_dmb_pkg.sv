// tb_dmb_pkg: checks the DMB_L1_PIPE encoder of dmb_pkg.
//
// For every backlog 0..511 the 8-bit field must decode, as
// N = bits[6:0] * 8**bit7, to the backlog itself below 128 and to the
// backlog rounded down to a multiple of 8 from 128 on, with a mantissa of
// at most 63 (so the largest value reported is 504). Also checks the word
// signatures against their hex values.
module tb_dmb_pkg;
  import dmb_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] f;
    int         dec;
    for (int n = 0; n < 512; n++) begin
      f   = l1pipe_encode(9'(n));
      dec = f[7] ? int'(f[6:0]) * 8 : int'(f[6:0]);
      expect_eq(dec, (n < 128) ? n : (n / 8) * 8, $sformatf("decode(encode(%0d))", n));
      if (f[7]) expect_eq(int'(f[6:0] <= 7'd63), 1, $sformatf("mantissa of %0d", n));
    end
    expect_eq(int'(SIG_LONE), 8, "lone signature");
    expect_eq(int'(SIG_H1), 9, "header 1 signature");
    expect_eq(int'(SIG_H2), 10, "header 2 signature");
    expect_eq(int'(SIG_TR1), 15, "trailer 1 signature");
    expect_eq(int'(SIG_TR2), 14, "trailer 2 signature");
    expect_eq(N_FEB, 7, "board count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
