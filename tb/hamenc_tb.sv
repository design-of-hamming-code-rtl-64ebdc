// hamenc_tb: self-checking test of the Hamming encoder at 64 data bits.
//
// Checks, against values worked out here and not by the encoder:
//  * the published example: data 64'h5555_5555_5555_5555 must give the code
//    word 71'h25AA5555AAAAAAAA55, and data of all zeros the all-zero word;
//  * for random data, the first redundancy bit against the written-out
//    equation R(1) = D1^D2^D4^D5^D7^...^D64;
//  * for random data, that the data bits sit in the non-power-of-two
//    positions in order, and that the XOR of the indices of all set bits of
//    the code word is zero (the defining property of a Hamming code word).
module hamenc_tb;
  localparam int DATA_W = 64;
  localparam int CODE_W = 71;

  logic [1:DATA_W] datain;
  logic [1:CODE_W] hamout;
  int checks = 0, failures = 0;

  hamenc dut (.datain(datain), .hamout(hamout));

  // Data bits entering R(1), as listed in the encoder equation.
  localparam int R1_TERMS[35] = '{1, 2, 4, 5, 7, 9, 11, 12, 14, 16, 18, 20, 22, 24, 26, 27,
                                  29, 31, 33, 35, 37, 39, 41, 43, 45, 47, 49, 51, 53, 55,
                                  57, 58, 60, 62, 64};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: datain=%h hamout=%h", what, datain, hamout);
    end
  endtask

  task automatic check_word();
    logic r1;
    int   k;
    logic [6:0] idx_xor;
    bit   data_ok;
    r1 = 1'b0;
    for (int i = 0; i < 35; i++) r1 ^= datain[R1_TERMS[i]];
    check(hamout[1] == r1, "R(1) equation");
    k = 1;
    data_ok = 1;
    idx_xor = '0;
    for (int p = 1; p <= CODE_W; p++) begin
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32 && p != 64) begin
        if (hamout[p] != datain[k]) data_ok = 0;
        k++;
      end
      if (hamout[p]) idx_xor ^= 7'(p);
    end
    check(data_ok, "data placement");
    check(idx_xor == '0, "zero syndrome");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    datain = 64'h5555_5555_5555_5555;
    #1;
    check(hamout == 71'h25AA5555AAAAAAAA55, "published example");
    check_word();
    datain = '0;
    #1;
    check(hamout == '0, "all zero");
    datain = '1;
    #1;
    check_word();
    for (int i = 0; i < 64; i++) begin   // every single data bit alone
      datain = '0;
      datain[i+1] = 1'b1;
      #1;
      check_word();
    end
    repeat (2000) begin
      datain = {$urandom, $urandom};
      #1;
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
