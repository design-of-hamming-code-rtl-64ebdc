// hamming_link_tb: end-to-end test of the 64-bit Hamming link at its default size.
//
// The testbench plays the source, the channel and the destination. Each
// operation takes a data word, lets the transmitter encode it, passes the
// 71-bit word through a channel model that leaves it intact or inverts one bit
// (a data position or a redundancy position), feeds it to the receiver and,
// one clock later, checks the recovered data, the error position and the
// ded / ne flags against what the channel did. The channel model is the only
// source of expected values; the code word itself is checked against a
// Hamming property (the XOR of the indices of its set bits is zero) and
// against the published example 64'h5555... -> 71'h25AA5555AAAAAAAA55.
//
// Each mechanism is counted: clean transfer (ne), error detected and corrected
// in a data bit, and in a redundancy bit. A mechanism that never happened is
// a failure.
module hamming_link_tb;
  localparam int DATA_W = 64;
  localparam int CODE_W = 71;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [1:DATA_W] datain;
  logic [1:CODE_W] tx_code;
  logic [1:CODE_W] rx_code;
  logic [1:DATA_W] dataout;
  logic [6:0]      errloc;
  logic            ded, ne;

  int checks = 0, failures = 0;
  int n_clean = 0, n_fix_data = 0, n_fix_par = 0;

  hamming_link dut (.clk(clk), .rst_n(rst_n), .datain(datain), .tx_code(tx_code),
                    .rx_code(rx_code), .dataout(dataout), .errloc(errloc),
                    .ded(ded), .ne(ne));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: datain=%h tx=%h rx=%h dataout=%h errloc=%0d ded=%b ne=%b",
               what, datain, tx_code, rx_code, dataout, errloc, ded, ne);
    end
  endtask

  // flip_pos = 0: noiseless channel; otherwise that position is inverted.
  task automatic transfer(input logic [1:DATA_W] d, input int flip_pos);
    logic [6:0] idx_xor;
    @(negedge clk);
    datain = d;
    #1;
    idx_xor = '0;
    for (int p = 1; p <= CODE_W; p++) if (tx_code[p]) idx_xor ^= 7'(p);
    check(idx_xor == '0, "transmitted word is a code word");
    rx_code = tx_code;
    if (flip_pos > 0) rx_code[flip_pos] = ~rx_code[flip_pos];
    @(posedge clk);
    #1;
    check(dataout == d, "recovered data");
    check(errloc == 7'(flip_pos), "error location");
    check(ded == (flip_pos != 0) && ne == (flip_pos == 0), "flags");
    if (ne && flip_pos == 0) n_clean++;
    if (ded && flip_pos != 0 && dataout == d) begin
      if ((flip_pos & (flip_pos - 1)) == 0) n_fix_par++;
      else n_fix_data++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    datain = '0;
    rx_code = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Published example, clean and with the third bit inverted.
    datain = 64'h5555_5555_5555_5555;
    #1;
    check(tx_code == 71'h25AA5555AAAAAAAA55, "published code word");
    transfer(64'h5555_5555_5555_5555, 0);
    transfer(64'h5555_5555_5555_5555, 3);

    for (int p = 1; p <= CODE_W; p++) transfer({$urandom, $urandom}, p);
    repeat (3000) begin
      if ($urandom_range(2) == 0) transfer({$urandom, $urandom}, 0);
      else transfer({$urandom, $urandom}, 1 + int'($urandom_range(CODE_W - 1)));
    end

    $display("mechanisms: clean=%0d corrected_data_bit=%0d corrected_redundancy_bit=%0d",
             n_clean, n_fix_data, n_fix_par);
    check(n_clean > 0, "clean transfer happened");
    check(n_fix_data > 0, "data-bit correction happened");
    check(n_fix_par > 0, "redundancy-bit correction happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
