// hamdec_tb: self-checking test of the Hamming decoder at 64 data bits.
//
// Code words are built here with a reference encoder of its own: data bits go
// to the non-power-of-two positions and the redundancy bits are chosen so that
// the XOR of the indices of all set bits is zero. Each word is sent to the
// decoder either clean, with one bit inverted (every position 1..71 in turn,
// then random ones), or with two bits inverted, and the outputs are checked
// one clock later: dataout must be the original data for zero or one error,
// errloc the inverted position (the XOR of the two positions for two errors),
// ded set and ne clear exactly when some bit was inverted. The published
// example (71'h35AA5555AAAAAAAA55, position 3 corrupted) is checked too, and
// so is the one-clock latency: outputs must not change before the clock edge.
module hamdec_tb;
  localparam int DATA_W = 64;
  localparam int CODE_W = 71;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [1:CODE_W] hamin;
  logic [1:DATA_W] dataout;
  logic [6:0]      errloc;
  logic            ded, ne;
  int checks = 0, failures = 0;

  hamdec dut (.clk(clk), .rst_n(rst_n), .hamin(hamin), .dataout(dataout),
              .errloc(errloc), .ded(ded), .ne(ne));

  always #5 clk = ~clk;

  function automatic logic [1:CODE_W] ref_encode(input logic [1:DATA_W] d);
    logic [1:CODE_W] c;
    logic [6:0] s;
    int k;
    c = '0;
    k = 1;
    s = '0;
    for (int p = 1; p <= CODE_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        if (d[k]) s ^= 7'(p);
        k++;
      end
    end
    for (int r = 0; r < 7; r++) c[1 << r] = s[r];
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: hamin=%h dataout=%h errloc=%0d ded=%b ne=%b",
               what, hamin, dataout, errloc, ded, ne);
    end
  endtask

  // Drive a word after a falling edge, check it was not yet taken, then check
  // the result after the rising edge.
  task automatic send(input logic [1:DATA_W] d, input int pos_a, input int pos_b);
    logic [1:CODE_W] w;
    logic [6:0] loc;
    logic [1:DATA_W] prev_out;
    w = ref_encode(d);
    loc = '0;
    if (pos_a > 0) begin w[pos_a] = ~w[pos_a]; loc ^= 7'(pos_a); end
    if (pos_b > 0) begin w[pos_b] = ~w[pos_b]; loc ^= 7'(pos_b); end
    @(negedge clk);
    prev_out = dataout;
    hamin = w;
    #1;
    check(dataout == prev_out, "output changed before the clock edge");
    @(posedge clk);
    #1;
    if (pos_b == 0) check(dataout == d, "corrected data");
    check(errloc == loc, "error location");
    check(ded == (loc != 0), "ded flag");
    check(ne == (loc == 0), "ne flag");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    hamin = '0;
    repeat (2) @(posedge clk);
    #1;
    check(ne == 1'b1 && ded == 1'b0 && dataout == '0, "reset values");
    @(negedge clk);
    rst_n = 1'b1;

    // Published example: clean word, then position 3 corrupted.
    @(negedge clk);
    hamin = 71'h25AA5555AAAAAAAA55;
    @(posedge clk); #1;
    check(dataout == 64'h5555_5555_5555_5555 && ne && !ded && errloc == 0, "example, clean");
    @(negedge clk);
    hamin = 71'h35AA5555AAAAAAAA55;
    @(posedge clk); #1;
    check(dataout == 64'h5555_5555_5555_5555 && errloc == 7'b0000011 && ded && !ne,
          "example, error at position 3");

    send(64'h5555_5555_5555_5555, 0, 0);
    for (int p = 1; p <= CODE_W; p++) send({$urandom, $urandom}, p, 0);
    repeat (500) send({$urandom, $urandom}, 0, 0);
    repeat (1000) send({$urandom, $urandom}, 1 + int'($urandom_range(CODE_W - 1)), 0);
    // Two errors: only the syndrome is defined (XOR of the two positions).
    repeat (200) begin
      int a, b;
      a = 1 + int'($urandom_range(CODE_W - 1));
      b = 1 + int'($urandom_range(CODE_W - 1));
      if (a != b) send({$urandom, $urandom}, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
