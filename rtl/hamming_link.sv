// hamming_link: transmitter and receiver of the 64-bit Hamming link, side by side.
//
// The transmitter (hamenc) turns datain into the 71-bit code word tx_code that
// is sent over the channel. The receiver (hamdec) takes the word rx_code that
// arrives from the channel, finds and inverts a single corrupted bit, and
// returns the 64 data bits with the error position and the ded / ne flags.
// The channel itself (a noisy medium) is not logic, so tx_code and rx_code are
// separate ports: connect them directly for a noiseless link, or put a model of
// the noise between them.
//
// Timing: tx_code is combinational from datain; the receiver outputs are
// registered, one clk after rx_code. rst_n is active-low and synchronous.
module hamming_link
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT,
  parameter int unsigned PAR_W  = par_bits(DATA_W),
  parameter int unsigned CODE_W = DATA_W + PAR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // transmitter side
  input  logic [1:DATA_W]  datain,
  output logic [1:CODE_W]  tx_code,
  // receiver side
  input  logic [1:CODE_W]  rx_code,
  output logic [1:DATA_W]  dataout,
  output logic [PAR_W-1:0] errloc,
  output logic             ded,
  output logic             ne
);

  hamenc #(.DATA_W(DATA_W), .PAR_W(PAR_W), .CODE_W(CODE_W)) u_enc (
    .datain (datain),
    .hamout (tx_code)
  );

  hamdec #(.DATA_W(DATA_W), .PAR_W(PAR_W), .CODE_W(CODE_W)) u_dec (
    .clk     (clk),
    .rst_n   (rst_n),
    .hamin   (rx_code),
    .dataout (dataout),
    .errloc  (errloc),
    .ded     (ded),
    .ne      (ne)
  );

endmodule
