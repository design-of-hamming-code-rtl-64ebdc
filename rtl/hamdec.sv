// hamdec: Hamming decoder (receiver side) for the code word made by hamenc.
//
// The received word hamin[1:CODE_W] (71 bits by default) is checked by even
// parity: syndrome bit r is the XOR of every received position whose index has
// bit r set, redundancy bit included. A zero syndrome means no error; otherwise
// the syndrome is the position of the single corrupted bit (for example 0000011
// for position 3), and that bit is inverted. The redundancy bits are then dropped
// and the DATA_W data bits (64 by default) are returned in order.
//
// Outputs: dataout (corrected data), errloc (the syndrome, i.e. error position),
// ded (an error was detected) and ne (no error). A syndrome above CODE_W cannot
// come from one flipped bit; it still raises ded but nothing is inverted.
// A plain Hamming code corrects one error; with two or more errors the output
// is wrong, as the design intends only single error correction.
//
// Timing: the correction is combinational and all outputs are registered on the
// rising edge of clk, so results appear one clock after hamin. rst_n
// (active-low, synchronous) clears the outputs and sets ne. The design does
// the check and correction and uses one clock; the output register, the reset
// and the handling of syndromes above CODE_W are this code's choices.
module hamdec
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT,
  parameter int unsigned PAR_W  = par_bits(DATA_W),
  parameter int unsigned CODE_W = DATA_W + PAR_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:CODE_W] hamin,
  output logic [1:DATA_W] dataout,
  output logic [PAR_W-1:0] errloc,
  output logic            ded,
  output logic            ne
);

  logic [PAR_W-1:0] syndrome;
  logic [1:CODE_W]  corrected;
  logic [1:DATA_W]  data_c;

  // Even-parity check over each group of positions.
  always_comb begin
    for (int unsigned r = 0; r < PAR_W; r++) begin
      syndrome[r] = 1'b0;
      for (int unsigned p = 1; p <= CODE_W; p++)
        if (((p >> r) & 1) != 0) syndrome[r] ^= hamin[p];
    end
  end

  // Invert the bit the syndrome points at, then drop the redundancy bits.
  always_comb begin
    int unsigned k;
    for (int unsigned p = 1; p <= CODE_W; p++)
      corrected[p] = hamin[p] ^ (int'(syndrome) == p);
    k = 1;
    data_c = '0;
    for (int unsigned p = 1; p <= CODE_W; p++) begin
      if (!is_par_pos(p)) begin
        data_c[k] = corrected[p];
        k++;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dataout <= '0;
      errloc  <= '0;
      ded     <= 1'b0;
      ne      <= 1'b1;
    end else begin
      dataout <= data_c;
      errloc  <= syndrome;
      ded     <= (syndrome != '0);
      ne      <= (syndrome == '0);
    end
  end

endmodule
