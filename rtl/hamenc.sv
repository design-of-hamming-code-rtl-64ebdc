// hamenc: Hamming encoder (transmitter side) for DATA_W-bit words, 64 by default.
//
// Purely combinational. The input word datain[1:DATA_W] is spread over the code
// word hamout[1:CODE_W] (71 bits by default): data bits go, in order, to every
// position that is not a power of two, and each power-of-two position 2**r gets
// the even-parity redundancy bit R(2**r), the XOR of all data bits whose code
// position has bit r set. For the default size this is the 64-bit / 7-check-bit /
// 71-bit code of the design; R(1), for instance, is D1^D2^D4^D5^D7^D9^... .
//
// Both buses use ascending ranges, so element 1 is the leftmost (most significant)
// bit: datain = 64'h5555_5555_5555_5555 gives hamout = 71'h25AA5555AAAAAAAA55.
//
// Interface: datain in, hamout out, no clock; the output follows the input
// after the XOR-tree delay. Port names and numbering follow the design; the
// loop formulation of the parity trees is this code's own.
module hamenc
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEFAULT,
  parameter int unsigned PAR_W  = par_bits(DATA_W),
  parameter int unsigned CODE_W = DATA_W + PAR_W
) (
  input  logic [1:DATA_W] datain,
  output logic [1:CODE_W] hamout
);

  logic [1:CODE_W] placed;   // data in its positions, zeros at the parity positions

  always_comb begin
    int unsigned k;
    k = 1;
    placed = '0;
    for (int unsigned p = 1; p <= CODE_W; p++) begin
      if (!is_par_pos(p)) begin
        placed[p] = datain[k];
        k++;
      end
    end
  end

  always_comb begin
    hamout = placed;
    for (int unsigned r = 0; r < PAR_W; r++) begin
      logic parity;
      parity = 1'b0;
      for (int unsigned p = 1; p <= CODE_W; p++)
        if (((p >> r) & 1) != 0) parity ^= placed[p];
      hamout[1 << r] = parity;
    end
  end

endmodule
