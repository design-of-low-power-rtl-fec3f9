// booth_encoder: radix-4 modified Booth selection logic for one digit.
//
// Takes the three digit bits {y2k+1, y2k, y2k-1} and produces the operation
// of the modified Booth recoding table: multiplicand times 0, +1, +2, -1 or -2.
//   000, 111 -> 0      001, 010 -> +1    011 -> +2
//   100      -> -2     101, 110 -> -1
// The output is one-hot magnitude (one, two) plus a sign (neg); neg is 0 for
// both zero rows so that a zero digit adds no correction bit. The table is
// the one of the modified Booth algorithm; the one/two/neg encoding is this
// design's choice. Purely combinational.
module booth_encoder
  import mac_pkg::*;
(
  input  mb_bits_t bits,
  output mb_ctrl_t ctrl
);

  always_comb begin
    ctrl.one = bits.p1 ^ bits.p2;
    ctrl.two = (bits.n & ~bits.p1 & ~bits.p2) | (~bits.n & bits.p1 & bits.p2);
    ctrl.neg = bits.n & ~(bits.p1 & bits.p2);
  end

endmodule
