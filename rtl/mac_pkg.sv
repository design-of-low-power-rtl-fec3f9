// mac_pkg: types shared by the add-multiply-accumulate datapath.
//
// A radix-4 modified Booth digit is carried between blocks in its raw
// three-bit form, mb_bits_t, whose value is -2*n + p1 + p2 (n is the
// negatively weighted bit y2k+1, p1 is y2k, p2 is y2k-1). The Booth encoder
// turns it into the selection signals mb_ctrl_t that pick 0, +-X or +-2X.
package mac_pkg;

  // Raw Booth digit: value = -2*n + p1 + p2, range -2..+2.
  typedef struct packed {
    logic n;   // y2k+1, weight -2
    logic p1;  // y2k,   weight +1
    logic p2;  // y2k-1, weight +1
  } mb_bits_t;

  // Partial product selection for one digit.
  typedef struct packed {
    logic neg;  // negate the selected multiple
    logic one;  // select X
    logic two;  // select 2X
  } mb_ctrl_t;

  // Number of Booth digits for an N-bit sum recoding: one per bit pair,
  // one for the top term of the sum, and one more for odd widths.
  function automatic int unsigned mb_digits(int unsigned n);
    return (n + 1) / 2 + 1;
  endfunction

  // Value of a raw digit, for checks and reference models.
  function automatic int mb_value(mb_bits_t d);
    return -2 * int'(d.n) + int'(d.p1) + int'(d.p2);
  endfunction

endpackage
