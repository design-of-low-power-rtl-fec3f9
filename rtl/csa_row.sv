// csa_row: one W-bit carry-save adder (a row of full adders, a 3:2 counter).
//
// Adds three W-bit operands without carry propagation: sum is the bitwise
// sum, carry the bitwise carries already shifted to their weight, so
// a + b + c == sum + carry (mod 2^W). Combinational, one full-adder delay.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Majority of the lower W-1 bits; the carry of the top bit is dropped.
  logic [W-2:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a[W-2:0] & b[W-2:0]) | (c[W-2:0] & (a[W-2:0] ^ b[W-2:0]));
  assign carry = {maj, 1'b0};

endmodule
