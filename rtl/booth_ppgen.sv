// booth_ppgen: radix-4 Booth partial product rows for X * Y.
//
// Each Booth digit of the multiplier Y selects 0, +-X or +-2X (booth_encoder).
// Row i is that multiple, sign-extended to W bits and shifted left by 2i. A
// negative multiple is formed as the one's complement of the positive one;
// the missing +1 of each negation is a correction bit at position 2i, and as
// those positions never coincide they are all collected in neg_row. The
// selection rule is the modified Booth algorithm; full-width sign extension
// and the single correction row are this design's choices.
//
//   sum(rows) + neg_row == X * sum_i 4^i * digit_i   (mod 2^W)
//
// X is two's complement when tc = 1, unsigned otherwise (it is zero-extended
// by one bit, so the same signed rows serve both). Purely combinational.
module booth_ppgen
  import mac_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned W  = 16,
  parameter int unsigned ND = mb_digits(N)
) (
  input  logic [N-1:0] x,
  input  logic         tc,
  input  mb_bits_t     digit [ND],
  output logic [W-1:0] rows [ND],
  output logic [W-1:0] neg_row
);

  // X extended by one bit (sign or zero), then to the row width.
  logic [N:0]   xe;
  logic [W-1:0] x1, x2;

  assign xe = {tc & x[N-1], x};
  assign x1 = W'({{(W > N + 1 ? W - N - 1 : 0){xe[N]}}, xe});
  assign x2 = W'({x1, 1'b0});

  mb_ctrl_t ctrl [ND];

  for (genvar i = 0; i < ND; i++) begin : g_row
    logic [W-1:0] mag;
    booth_encoder u_enc (.bits(digit[i]), .ctrl(ctrl[i]));
    assign mag     = ctrl[i].two ? x2 : (ctrl[i].one ? x1 : '0);
    assign rows[i] = W'((ctrl[i].neg ? ~mag : mag) << (2 * i));
  end

  always_comb begin
    neg_row = '0;
    for (int unsigned i = 0; i < ND; i++)
      if (2 * i < W) neg_row[2*i] = ctrl[i].neg;
  end

endmodule
