// smb_recoder: direct sum-to-modified-Booth (S-MB) recoding of Y = A + B.
//
// Instead of adding A and B with a carry-propagate adder and Booth-recoding
// the result, the sum is recoded directly into radix-4 Booth digits so the
// multiplier can start at once. Every digit i (weight 4^i) comes out as three
// bits {n, p1, p2} with value -2*n + p1 + p2, so that
//   A + B = sum_i 4^i * (-2*n_i + p1_i + p2_i).
//
// Slice j covers bit positions 2j and 2j+1 and receives two carries, c1 and
// c2, both of weight 4^j:
//   - a conventional full adder at 2j adds a[2j], b[2j], c1 -> sum s, carry h;
//   - a full adder at 2j+1 adds a[2j+1], b[2j+1], h -> sum t, carry co.
//     The positively weighted t at 2^(2j+1) is rewritten as -t*2^(2j+1) +
//     t*2^(2j+2): t becomes the negative Booth bit n of this digit and is also
//     sent upward as carry c2, co as carry c1;
//   - digit j = {n = t, p1 = s, p2 = c2 from below}.
// For two's complement operands (tc = 1) the sign bits weigh negatively, so
// the top pair uses the signed cell FA* (-2*co + s = -p - q + ci) at its odd
// position and for an odd width the lone sign position does the same at the
// end (the FA** cell). The cell types (FA, FA*, FA**) follow the S-MB1 scheme;
// how the cells are wired into slices is this design's own arrangement.
//
// Purely combinational; ND = (N+1)/2 + 1 digits. The carry c1 ripples through
// the slices, two full-adder delays per digit.
module smb_recoder
  import mac_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned ND = mb_digits(N)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         tc,       // 1: two's complement, 0: unsigned
  output mb_bits_t     digit [ND]
);

  localparam int unsigned K = N / 2;   // complete bit pairs
  localparam bit ODD = (N % 2) == 1;

  // c1: carry into the even-position full adder; c2: carry into the digit.
  logic [K:0] c1, c2;

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;

  // Raw digits for the pair slices.
  mb_bits_t pair_digit [K];
  // Values of the signed top cell of an even-width sum.
  logic top_s, top_co;

  for (genvar j = 0; j < K; j++) begin : g_slice
    logic s, h, t, co;
    // Conventional full adder at the even position.
    assign s = a[2*j] ^ b[2*j] ^ c1[j];
    assign h = (a[2*j] & b[2*j]) | (c1[j] & (a[2*j] ^ b[2*j]));
    // Full adder at the odd position (conventional for positive weights).
    assign t  = a[2*j+1] ^ b[2*j+1] ^ h;
    assign co = (a[2*j+1] & b[2*j+1]) | (h & (a[2*j+1] ^ b[2*j+1]));
    assign c1[j+1] = co;
    assign c2[j+1] = t;
    assign pair_digit[j] = '{n: t, p1: s, p2: c2[j]};
  end

  if (!ODD) begin : g_even
    // Signed top pair: FA* with the sign bits negative, ci = h positive:
    // -2*co + s = h - a - b, i.e. s = a^b^h, co = majority(a, b, ~h).
    logic hs, as_, bs;
    assign hs  = g_slice[K-1].h;
    assign as_ = a[N-1];
    assign bs  = b[N-1];
    assign top_s  = as_ ^ bs ^ hs;
    assign top_co = (as_ & bs) | (~hs & (as_ ^ bs));

    always_comb begin
      for (int unsigned i = 0; i < K - 1; i++) digit[i] = pair_digit[i];
      if (tc) begin
        // s at 2^(N-1) is positive: rewrite as -s*2^(N-1) + s*2^N.
        digit[K-1] = '{n: top_s, p1: pair_digit[K-1].p1, p2: pair_digit[K-1].p2};
        // Top term y_K = s - co, written as -2*co + co + s.
        digit[K]   = '{n: top_co, p1: top_co, p2: top_s};
      end else begin
        digit[K-1] = pair_digit[K-1];
        digit[K]   = '{n: 1'b0, p1: c1[K], p2: c2[K]};
      end
    end
  end else begin : g_odd
    // Lone top bit at position 2K: FA (unsigned) or FA** (signed).
    logic at, bt, ls, lco_u, lco_s;
    assign at = a[N-1];
    assign bt = b[N-1];
    assign ls    = at ^ bt ^ c1[K];
    assign lco_u = (at & bt) | (c1[K] & (at ^ bt));   // a + b + c = 2co + s
    assign lco_s = (at & bt) | (~c1[K] & (at ^ bt));  // -a - b + c = -2co + s
    assign top_s  = ls;
    assign top_co = tc ? lco_s : lco_u;

    always_comb begin
      for (int unsigned i = 0; i < K; i++) digit[i] = pair_digit[i];
      // Signed: -2*co + s + c2. Unsigned: 2co + s + c2 = (-2co + s + c2) + 4co.
      digit[K]   = '{n: top_co, p1: top_s, p2: c2[K]};
      digit[K+1] = '{n: 1'b0, p1: tc ? 1'b0 : top_co, p2: 1'b0};
    end
  end

endmodule
