// csa_tree: Wallace tree of carry-save adders.
//
// Reduces ROWS operands of W bits to one sum and one carry vector. Each layer
// groups the rows it receives in threes and feeds each group to a csa_row
// (3:2 counter); rows left over pass to the next layer unchanged. Layers
// repeat until two rows remain, so ROWS = 7 takes four layers (7-5-4-3-2).
// In the MAC the rows are the Booth partial products, their correction row
// and the fed-back accumulator, so accumulation costs no separate adder.
//   sum + carry == sum(rows_in)  (mod 2^W)
// Purely combinational. ROWS must be at least 3.
module csa_tree #(
  parameter int unsigned W    = 16,
  parameter int unsigned ROWS = 7
) (
  input  logic [W-1:0] rows_in [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Rows present after l layers.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = ROWS;
    for (int unsigned i = 0; i < l; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  for (genvar l = 0; l <= LAYERS; l++) begin : g_layer
    localparam int unsigned NR = rows_at(l);
    logic [W-1:0] r [NR];
    if (l == 0) begin : g_in
      assign r = rows_in;
    end else begin : g_csa
      localparam int unsigned NP = rows_at(l - 1);
      for (genvar g = 0; g < NP / 3; g++) begin : g_grp
        csa_row #(.W(W)) u_csa (
          .a    (g_layer[l-1].r[3*g]),
          .b    (g_layer[l-1].r[3*g+1]),
          .c    (g_layer[l-1].r[3*g+2]),
          .sum  (r[2*g]),
          .carry(r[2*g+1])
        );
      end
      for (genvar k = 0; k < NP % 3; k++) begin : g_pass
        assign r[2*(NP/3)+k] = g_layer[l-1].r[3*(NP/3)+k];
      end
    end
  end

  assign sum   = g_layer[LAYERS].r[0];
  assign carry = g_layer[LAYERS].r[1];

endmodule
