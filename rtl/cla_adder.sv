// cla_adder: carry-lookahead adder, the single carry-propagate adder at the
// end of the MAC datapath.
//
// Bits are grouped by GROUP. Inside a group every carry is computed directly
// from the generate (g = a & b) and propagate (p = a ^ b) signals and the
// group's carry-in, c[j+1] = g[j] | p[j]g[j-1] | ... | p[j..0]cin, so no
// carry ripples inside a group; groups pass their carry to the next one.
//   {cout, sum} == a + b + cin
// Purely combinational. The group size is this design's choice.
module cla_adder #(
  parameter int unsigned W     = 16,
  parameter int unsigned GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic [W:0] cv;
    logic term, pp;
    cv    = '0;
    cv[0] = cin;
    for (int unsigned base = 0; base < W; base += GROUP) begin
      for (int unsigned j = base; j < base + GROUP && j < W; j++) begin
        // Lookahead carry into bit j+1 from the group's carry-in.
        term = g[j];
        pp   = p[j];
        for (int m = int'(j) - 1; m >= int'(base); m--) begin
          term = term | (pp & g[m]);
          pp   = pp & p[m];
        end
        cv[j+1] = term | (pp & cv[base]);
      end
    end
    c = cv;
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
