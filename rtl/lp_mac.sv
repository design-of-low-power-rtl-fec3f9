// lp_mac: low-power fused add-multiply-accumulate unit, acc += X * (A + B).
//
// The multiplier operand Y = A + B is never formed: smb_recoder turns A and B
// straight into radix-4 modified Booth digits (N/2 + 1 of them instead of N
// bits). booth_ppgen selects 0, +-X or +-2X per digit. The partial products,
// the +1 correction row of the negated ones and the fed-back accumulator all
// enter one Wallace tree of carry-save adders (csa_tree), and a single
// carry-lookahead adder (cla_adder) resolves its sum and carry into the next
// accumulator value, stored by mac_accumulator.
//
// Interface: X, A, B are N bits, two's complement when tc = 1 and unsigned
// when tc = 0; acc is ACC_W = 2N bits and wraps modulo 2^ACC_W.
// Timing: single cycle. In a cycle with en high, acc takes acc + X*(A+B) at
// the next rising edge; clr clears acc at the edge (and wins over en);
// rst_n clears it asynchronously. The datapath structure is that of the
// proposed MAC; the controls, the wrap-around and the single-cycle timing
// are this design's choices.
module lp_mac
  import mac_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned ACC_W = 2 * N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic             tc,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [ACC_W-1:0] acc
);

  localparam int unsigned ND   = mb_digits(N);
  localparam int unsigned ROWS = ND + 2;

  mb_bits_t         digit [ND];
  logic [ACC_W-1:0] pp [ND];
  logic [ACC_W-1:0] neg_row;
  logic [ACC_W-1:0] tree_in [ROWS];
  logic [ACC_W-1:0] cs_sum, cs_carry, acc_next;
  logic             unused_cout;

  smb_recoder #(.N(N)) u_recoder (
    .a    (a),
    .b    (b),
    .tc   (tc),
    .digit(digit)
  );

  booth_ppgen #(.N(N), .W(ACC_W)) u_ppgen (
    .x      (x),
    .tc     (tc),
    .digit  (digit),
    .rows   (pp),
    .neg_row(neg_row)
  );

  always_comb begin
    for (int unsigned i = 0; i < ND; i++) tree_in[i] = pp[i];
    tree_in[ND]   = neg_row;
    tree_in[ND+1] = acc;
  end

  csa_tree #(.W(ACC_W), .ROWS(ROWS)) u_tree (
    .rows_in(tree_in),
    .sum    (cs_sum),
    .carry  (cs_carry)
  );

  // The carry out is beyond the accumulator width and is dropped (wrap).
  cla_adder #(.W(ACC_W)) u_cla (
    .a   (cs_sum),
    .b   (cs_carry),
    .cin (1'b0),
    .sum (acc_next),
    .cout(unused_cout)
  );

  mac_accumulator #(.W(ACC_W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .clr  (clr),
    .d    (acc_next),
    .q    (acc)
  );

endmodule
