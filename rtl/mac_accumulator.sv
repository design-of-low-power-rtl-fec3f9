// mac_accumulator: the accumulator register Z of the MAC.
//
// Holds the running result and feeds it back into the carry-save tree, so
// each accumulation adds the new product to all previous ones. On a rising
// clock edge it loads d when en is high, loads zero when clr is high (clr
// wins over en), and otherwise holds. rst_n clears it asynchronously. The
// feedback role follows the MAC's accumulator unit; the clear, enable and
// reset controls are this design's choices.
module mac_accumulator #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end

endmodule
