// pe_mac: the arithmetic of one processing element.
//
// Input activations (16-bit) and weights (8-bit) arrive in sign-magnitude form.
// Their magnitudes go through an unsigned 15x7-bit multiplier and the product
// sign is the XOR of the two sign bits, as the document describes. The weight
// is Q1.7, so the 22-bit magnitude product is rounded (half up) and shifted
// right by 7, which always fits in 15 bits. The sign-magnitude product is then
// folded into a 2's complement accumulation: the adder-and-subtractor adds the
// magnitude bit-inverted when the product is negative and uses the product sign
// as its carry-in, so acc + (-p) = acc + ~p + 1 needs no separate negation.
// When sel_spatial is set the adder's second operand is instead the 2's
// complement spatial sum from the previous PE (carry-in 0).
// The sum is saturated to 16 bits; the document only says the adder output is
// "truncated and rounded to 16-bit", so saturation is this design's choice.
// Purely combinational; the accumulator register lives in the PE.
module pe_mac
  import kws_pkg::*;
(
  input  act_t acc,          // 2's complement accumulator value
  input  act_t ia_sm,        // sign-magnitude input activation
  input  wgt_t w_sm,         // sign-magnitude Q1.7 weight
  input  logic sel_spatial,  // 1: add spatial_in instead of the product
  input  act_t spatial_in,   // 2's complement spatial sum
  output act_t prod_sm,      // sign-magnitude rounded product (for observation)
  output act_t sum           // saturated 2's complement result
);
  logic [21:0] mag_full;
  logic [14:0] mag;
  logic        psign;
  logic [15:0] operand;
  logic        cin;

  always_comb begin
    mag_full = 22'(ia_sm[14:0]) * 22'(w_sm[6:0]);
    mag      = 15'((mag_full + 22'd64) >> W_FRAC);
    psign    = (ia_sm[15] ^ w_sm[7]) && (mag != '0);
    prod_sm  = {psign, mag};
    if (sel_spatial) begin
      operand = spatial_in;
      cin     = 1'b0;
    end else begin
      operand = {1'b0, mag} ^ {16{psign}};
      cin     = psign;
    end
    sum = sat17(17'({acc[15], acc}) + 17'({operand[15], operand}) + 17'(cin));
  end
endmodule
