// act_unit: the ReLU / Scale stage between the PE array and the activation
// memory.
//
// PE results are 16-bit 2's complement. The unit optionally applies ReLU,
// then the per-layer activation scale of x1, x2 or x0.5 (a 1-bit shift, as the
// document proposes for keeping activations in range after weight scaling),
// and finally converts to the sign-magnitude form in which the next layer
// reads its input activations. x2 saturates; x0.5 is an arithmetic shift that
// drops the LSB; -32768 maps to magnitude 32767. Those rounding and saturation
// rules are this design's choices. Purely combinational.
module act_unit
  import kws_pkg::*;
(
  input  act_t   din,     // 2's complement
  input  logic   relu,
  input  scale_e scale,
  output act_t   dout     // sign-magnitude
);
  logic signed [16:0] x;
  logic        neg;
  logic [16:0] mag;
  always_comb begin
    x = 17'(signed'(din));
    if (relu && x < 0) x = '0;
    unique case (scale)
      SCALE_X2:   x = x <<< 1;
      SCALE_HALF: x = x >>> 1;
      default:    x = x;
    endcase
    neg  = x < 0;
    mag  = neg ? 17'(-x) : 17'(x);
    if (mag > 17'd32767) mag = 17'd32767;
    dout = {neg && (mag != '0), mag[14:0]};
  end
endmodule
