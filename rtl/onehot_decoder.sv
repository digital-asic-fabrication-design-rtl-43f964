// onehot_decoder: binary-to-one-hot decoder, 5-to-32 by default.
//
// Output bit i is high exactly when the input equals i, so every input value
// drives exactly one output high. Purely combinational. The framework uses it
// to turn the project index held in a control register into one select line
// per project slot.
module onehot_decoder #(
  parameter int unsigned IN_W  = 5,
  parameter int unsigned OUT_W = 1 << IN_W
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < OUT_W; i++)
      out[i] = (in == IN_W'(i));
  end

endmodule
