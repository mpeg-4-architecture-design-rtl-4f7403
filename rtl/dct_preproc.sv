// dct_preproc: pre-processor of the 1-D DCT/IDCT unit (purely combinational).
//
// Forms the eight butterfly operands d8(0..3), d4(0..1), d2(0), s2(0) from
// the eight parallel inputs in(0..7). In DCT mode it uses twelve adders:
// the odd-part differences, the 4-point differences, and the two partial
// sums d2' = in0+in7+in3+in4 and s2' = in1+in6+in2+in5 of the reduced-adder
// form; the last butterfly (d2' -/+ s2') is folded into the multiplier-adder.
// In IDCT mode the operands are the inputs reordered: d8 = (in1, in3, -in7,
// in5), d4 = (in2, in6), d2 = in4, s2 = in0. Operands are W+3 bits wide so
// that the 4-input sums of the DCT cannot overflow.
module dct_preproc #(
  parameter int W = 12
) (
  input  logic                 idct,
  input  logic signed [W-1:0]  x [8],
  output logic signed [W+2:0]  d8 [4],
  output logic signed [W+2:0]  d4 [2],
  output logic signed [W+2:0]  d2,
  output logic signed [W+2:0]  s2
);
  typedef logic signed [W+2:0] op_t;
  op_t e [8];
  op_t a07, a16, a25, a34;

  always_comb begin
    for (int i = 0; i < 8; i++) e[i] = op_t'(x[i]);
    a07 = e[0] + e[7];
    a16 = e[1] + e[6];
    a25 = e[2] + e[5];
    a34 = e[3] + e[4];
    if (!idct) begin
      d8[0] = e[0] - e[7];
      d8[1] = e[1] - e[6];
      d8[2] = e[4] - e[3];
      d8[3] = e[2] - e[5];
      d4[0] = a07 - a34;
      d4[1] = a16 - a25;
      d2    = a07 + a34;
      s2    = a16 + a25;
    end else begin
      d8[0] = e[1];
      d8[1] = e[3];
      d8[2] = -e[7];
      d8[3] = e[5];
      d4[0] = e[2];
      d4[1] = e[6];
      d2    = e[4];
      s2    = e[0];
    end
  end
endmodule
