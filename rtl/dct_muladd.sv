// dct_muladd: multiplier-adder unit of the 1-D DCT/IDCT (combinational).
//
// Four multipliers MUL0..MUL3 form operand x coefficient products; Adder0
// sums MUL0+MUL1, Adder1 sums MUL2+MUL3 and the final adder sums the two.
// One output m(k) of the 8-point transform is produced per use; the caller
// selects operands and coefficients for each k. The sum is reduced to
// ACC_W bits by true rounding (add one half of the new LSB, less one unit
// for negative sums so that halves round away from zero, then drop SHIFT
// bits) and saturated to the ACC_W range.
module dct_muladd #(
  parameter int OP_W   = 15,
  parameter int CF_W   = 13,
  parameter int ACC_W  = 21,
  parameter int SHIFT  = 5
) (
  input  logic signed [OP_W-1:0]  op [4],
  input  logic signed [CF_W-1:0]  cf [4],
  output logic signed [ACC_W-1:0] acc
);
  localparam int P_W = OP_W + CF_W;
  localparam int S_W = P_W + 2;
  typedef logic signed [S_W-1:0] sum_t;

  sum_t p [4];
  sum_t add0, add1, fin, rnd;
  localparam sum_t MAXV = sum_t'((64'sd1 <<< (ACC_W - 1)) - 1);
  localparam sum_t MINV = sum_t'(-(64'sd1 <<< (ACC_W - 1)));

  always_comb begin
    for (int i = 0; i < 4; i++) p[i] = sum_t'(op[i]) * sum_t'(cf[i]);
    add0 = p[0] + p[1];
    add1 = p[2] + p[3];
    fin  = add0 + add1;
    // round half away from zero, so that the rounding has no bias
    rnd  = (fin + (sum_t'(1) <<< (SHIFT - 1)) - sum_t'(fin < 0)) >>> SHIFT;
    if (rnd > MAXV)      acc = ACC_W'(MAXV);
    else if (rnd < MINV) acc = ACC_W'(MINV);
    else                 acc = ACC_W'(rnd);
  end
endmodule
