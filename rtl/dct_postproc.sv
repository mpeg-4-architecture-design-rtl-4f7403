// dct_postproc: post-processor of the 1-D DCT/IDCT unit (combinational).
//
// DCT mode: out(k) = m(k), except out(7) = -m(7).
// IDCT mode: the 14-adder arrangement
//   out(0|7) = m0 + m4 + m2 +/- m1     out(3|4) = m0 + m4 - m2 -/+ m7
//   out(1|6) = m0 - m4 + m6 +/- m3     out(2|5) = m0 - m4 - m6 +/- m5
// Outputs are two bits wider than the m(k) inputs.
module dct_postproc #(
  parameter int W = 21
) (
  input  logic                idct,
  input  logic signed [W-1:0] m [8],
  output logic signed [W+1:0] y [8]
);
  typedef logic signed [W+1:0] o_t;
  o_t e [8];
  o_t s04p, s04m, s2p, s2m, s6p, s6m;

  always_comb begin
    for (int i = 0; i < 8; i++) e[i] = o_t'(m[i]);
    s04p = e[0] + e[4];
    s04m = e[0] - e[4];
    s2p  = s04p + e[2];
    s2m  = s04p - e[2];
    s6p  = s04m + e[6];
    s6m  = s04m - e[6];
    if (!idct) begin
      for (int i = 0; i < 7; i++) y[i] = e[i];
      y[7] = -e[7];
    end else begin
      y[0] = s2p + e[1];
      y[7] = s2p - e[1];
      y[3] = s2m - e[7];
      y[4] = s2m + e[7];
      y[1] = s6p + e[3];
      y[6] = s6p - e[3];
      y[2] = s6m + e[5];
      y[5] = s6m - e[5];
    end
  end
endmodule
