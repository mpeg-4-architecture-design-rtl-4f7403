// inv_quantizer: MPEG-4 inverse quantizer (H.263 method), four stages.
//
//   intra DC : F = QF * dc_scaler
//   others   : F = 0 for QF = 0, otherwise
//              |F| = QP * (2*|QF| + 1)       for odd QP
//              |F| = QP * (2*|QF| + 1) - 1   for even QP
//              with the sign of QF,
// so that every reconstruction level is odd. Results are limited to
// -2048..2047. Coefficients enter one per cycle with their block index and
// raster position and leave four cycles later with the same tags. The rules
// follow the design; the stage split is this design's choice.
module inv_quantizer
  import tex_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [QP_W-1:0] qp,
  input  logic            intra,
  input  logic            in_valid,
  input  coef_t           in_data,
  input  logic [2:0]      in_blk,
  input  logic [5:0]      in_pix,
  output logic            out_valid,
  output coef_t           out_data,
  output logic [2:0]      out_blk,
  output logic [5:0]      out_pix
);
  logic        s1_v, s1_neg, s1_dc, s1_zero;
  logic [12:0] s1_mag;
  logic [5:0]  s1_m;
  logic [2:0]  s1_blk, s2_blk, s3_blk;
  logic [5:0]  s1_pix, s2_pix, s3_pix;
  logic        s2_v, s2_neg, s2_dc, s2_zero;
  logic [18:0] s2_p;
  logic        s3_v, s3_neg;
  logic [18:0] s3_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 0; s1_neg <= 0; s1_dc <= 0; s1_zero <= 1; s1_mag <= '0; s1_m <= '0;
      s1_blk <= '0; s1_pix <= '0;
      s2_v <= 0; s2_neg <= 0; s2_dc <= 0; s2_zero <= 1; s2_p <= '0; s2_blk <= '0; s2_pix <= '0;
      s3_v <= 0; s3_neg <= 0; s3_a <= '0; s3_blk <= '0; s3_pix <= '0;
      out_valid <= 0; out_data <= '0; out_blk <= '0; out_pix <= '0;
    end else begin
      // stage 1: magnitude and multiplier operand
      s1_v    <= in_valid;
      s1_neg  <= in_data[11];
      s1_zero <= (in_data == '0);
      s1_dc   <= intra && (in_pix == 6'd0);
      s1_blk  <= in_blk;
      s1_pix  <= in_pix;
      if (intra && in_pix == 6'd0) begin
        s1_mag <= in_data[11] ? 13'(12'(-in_data)) : 13'(in_data);
        s1_m   <= dc_scaler(qp, is_chroma(in_blk));
      end else begin
        s1_mag <= in_data[11] ? {12'(-in_data), 1'b1} : {12'(in_data), 1'b1};
        s1_m   <= {1'b0, qp};
      end
      // stage 2: multiply
      s2_v <= s1_v; s2_neg <= s1_neg; s2_dc <= s1_dc; s2_zero <= s1_zero;
      s2_blk <= s1_blk; s2_pix <= s1_pix;
      s2_p <= 19'(s1_mag) * 19'(s1_m);
      // stage 3: even-QP correction and zero
      s3_v <= s2_v; s3_neg <= s2_neg; s3_blk <= s2_blk; s3_pix <= s2_pix;
      if (s2_zero)                   s3_a <= '0;
      else if (!s2_dc && !qp[0])     s3_a <= s2_p - 19'd1;
      else                           s3_a <= s2_p;
      // stage 4: sign and limit
      out_valid <= s3_v;
      out_blk   <= s3_blk;
      out_pix   <= s3_pix;
      if (s3_neg) out_data <= (s3_a > 19'd2048) ? -12'sd2048 : 12'(-s3_a);
      else        out_data <= (s3_a > 19'd2047) ?  12'sd2047 : 12'(s3_a);
    end
  end
endmodule
