// quantizer: MPEG-4 (H.263 method) quantizer with shared DC normaliser.
//
// Division is done as multiplication by a reciprocal table entry
// R(x) = floor(2^RECIP_BITS / x) + 1 followed by a right shift, where x is
// the step: 2*QP for AC (and for all inter) coefficients, dc_scaler for the
// intra DC coefficient. Rules:
//   intra DC : QF = (|F| + dc_scaler/2) / dc_scaler   (rounded division)
//   intra AC : |QF| = |F| / (2*QP)
//   inter    : |QF| = max(|F| - QP/2, 0) / (2*QP)
// with the sign of F restored and the result limited to -2048..2047.
// Coefficients enter one per cycle with their block index (0-3 Y, 4 Cb,
// 5 Cr) and raster position v*8+u; they leave four cycles later (four
// pipeline stages) with the same tags. After the 64th coefficient of a
// block, cbp_valid pulses with the coded-block flag: inter, any coefficient
// nonzero; intra, one of positions 0, 1, 8 nonzero or the sum of |QF| over
// the block above 2.
// When no coefficient enters, the pipeline accepts a normalisation request
// from the AC/DC predictor (norm_req/norm_ack): (|v| + dc_scaler/2) /
// dc_scaler with the sign of v, returned four cycles later on norm_valid.
// This shares the divider between quantisation and DC normalisation.
// The reciprocal-table method, the dc_scaler table and the intra/inter
// thresholds follow the design; RECIP_BITS = 18 is this design's choice
// (16 bits, the width of the design's example entry, is not exact over the
// whole 12-bit coefficient range).
module quantizer
  import tex_pkg::*;
#(
  parameter int RECIP_BITS = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [QP_W-1:0]   qp,
  input  logic              intra,
  input  logic              in_valid,
  input  coef_t             in_data,
  input  logic [2:0]        in_blk,
  input  logic [5:0]        in_pix,
  output logic              out_valid,
  output coef_t             out_data,
  output logic [2:0]        out_blk,
  output logic [5:0]        out_pix,
  output logic              cbp_valid,
  output logic              cbp,
  input  logic              norm_req,
  input  coef_t             norm_val,
  input  logic              norm_chroma,
  output logic              norm_ack,
  output logic              norm_valid,
  output coef_t             norm_res
);
  typedef logic [RECIP_BITS:0] recip_t;
  typedef recip_t recip_tab_t [64];

  function automatic recip_tab_t make_recip();
    recip_tab_t t;
    t[0] = '0;
    for (int x = 1; x < 64; x++) t[x] = recip_t'(((64'd1 << RECIP_BITS) / 64'(x)) + 64'd1);
    return t;
  endfunction
  localparam recip_tab_t RECIP = make_recip();

  // stage 1: magnitude, step selection
  logic        s1_v, s1_n, s1_neg;
  logic [12:0] s1_mag;
  logic [5:0]  s1_x;
  logic [2:0]  s1_blk;
  logic [5:0]  s1_pix;
  // stage 2: reciprocal
  logic        s2_v, s2_n, s2_neg;
  logic [12:0] s2_mag;
  recip_t      s2_r;
  logic [2:0]  s2_blk;
  logic [5:0]  s2_pix;
  // stage 3: product
  logic        s3_v, s3_n, s3_neg;
  logic [12:0] s3_q;
  logic [2:0]  s3_blk;
  logic [5:0]  s3_pix;

  logic [11:0] absf, absn;
  logic [5:0]  dcs_c, two_qp;
  logic        take_norm;

  always_comb begin
    absf   = in_data[11] ? 12'(-in_data) : 12'(in_data);
    absn   = norm_val[11] ? 12'(-norm_val) : 12'(norm_val);
    dcs_c  = dc_scaler(qp, norm_chroma);
    two_qp = {qp, 1'b0};
    take_norm = !in_valid && norm_req;
  end
  assign norm_ack = take_norm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 0; s1_n <= 0; s1_neg <= 0; s1_mag <= '0; s1_x <= 6'd1;
      s1_blk <= '0; s1_pix <= '0;
      s2_v <= 0; s2_n <= 0; s2_neg <= 0; s2_mag <= '0; s2_r <= '0; s2_blk <= '0; s2_pix <= '0;
      s3_v <= 0; s3_n <= 0; s3_neg <= 0; s3_q <= '0; s3_blk <= '0; s3_pix <= '0;
    end else begin
      // stage 1
      s1_v <= in_valid;
      s1_n <= take_norm;
      s1_blk <= in_blk;
      s1_pix <= in_pix;
      if (take_norm) begin
        s1_neg <= norm_val[11];
        s1_x   <= dcs_c;
        s1_mag <= 13'(absn) + 13'(dcs_c >> 1);
      end else begin
        s1_neg <= in_data[11];
        if (intra && in_pix == 6'd0) begin
          s1_x   <= dc_scaler(qp, is_chroma(in_blk));
          s1_mag <= 13'(absf) + 13'(dc_scaler(qp, is_chroma(in_blk)) >> 1);
        end else if (intra) begin
          s1_x   <= two_qp;
          s1_mag <= 13'(absf);
        end else begin
          s1_x   <= two_qp;
          s1_mag <= (absf > 12'(qp >> 1)) ? 13'(absf - 12'(qp >> 1)) : 13'd0;
        end
      end
      // stage 2
      s2_v <= s1_v; s2_n <= s1_n; s2_neg <= s1_neg; s2_mag <= s1_mag;
      s2_r <= RECIP[s1_x]; s2_blk <= s1_blk; s2_pix <= s1_pix;
      // stage 3
      s3_v <= s2_v; s3_n <= s2_n; s3_neg <= s2_neg; s3_blk <= s2_blk; s3_pix <= s2_pix;
      s3_q <= 13'(({19'd0, s2_mag} * {13'd0, s2_r}) >> RECIP_BITS);
    end
  end

  // stage 4: sign, limit, cbp
  logic signed [13:0] sq;
  coef_t              lim;
  logic [5:0]         bcnt;
  logic               c_nz;
  logic [11:0]        c_sum;

  always_comb begin
    sq = s3_neg ? -14'(s3_q) : 14'(s3_q);
    if (sq > 14'sd2047)       lim = 12'sd2047;
    else if (sq < -14'sd2048) lim = -12'sd2048;
    else                      lim = 12'(sq);
  end

  // running coded-block state including the coefficient now in stage 3
  logic        nz;
  logic [11:0] sum, a;
  always_comb begin
    a   = (s3_q > 13'd2047) ? 12'd2047 : 12'(s3_q);
    nz  = (bcnt == 6'd0) ? 1'b0 : c_nz;
    sum = (bcnt == 6'd0) ? 12'd0 : c_sum;
    if (intra) begin
      if (a != 0 && (s3_pix == 6'd0 || s3_pix == 6'd1 || s3_pix == 6'd8)) nz = 1'b1;
      sum = (sum > 12'd3) ? sum : sum + ((a > 12'd3) ? 12'd3 : a);
    end else if (a != 0) nz = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 0; out_data <= '0; out_blk <= '0; out_pix <= '0;
      norm_valid <= 0; norm_res <= '0;
      cbp_valid <= 0; cbp <= 0; bcnt <= '0; c_nz <= 0; c_sum <= '0;
    end else begin
      out_valid  <= s3_v;
      norm_valid <= s3_n;
      cbp_valid  <= 1'b0;
      if (s3_n) norm_res <= lim;
      if (s3_v) begin
        out_data <= lim;
        out_blk  <= s3_blk;
        out_pix  <= s3_pix;
        c_nz  <= nz;
        c_sum <= sum;
        bcnt  <= bcnt + 6'd1;
        if (bcnt == 6'd63) begin
          cbp_valid <= 1'b1;
          cbp       <= nz || (intra && sum > 12'd2);
        end
      end
    end
  end
endmodule
