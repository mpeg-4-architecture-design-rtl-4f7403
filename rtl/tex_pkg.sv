// tex_pkg: types, constants and small functions shared by the MPEG-4 texture
// coding engine.
//
// The DCT constants are C_N(i) = sqrt(2/8) * cos(pi * 3^i / (2N)) for the
// 8-, 4- and 2-point butterflies, rounded to nearest after scaling by 2^13
// (row-wise unit, 13-bit coefficients) or 2^12 (column-wise unit, 12-bit
// coefficients). The coefficient word lengths follow the design's word-length
// table; the scaling (all bits fractional) is this design's choice.
// dc_scaler follows the MPEG-4 non-linear DC scaler for luminance and
// chrominance. Widths of pixels (9 bits) and coefficients (12 bits) follow
// the design's core characteristics.
package tex_pkg;

  localparam int PIX_W   = 9;    // signed pixel / prediction error
  localparam int COEF_W  = 12;   // signed DCT coefficient
  localparam int QP_W    = 5;    // quantizer_scale 1..31

  typedef logic signed [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  typedef enum logic [1:0] {
    SCAN_ZIGZAG = 2'd0,
    SCAN_ALT_H  = 2'd1,
    SCAN_ALT_V  = 2'd2
  } scan_t;

  // Row-wise coefficients (13 bit, scale 2^13): C8(0..3), C4(0..1), C2(0)
  localparam int signed C1_8_0 = 4017;
  localparam int signed C1_8_1 = 3406;
  localparam int signed C1_8_2 = -799;
  localparam int signed C1_8_3 = 2276;
  localparam int signed C1_4_0 = 3784;
  localparam int signed C1_4_1 = 1567;
  localparam int signed C1_2_0 = 2896;
  // Column-wise coefficients (12 bit, scale 2^12)
  localparam int signed C2_8_0 = 2009;
  localparam int signed C2_8_1 = 1703;
  localparam int signed C2_8_2 = -400;
  localparam int signed C2_8_3 = 1138;
  localparam int signed C2_4_0 = 1892;
  localparam int signed C2_4_1 = 784;
  localparam int signed C2_2_0 = 1448;

  // MPEG-4 non-linear DC scaler (luminance / chrominance).
  function automatic logic [5:0] dc_scaler(input logic [QP_W-1:0] qp, input logic chroma);
    int q;
    q = int'(qp);
    if (!chroma) begin
      if (q <= 4)       return 6'd8;
      else if (q <= 8)  return 6'(2 * q);
      else if (q <= 24) return 6'(q + 8);
      else              return 6'(2 * q - 16);
    end else begin
      if (q <= 4)       return 6'd8;
      else if (q <= 24) return 6'((q + 13) >> 1);
      else              return 6'(q - 6);
    end
  endfunction

  // Block index 0..3 are luminance, 4 and 5 chrominance (Cb, Cr).
  function automatic logic is_chroma(input logic [2:0] blk);
    return blk >= 3'd4;
  endfunction

endpackage
