// scan_order: scan logic, raster position to scan index (combinational).
//
// For a coefficient at raster position pos = v*8 + u, returns its place
// 0..63 in the selected scan: zigzag, alternate-horizontal or
// alternate-vertical (the MPEG-4 scans). The alternate-vertical table is the
// transpose of the alternate-horizontal one. The tables follow the design's
// scan figure; mode SCAN_ALT_V is used when the AC/DC prediction refers to
// the left block, SCAN_ALT_H when it refers to the block above, zigzag
// otherwise.
module scan_order
  import tex_pkg::*;
(
  input  scan_t      mode,
  input  logic [5:0] pos,
  output logic [5:0] idx
);
  typedef logic [5:0] tab_t [64];

  localparam tab_t ALT_H = '{
     0,  1,  2,  3, 10, 11, 12, 13,
     4,  5,  8,  9, 17, 16, 15, 14,
     6,  7, 19, 18, 26, 27, 28, 29,
    20, 21, 24, 25, 30, 31, 32, 33,
    22, 23, 34, 35, 42, 43, 44, 45,
    36, 37, 40, 41, 46, 47, 48, 49,
    38, 39, 50, 51, 56, 57, 58, 59,
    52, 53, 54, 55, 60, 61, 62, 63};

  localparam tab_t ZIGZAG = '{
     0,  1,  5,  6, 14, 15, 27, 28,
     2,  4,  7, 13, 16, 26, 29, 42,
     3,  8, 12, 17, 25, 30, 41, 43,
     9, 11, 18, 24, 31, 40, 44, 53,
    10, 19, 23, 32, 39, 45, 52, 54,
    20, 22, 33, 38, 46, 51, 55, 60,
    21, 34, 37, 47, 50, 56, 59, 61,
    35, 36, 48, 49, 57, 58, 62, 63};

  always_comb begin
    unique case (mode)
      SCAN_ALT_H: idx = ALT_H[pos];
      SCAN_ALT_V: idx = ALT_H[{pos[2:0], pos[5:3]}];
      default:    idx = ZIGZAG[pos];
    endcase
  end
endmodule
