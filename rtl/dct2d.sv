// dct2d: 8x8 2-D DCT/IDCT by row-column decomposition.
//
// A row-wise 1-D unit (13-bit coefficients, 21-bit accumulator, 16-bit
// limited output with 4 fractional bits) feeds the 64x16 transpose memory,
// whose transposed read-out feeds a column-wise 1-D unit (12-bit
// coefficients, 20-bit accumulator). The result is rounded to an integer and
// clipped to 12 bits (-2048..2047) for the DCT or 9 bits (-256..255) for the
// IDCT.
// Interface: one sample per cycle on in_valid/in_data with in_idct giving
// the mode; each block is 64 samples in 64 consecutive cycles, and blocks
// of either mode may follow each other back to back, so DCT and IDCT blocks
// can be interleaved. The input block is read in raster order and the output
// block leaves transposed: a DCT of pixels f given row by row leaves as the
// coefficients column by column, and an IDCT fed with coefficients column by
// column returns pixels row by row.
// Latency: the first output of a block appears 90 cycles after its
// first input. Structure and word lengths follow the design; the fractional
// split of each word is this design's choice.
module dct2d
  import tex_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_idct,
  input  logic signed [11:0] in_data,
  output logic        out_valid,
  output logic        out_idct,
  output logic signed [11:0] out_data
);

  logic               r_valid, r_idct;
  logic signed [15:0] r_data;
  logic               t_valid, t_idct;
  logic signed [15:0] t_data;
  logic               c_valid, c_idct;
  logic signed [12:0] c_data;

  dct_1d #(.IN_W(12), .IN_FRAC(0), .COL(1'b0), .CF_W(13), .CF_FRAC(13),
           .ACC_W(21), .ACC_FRAC(8), .OUT_W(16), .OUT_FRAC(4)) u_row (
    .clk, .rst_n, .in_valid, .in_idct, .in_data,
    .out_valid(r_valid), .out_idct(r_idct), .out_data(r_data)
  );

  transpose_mem #(.W(16)) u_tmem (
    .clk, .rst_n, .wr_valid(r_valid), .wr_idct(r_idct), .wr_data(r_data),
    .rd_valid(t_valid), .rd_idct(t_idct), .rd_data(t_data)
  );

  dct_1d #(.IN_W(16), .IN_FRAC(4), .COL(1'b1), .CF_W(12), .CF_FRAC(12),
           .ACC_W(20), .ACC_FRAC(7), .OUT_W(13), .OUT_FRAC(0)) u_col (
    .clk, .rst_n, .in_valid(t_valid), .in_idct(t_idct), .in_data(t_data),
    .out_valid(c_valid), .out_idct(c_idct), .out_data(c_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idct  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= c_valid;
      out_idct  <= c_idct;
      if (c_idct) begin
        if (c_data > 13'sd255)       out_data <= 12'sd255;
        else if (c_data < -13'sd256) out_data <= -12'sd256;
        else                         out_data <= 12'(c_data);
      end else begin
        if (c_data > 13'sd2047)       out_data <= 12'sd2047;
        else if (c_data < -13'sd2048) out_data <= -12'sd2048;
        else                          out_data <= 12'(c_data);
      end
    end
  end
endmodule
