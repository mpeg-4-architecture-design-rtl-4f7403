// s2p4: serial-to-parallel packer after the IDCT.
//
// Reconstructed pixels arrive one per cycle (in_valid, 9-bit signed) in
// raster order, 64 per block, tagged with the block index. Every fourth
// pixel completes a word: out_valid pulses for one cycle with the four
// pixels in out_data (pixel 4w+j in bits 9j+8..9j) and the address
// {block, word} in out_addr, so a block gives sixteen words. out_pix8
// carries the same four pixels clipped to 0..255 as bytes, the form a
// reconstructed intra frame takes on the 32-bit bus. Packing four pixels
// per bus word follows the design; clipping and byte order are this
// design's choice.
module s2p4
  import tex_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pix_t        in_data,
  input  logic [2:0]  in_blk,
  output logic        out_valid,
  output logic [35:0] out_data,
  output logic [31:0] out_pix8,
  output logic [6:0]  out_addr
);
  logic [5:0]  cnt;
  pix_t        hold [3];

  function automatic logic [7:0] clip8(input pix_t p);
    return p[8] ? 8'd0 : p[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0; out_data <= '0; out_pix8 <= '0; out_addr <= '0;
      for (int i = 0; i < 3; i++) hold[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 6'd1;
        if (cnt[1:0] != 2'd3) hold[cnt[1:0]] <= in_data;
        else begin
          out_valid <= 1'b1;
          out_data  <= {in_data, hold[2], hold[1], hold[0]};
          out_pix8  <= {clip8(in_data), clip8(hold[2]), clip8(hold[1]), clip8(hold[0])};
          out_addr  <= {in_blk, cnt[5:2]};
        end
      end
    end
  end
endmodule
