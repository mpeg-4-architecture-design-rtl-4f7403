// pingpong_buffer: input buffer of the texture engine, two 96 x 36 RAMs.
//
// Each RAM holds one macroblock: six 8x8 blocks (Y1..Y4, Cb, Cr) of 64
// 9-bit pixels, stored as 16 words of four pixels per block (pixel 4w+j in
// bits 9j+8..9j of word w). While one RAM is filled with the next
// macroblock, the other is read for the current one.
// Write port: en_wr writes data_in to RAM wr_ram_sel at block waddr[6:4],
// word waddr[3:0].
// Read port: a pulse on en_rd starts reading block raddr[2:0] of RAM
// raddr[3]; the 64 pixels then leave in raster order, one per cycle, on
// data_out with valid_out; the first pixel appears on the third clock edge
// after en_rd is raised (two edges after the one that samples it). A new en_rd
// may be given once the previous block has been read out.
// RAM organisation, pin names and address fields follow the design; the
// pixel order inside a word and the read timing are this design's choice.
module pingpong_buffer
  import tex_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_ram_sel,
  input  logic        en_wr,
  input  logic [6:0]  waddr,
  input  logic [35:0] data_in,
  input  logic [3:0]  raddr,
  input  logic        en_rd,
  output pix_t        data_out,
  output logic        valid_out
);
  logic [35:0] ram0 [96];
  logic [35:0] ram1 [96];

  logic [6:0]  wa;
  assign wa = 7'(waddr[6:4]) * 7'd16 + 7'(waddr[3:0]);

  always_ff @(posedge clk) begin
    if (en_wr && !wr_ram_sel) ram0[wa] <= data_in;
    if (en_wr &&  wr_ram_sel) ram1[wa] <= data_in;
  end

  logic       ract, rsel, ract_d;
  logic [2:0] rblk;
  logic [5:0] rcnt;
  logic [1:0] lane_d;
  logic [6:0] ra;
  logic [35:0] rword;

  assign ra = 7'(rblk) * 7'd16 + 7'(rcnt[5:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ract <= 1'b0; rsel <= 1'b0; rblk <= '0; rcnt <= '0;
      ract_d <= 1'b0; lane_d <= '0; rword <= '0;
      data_out <= '0; valid_out <= 1'b0;
    end else begin
      if (en_rd && !ract) begin
        ract <= 1'b1;
        rsel <= raddr[3];
        rblk <= raddr[2:0];
        rcnt <= '0;
      end else if (ract) begin
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd63) ract <= 1'b0;
      end
      // synchronous RAM read, then lane select
      ract_d <= ract;
      lane_d <= rcnt[1:0];
      if (ract) rword <= rsel ? ram1[ra] : ram0[ra];
      valid_out <= ract_d;
      data_out  <= pix_t'(rword[9*lane_d +: 9]);
    end
  end

  // The RAM being read is not written at the same time.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    (ract && en_wr) |-> (wr_ram_sel != rsel));
endmodule
