// transpose_mem: 64 x 16 dual-port transpose memory between the row-wise
// and the column-wise 1-D DCT/IDCT units.
//
// Block n is written in one order and read in the transposed order; the
// order alternates from block to block. With orientation 0 the writer uses
// addresses 0,1,2,...,63 and the reader 0,8,16,...,56,1,9,...; with
// orientation 1 the roles swap. The reader of a block starts in the cycle
// after the writer has stored the word with index 49 (the point at which the
// first column is complete) and then reads one word per cycle for 64 cycles.
// The next block may be written straight after the current one: it writes
// each address at least 14 cycles after it was read. A block's 64 words must
// be written in 64 consecutive cycles (the 1-D unit delivers them so); an
// assertion checks this. Reads are synchronous: rd_valid/rd_data appear one
// cycle after the read address. The DCT/IDCT mode bit of each block travels
// with it. The alternating scheme and the start at index 49 follow the
// design; the mode sideband and the assertion are this design's own.
module transpose_mem #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_valid,
  input  logic                wr_idct,
  input  logic signed [W-1:0] wr_data,
  output logic                rd_valid,
  output logic                rd_idct,
  output logic signed [W-1:0] rd_data
);
  logic signed [W-1:0] mem [64];

  logic [5:0] wcnt, rcnt;
  logic       wo, ro;          // orientation of the block being written / read
  logic       wmode, rmode;    // its DCT/IDCT mode
  logic       ract;
  logic [5:0] waddr, raddr;
  logic       trig;

  function automatic logic [5:0] tr(input logic [5:0] k);
    return {k[2:0], k[5:3]};
  endfunction

  assign waddr = wo ? tr(wcnt) : wcnt;
  assign raddr = ro ? rcnt : tr(rcnt);
  assign trig  = wr_valid && (wcnt == 6'd49);

  always_ff @(posedge clk) begin
    if (wr_valid) mem[waddr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; wo <= 1'b0; wmode <= 1'b0;
      rcnt <= '0; ro <= 1'b0; rmode <= 1'b0; ract <= 1'b0;
      rd_valid <= 1'b0; rd_idct <= 1'b0; rd_data <= '0;
    end else begin
      if (wr_valid) begin
        wcnt <= wcnt + 6'd1;
        if (wcnt == 6'd0) wmode <= wr_idct;
        if (wcnt == 6'd63) wo <= ~wo;
      end
      if (trig) begin
        ract  <= 1'b1;
        rcnt  <= '0;
        ro    <= wo;
        rmode <= (wcnt == 6'd0) ? wr_idct : wmode;
      end else if (ract) begin
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd63) ract <= 1'b0;
      end
      rd_valid <= ract;
      rd_idct  <= rmode;
      if (ract) rd_data <= mem[raddr];
    end
  end

  // A block is written without gaps, and a new read never cuts one short.
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (wcnt != 6'd0) |-> wr_valid);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    trig |-> (!ract || rcnt == 6'd63));
endmodule
