// acdc_pred_mem: single-port prediction memory of the AC/DC predictor,
// DEPTH x 12 bits (742 x 12 for CIF).
//
// One access per cycle: with en and we, wdata is written to addr; with en
// and not we, the word at addr appears on rdata in the next cycle (rdata
// holds otherwise). The AC/DC predictor divides it into a horizontal region
// (DC and top-row AC of the block row above, 704 words for a 352-pixel-wide
// frame), a vertical region (DC and left-column AC of the blocks to the
// left, 32 words) and the six-word LT_DC_VALUE region. Size and regions
// follow the design.
module acdc_pred_mem #(
  parameter int DEPTH = 742,
  parameter int W     = 12,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
