// texture_ctrl: macroblock-level controller of the texture engine.
//
// States: T_IDLE, T_MB_CHECK, T_FILL (intra frame, first macroblock: wait
// for the bus read of the current macroblock), T_INTRA / T_INTER (encode
// six blocks), T_DRAIN (wait for the last reconstructed pixels, the
// prediction unit and the bus), T_FINISH (report finish until the system
// acknowledges). texture_rsp is 0 idle, 1 busy, 2 finish.
// Per block the controller pulses pp_rd_en with pp_raddr = {ram, block}
// (the ping-pong buffer then streams 64 pixels to the forward transform),
// pulses acdc_start for intra macroblocks, and waits for blk_done, which
// the top raises when the 64th dequantized coefficient of the block has
// entered the inverse transform; the next block starts right after, so the
// transform alternates forward and inverse blocks. In an intra frame the
// bus read of the next macroblock is started together with block 4 (Cb) into
// the other half of the ping-pong buffer (not after the last macroblock).
// Interface timing: all outputs registered; start pulses last one cycle.
// The state names and the finish/acknowledge handshake follow the design;
// the block-level sequencing and the moment of the next read are this
// design's choices.
module texture_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,            // Ctrl_texture_en
  input  logic       ack,           // Ctrl_texture_ack
  input  logic       mb_intra,      // MB_I_P
  input  logic       frame_intra,   // FrameType
  input  logic       first_mb,
  input  logic       last_mb,
  input  logic       rd_sel,        // ping-pong half holding this macroblock
  input  logic       amba_rd_done,
  input  logic       amba_rd_busy,
  input  logic       amba_wr_empty,
  input  logic       blk_done,
  input  logic       idct_done,     // all 384 reconstructed samples out
  input  logic       acdc_busy,
  output logic [1:0] texture_rsp,
  output logic       mb_start,
  output logic       pp_rd_en,
  output logic [3:0] pp_raddr,
  output logic       acdc_start,
  output logic [2:0] cur_blk,
  output logic       amba_rd_start,
  output logic       amba_rd_next,  // 1: next macroblock, 0: current one
  output logic       amba_fill_sel  // ping-pong half the bus read fills
);
  typedef enum logic [2:0] {
    T_IDLE, T_MB_CHECK, T_FILL, T_INTRA, T_INTER, T_DRAIN, T_FINISH
  } tstate_t;
  tstate_t st;
  logic    issued;   // current block started, waiting for blk_done
  logic    intra_q, frame_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; issued <= 1'b0; intra_q <= 1'b0; frame_q <= 1'b0;
      texture_rsp <= 2'd0; mb_start <= 1'b0; pp_rd_en <= 1'b0; pp_raddr <= '0;
      acdc_start <= 1'b0; cur_blk <= '0; amba_rd_start <= 1'b0; amba_rd_next <= 1'b0;
      amba_fill_sel <= 1'b0;
    end else begin
      mb_start <= 1'b0; pp_rd_en <= 1'b0; acdc_start <= 1'b0; amba_rd_start <= 1'b0;
      unique case (st)
        T_IDLE: begin
          texture_rsp <= 2'd0;
          if (en) begin
            texture_rsp <= 2'd1;
            mb_start    <= 1'b1;
            intra_q     <= mb_intra;
            frame_q     <= frame_intra;
            st          <= T_MB_CHECK;
          end
        end
        T_MB_CHECK: begin
          cur_blk <= '0;
          issued  <= 1'b0;
          if (frame_q && first_mb) begin
            amba_rd_start <= 1'b1;
            amba_rd_next  <= 1'b0;
            amba_fill_sel <= rd_sel;
            st            <= T_FILL;
          end else st <= intra_q ? T_INTRA : T_INTER;
        end
        T_FILL: if (amba_rd_done) st <= intra_q ? T_INTRA : T_INTER;
        T_INTRA, T_INTER: begin
          if (!issued) begin
            pp_rd_en   <= 1'b1;
            pp_raddr   <= {rd_sel, cur_blk};
            acdc_start <= (st == T_INTRA);
            issued     <= 1'b1;
            if (frame_q && !last_mb && cur_blk == 3'd4) begin
              amba_rd_start <= 1'b1;
              amba_rd_next  <= 1'b1;
              amba_fill_sel <= !rd_sel;
            end
          end else if (blk_done) begin
            issued <= 1'b0;
            if (cur_blk == 3'd5) st <= T_DRAIN;
            else cur_blk <= cur_blk + 3'd1;
          end
        end
        T_DRAIN: if (idct_done && !acdc_busy && amba_wr_empty && !amba_rd_busy) begin
          texture_rsp <= 2'd2;
          st          <= T_FINISH;
        end
        T_FINISH: if (ack) begin texture_rsp <= 2'd0; st <= T_IDLE; end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
