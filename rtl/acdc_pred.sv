// acdc_pred: AC/DC prediction of intra blocks.
//
// For each intra 8x8 block (start pulse, held if the previous block is
// still in progress, block index blk, macroblock
// position mb_x/mb_y) the state machine
//   RD_LT_DC   reads the top-left DC (B) from the LT_DC_VALUE words,
//   RD_TOP_DC  reads the top DC (C) from the horizontal region,
//   RD_LEFT_DC reads the left DC (A) from the vertical region,
//   ST_LT_DC   stores C into LT_DC_VALUE for the next block (Table: block
//              b stores into word b and reads word 1,0,3,2,4,5 for b=0..5),
//   CHK_GRAD   chooses the direction: top (C) if |A-B| < |B-C|, else left
//              (A), and asks the quantizer to normalise the chosen DC,
//   RD_AC      fetches the seven AC predictors of that neighbour,
//   WAIT_Q     collects the block's 64 quantized coefficients into the
//              register file and its dequantized DC from the inverse
//              quantizer,
//   ST_NEXT    forms the prediction errors and stores the block's DC
//              (dequantized) and top-row / left-column AC (quantized) as
//              predictors for the blocks below and to the right,
//   TO_VLC     sends the 64 coefficients in raster order: the DC as a
//              prediction error, and the seven predicted AC values as
//              errors only if that lowers their sum of magnitudes
//              (acdcp_flag), then the block's coded-block flag,
//   MB_CBP     after block 5, replays the six coded-block flags.
// Neighbours outside the frame give DC 1024 (2^(8+2)) and AC 0. Memory map
// (MB_COLS macroblocks per row): horizontal Y at 8*(2*mb_x+bx), Cb at
// 16*MB_COLS + 8*mb_x, Cr at 24*MB_COLS + 8*mb_x; vertical at 32*MB_COLS
// (Y rows 0/1, Cb, Cr: 8 words each); LT_DC_VALUE at 32*MB_COLS + 32. Word
// 0 of each group is the DC, words 1..7 the AC.
// Interfaces: q_* is the quantizer output (raster position q_pix), iq_* the
// inverse quantizer output, norm_* the quantizer's normalisation port.
// The states, memory organisation, LT_DC_VALUE order and direction rule
// follow the design. This design's own choices: the per-block decision for
// acdcp_flag, the coded-block rule applied to the values actually sent,
// fixed QP (no AC rescaling), and frame edges as the only unavailable
// neighbours.
module acdc_pred
  import tex_pkg::*;
#(
  parameter int MB_COLS = 22
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  blk,
  input  logic [4:0]  mb_x,
  input  logic [4:0]  mb_y,
  // quantizer output
  input  logic        q_valid,
  input  coef_t       q_data,
  input  logic [5:0]  q_pix,
  // inverse quantizer output
  input  logic        iq_valid,
  input  coef_t       iq_data,
  input  logic [5:0]  iq_pix,
  // DC normalisation in the quantizer
  output logic        norm_req,
  output coef_t       norm_val,
  output logic        norm_chroma,
  input  logic        norm_ack,
  input  logic        norm_valid,
  input  coef_t       norm_res,
  // to the VLC
  output logic        vlc_valid,
  output coef_t       vlc_data,
  output logic [5:0]  vlc_pix,
  output logic [2:0]  vlc_blk,
  output logic        acdcp_flag,
  output logic        acdcp_direction,   // 1: from the block above, 0: from the left
  output logic        cbp_valid,
  output logic        cbp,
  output logic        busy
);
  localparam int DEPTH   = 32 * MB_COLS + 38;
  localparam int AW      = $clog2(DEPTH);
  localparam int H_CB    = 16 * MB_COLS;
  localparam int H_CR    = 24 * MB_COLS;
  localparam int V_BASE  = 32 * MB_COLS;
  localparam int LT_BASE = 32 * MB_COLS + 32;
  localparam coef_t DC_DEFAULT = 12'sd1024;

  typedef enum logic [3:0] {
    S_IDLE, S_RD_LT_DC, S_RD_TOP_DC, S_RD_LEFT_DC, S_ST_LT_DC, S_CHK_GRAD,
    S_RD_AC, S_WAIT_Q, S_ST_NEXT, S_TO_VLC, S_MB_CBP
  } state_t;
  state_t st;

  // memory port
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  coef_t         m_wdata;
  logic [11:0]   m_rdata;

  acdc_pred_mem #(.DEPTH(DEPTH), .W(12)) u_mem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  // block context
  logic        pend;
  logic [2:0]  p_blk;
  logic [4:0]  p_x, p_y;
  logic [2:0]  cb;
  logic [4:0]  cx, cy;
  logic        av_top, av_left, av_tl;
  logic [AW-1:0] h_base, v_base, lt_rd, lt_wr;

  always_comb begin
    logic bx, by;
    bx = cb[0];
    by = cb[1];
    if (cb < 3'd4) begin
      h_base  = AW'(8 * (2 * int'(cx) + int'(bx)));
      v_base  = AW'(V_BASE + 8 * int'(by));
      av_top  = by || (cy != 0);
      av_left = bx || (cx != 0);
      unique case (cb[1:0])
        2'd0: av_tl = (cx != 0) && (cy != 0);
        2'd1: av_tl = (cy != 0);
        2'd2: av_tl = (cx != 0);
        default: av_tl = 1'b1;
      endcase
    end else begin
      h_base  = AW'(((cb == 3'd4) ? H_CB : H_CR) + 8 * int'(cx));
      v_base  = AW'(V_BASE + ((cb == 3'd4) ? 16 : 24));
      av_top  = (cy != 0);
      av_left = (cx != 0);
      av_tl   = (cx != 0) && (cy != 0);
    end
    unique case (cb)
      3'd0: lt_rd = AW'(LT_BASE + 1);
      3'd1: lt_rd = AW'(LT_BASE + 0);
      3'd2: lt_rd = AW'(LT_BASE + 3);
      3'd3: lt_rd = AW'(LT_BASE + 2);
      default: lt_rd = AW'(LT_BASE + int'(cb));
    endcase
    lt_wr = AW'(LT_BASE + int'(cb));
  end

  // prediction data
  coef_t dc_a, dc_b, dc_c;
  logic  dir_top;
  coef_t pac [8];           // AC predictors, index 1..7
  coef_t pdc;               // normalised DC predictor
  logic  pdc_ok, norm_sent;
  coef_t regf [64];         // register file: the block's quantized coefficients
  logic [6:0] qcnt;
  coef_t dq_dc;
  logic  dq_ok;
  coef_t pqf [8];           // prediction errors of the predicted line, index 1..7
  logic  use_pred;
  logic [4:0] k;            // step counter inside a state
  logic [5:0] ocnt;
  logic [5:0] cbp_bits;
  logic       c_nz;
  logic [3:0] c_sum;

  function automatic logic [12:0] mag(input coef_t v);
    return v[11] ? 13'(-14'(v)) : 13'(v);
  endfunction

  function automatic logic [5:0] line_pos(input logic top, input int i);
    return top ? 6'(i) : 6'(8 * i);
  endfunction

  // memory access pattern, by state
  always_comb begin
    m_en = 1'b0; m_we = 1'b0; m_addr = '0; m_wdata = '0;
    unique case (st)
      S_RD_LT_DC:   begin m_en = 1'b1; m_addr = lt_rd; end
      S_RD_TOP_DC:  begin m_en = 1'b1; m_addr = h_base; end
      S_RD_LEFT_DC: begin m_en = 1'b1; m_addr = v_base; end
      S_ST_LT_DC:   begin m_en = 1'b1; m_we = 1'b1; m_addr = lt_wr; m_wdata = dc_c; end
      S_RD_AC: if (k < 5'd7) begin
        m_en = 1'b1; m_addr = (dir_top ? h_base : v_base) + AW'(k + 5'd1);
      end
      S_ST_NEXT: if (k >= 5'd1 && k <= 5'd16) begin
        // k=1..8: horizontal DC, top row; k=9..16: vertical DC, left column
        automatic int i = (int'(k) - 1) % 8;
        m_en = 1'b1; m_we = 1'b1;
        if (k <= 5'd8) begin
          m_addr  = h_base + AW'(i);
          m_wdata = (i == 0) ? dq_dc : regf[i];
        end else begin
          m_addr  = v_base + AW'(i);
          m_wdata = (i == 0) ? dq_dc : regf[8 * i];
        end
      end
      default: ;
    endcase
  end

  // value sent for raster position p
  function automatic coef_t out_val(input logic [5:0] p);
    if (p == 6'd0) return coef_t'(regf[0] - pdc);
    if (use_pred) begin
      if (dir_top && p[5:3] == 3'd0) return pqf[p[2:0]];
      if (!dir_top && p[2:0] == 3'd0) return pqf[p[5:3]];
    end
    return regf[p];
  endfunction

  coef_t cur_out;
  assign cur_out = out_val(ocnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pend <= 1'b0; p_blk <= '0; p_x <= '0; p_y <= '0; cb <= '0; cx <= '0; cy <= '0;
      dc_a <= '0; dc_b <= '0; dc_c <= '0; dir_top <= 1'b0;
      for (int i = 0; i < 8; i++) begin pac[i] <= '0; pqf[i] <= '0; end
      for (int i = 0; i < 64; i++) regf[i] <= '0;
      pdc <= '0; pdc_ok <= 1'b0; norm_sent <= 1'b0;
      qcnt <= '0; dq_dc <= '0; dq_ok <= 1'b0; use_pred <= 1'b0;
      k <= '0; ocnt <= '0; cbp_bits <= '0; c_nz <= 1'b0; c_sum <= '0;
      norm_req <= 1'b0; norm_val <= '0; norm_chroma <= 1'b0;
      vlc_valid <= 1'b0; vlc_data <= '0; vlc_pix <= '0; vlc_blk <= '0;
      acdcp_flag <= 1'b0; acdcp_direction <= 1'b0;
      cbp_valid <= 1'b0; cbp <= 1'b0;
    end else begin
      vlc_valid <= 1'b0;
      cbp_valid <= 1'b0;
      // a start pulse is held until the previous block is finished
      if (start) begin
        pend <= 1'b1; p_blk <= blk; p_x <= mb_x; p_y <= mb_y;
      end
      // collect quantized coefficients and the dequantized DC in any state
      if (q_valid && st != S_IDLE && qcnt != 7'd64) begin
        regf[q_pix] <= q_data;
        qcnt <= qcnt + 7'd1;
      end
      if (iq_valid && iq_pix == 6'd0 && st != S_IDLE && !dq_ok) begin
        dq_dc <= iq_data;
        dq_ok <= 1'b1;
      end
      if (norm_req && norm_ack) begin norm_req <= 1'b0; norm_sent <= 1'b1; end
      if (norm_valid && norm_sent) begin pdc <= norm_res; pdc_ok <= 1'b1; norm_sent <= 1'b0; end

      unique case (st)
        S_IDLE: if (pend) begin
          pend <= 1'b0;
          cb <= p_blk; cx <= p_x; cy <= p_y;
          qcnt <= '0; dq_ok <= 1'b0; pdc_ok <= 1'b0; norm_sent <= 1'b0;
          st <= S_RD_LT_DC;
        end
        S_RD_LT_DC:   st <= S_RD_TOP_DC;
        S_RD_TOP_DC: begin
          dc_b <= av_tl ? coef_t'(m_rdata) : DC_DEFAULT;
          st <= S_RD_LEFT_DC;
        end
        S_RD_LEFT_DC: begin
          dc_c <= av_top ? coef_t'(m_rdata) : DC_DEFAULT;
          st <= S_ST_LT_DC;
        end
        S_ST_LT_DC: begin
          dc_a <= av_left ? coef_t'(m_rdata) : DC_DEFAULT;
          st <= S_CHK_GRAD;
        end
        S_CHK_GRAD: begin
          automatic logic [12:0] gab = mag(coef_t'(dc_a - dc_b));
          automatic logic [12:0] gbc = mag(coef_t'(dc_b - dc_c));
          automatic logic top = (gab < gbc);
          dir_top     <= top;
          norm_req    <= 1'b1;
          norm_val    <= top ? dc_c : dc_a;
          norm_chroma <= is_chroma(cb);
          k  <= '0;
          st <= S_RD_AC;
        end
        S_RD_AC: begin
          // read issued at k, data at k+1
          if (k >= 5'd1) pac[k[2:0]] <= ((dir_top ? av_top : av_left)) ? coef_t'(m_rdata) : '0;
          k <= k + 5'd1;
          if (k == 5'd7) st <= S_WAIT_Q;
        end
        S_WAIT_Q: if (qcnt == 7'd64 && dq_ok && pdc_ok) begin
          automatic logic [15:0] s_org = '0, s_prd = '0;
          pqf[0] <= '0;
          for (int i = 1; i < 8; i++) begin
            automatic coef_t q = regf[line_pos(dir_top, i)];
            automatic coef_t e = coef_t'(q - pac[i]);
            pqf[i] <= e;
            s_org += 16'(mag(q));
            s_prd += 16'(mag(e));
          end
          use_pred <= (s_prd < s_org);
          k  <= '0;
          st <= S_ST_NEXT;
        end
        S_ST_NEXT: begin
          k <= k + 5'd1;
          if (k == 5'd16) begin
            ocnt  <= '0;
            c_nz  <= 1'b0;
            c_sum <= '0;
            st    <= S_TO_VLC;
          end
        end
        S_TO_VLC: begin
          automatic logic [12:0] a = mag(cur_out);
          automatic logic        nz = c_nz;
          automatic logic [3:0]  s = c_sum;
          vlc_valid <= 1'b1;
          vlc_data  <= cur_out;
          vlc_pix   <= ocnt;
          vlc_blk   <= cb;
          acdcp_flag      <= use_pred;
          acdcp_direction <= dir_top;
          if (a != 0 && (ocnt == 6'd0 || ocnt == 6'd1 || ocnt == 6'd8)) nz = 1'b1;
          if (s <= 4'd2) s = s + ((a > 13'd3) ? 4'd3 : 4'(a));
          c_nz  <= nz;
          c_sum <= s;
          ocnt  <= ocnt + 6'd1;
          if (ocnt == 6'd63) begin
            cbp_valid    <= 1'b1;
            cbp          <= nz || (s > 4'd2);
            cbp_bits[cb] <= nz || (s > 4'd2);
            k  <= '0;
            st <= (cb == 3'd5) ? S_MB_CBP : S_IDLE;
          end
        end
        S_MB_CBP: begin
          // coded-block flags of the macroblock, block 0 first
          cbp_valid <= 1'b1;
          cbp       <= cbp_bits[k[2:0]];
          vlc_blk   <= k[2:0];
          k <= k + 5'd1;
          if (k == 5'd5) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE) || pend;

  // The next block's coefficients must not arrive while this one is sent.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    q_valid |-> !(st inside {S_ST_NEXT, S_TO_VLC, S_MB_CBP}));
endmodule
