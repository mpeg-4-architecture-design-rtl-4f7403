// texture_top: MPEG-4 texture coding engine, one macroblock at a time.
//
// Data path: ping-pong buffer -> 2-D DCT -> quantizer -> inverse quantizer
// -> 2-D IDCT (the same transform unit, alternating forward and inverse
// blocks) -> serial-to-parallel packer -> reconstructed data out. For
// intra macroblocks the quantized coefficients also pass through the AC/DC
// predictor (with its prediction memory) before going to the VLC outputs;
// for inter macroblocks the quantized coefficients go to the VLC outputs
// directly. The scan logic gives, with every VLC coefficient, its place in
// the scan chosen by the prediction (q_scan_idx).
// Frame types: in an I frame (FrameType = 1) the ping-pong buffer is
// filled over the AMBA bus (the first macroblock before coding, each next
// one during the chrominance blocks of the current one) and the reconstructed pixels go
// back over the bus as bytes; in a P frame the motion-compensation unit
// fills the buffer (MC_error, DCT_wren, DCT_wraddress) and takes back the
// reconstructed errors (IDCT_data_*), with IDCT_cbp giving the block's
// coded-block flag. MB_I_P selects intra or inter coding.
// Handshake: Ctrl_texture_en starts a macroblock; texture_rsp goes busy (1)
// and then finish (2) until Ctrl_texture_ack, then idle (0). Inputs
// Text_MB_X/Y, MB_I_P, FrameType and Q_param are sampled at the start and
// must hold until finish (Q_param and MB_I_P are registered).
// VLC outputs: qcoeff_valid with qcoeff, q_blk_addr, q_pix_addr (raster
// position v*8+u), q_scan_idx, acdcp_flag/acdcp_direction (intra only);
// vlc_cbp is valid with vlc_cbp_valid (intra: once per block and then the
// six flags again after block 5; inter: once per block).
// Bus: texture_bus_req / bus_user grant, address and HWRITE in one cycle,
// data in the next, no wait states.
// Pins follow the design's pin list except that the BIST pins are left out
// and q_scan_idx and vlc_cbp_valid are added; the ping-pong half used for a
// macroblock is the parity of its position in the frame, this design's
// choice. Only bit 0 of ME_MB_X is used (it picks the ping-pong half the
// motion-compensation unit writes); the lint warning on its other bits is
// expected.
module texture_top
  import tex_pkg::*;
#(
  parameter int MB_COLS = 22,
  parameter int MB_ROWS = 18
) (
  input  logic        Clk,
  input  logic        Resetn,
  input  logic        Ctrl_texture_en,
  input  logic        Ctrl_texture_ack,
  input  logic [4:0]  ME_MB_X,
  input  logic [4:0]  Text_MB_X,
  input  logic [4:0]  Text_MB_Y,
  input  logic [8:0]  Text_init_L0_frame_ptr_X_table,
  input  logic [8:0]  Text_init_L1_frame_ptr_X_table,
  input  logic [16:0] Text_init_L0_frame_ptr_Y_table,
  input  logic [16:0] Text_init_UV_frame_ptr_Y_table,
  input  logic        FrameType,
  input  logic [4:0]  Q_param,
  input  logic [2:0]  bus_user,
  input  logic        MB_I_P,
  input  logic [35:0] MC_error,
  input  logic        DCT_wren,
  input  logic [6:0]  DCT_wraddress,
  output logic [1:0]  texture_rsp,
  output logic        texture_bus_req,
  input  logic [31:0] AHB_data_in,
  output logic        texture_HWRITE,
  output logic [31:0] AHB_address_out,
  output logic [31:0] AHB_data_out,
  output logic        MB_type,
  output logic        qcoeff_valid,
  output logic        acdcp_direction,
  output logic        acdcp_flag,
  output logic [2:0]  q_blk_addr,
  output logic [5:0]  q_pix_addr,
  output logic [5:0]  q_scan_idx,
  output logic        vlc_cbp,
  output logic        vlc_cbp_valid,
  output logic [11:0] qcoeff,
  output logic        IDCT_cbp,
  output logic        IDCT_data_valid,
  output logic [6:0]  IDCT_address_out,
  output logic [35:0] IDCT_data_out
);
  localparam int WIDTH = 16 * MB_COLS;

  logic clk, rst_n;
  assign clk   = Clk;
  assign rst_n = Resetn;

  // ---------------------------------------------------------------- control
  logic       mb_start, pp_rd_en, acdc_start, amba_rd_start, amba_rd_next, amba_fill_sel;
  logic [3:0] pp_raddr;
  logic [2:0] cur_blk;
  logic       amba_rd_done, amba_rd_busy, amba_wr_empty, blk_done, idct_done, acdc_busy;
  logic       intra_q;
  logic [4:0] qp_q;
  logic       first_mb, last_mb, rd_sel, row_end;
  logic [4:0] nx, ny;

  function automatic logic mb_parity(input logic x0, input logic y0);
    return x0 ^ (y0 & (MB_COLS % 2 == 1));
  endfunction

  assign first_mb = (Text_MB_X == '0) && (Text_MB_Y == '0);
  assign row_end  = (32'(Text_MB_X) == MB_COLS - 1);
  assign last_mb  = row_end && (32'(Text_MB_Y) == MB_ROWS - 1);
  assign nx       = row_end ? 5'd0 : Text_MB_X + 5'd1;
  assign ny       = row_end ? Text_MB_Y + 5'd1 : Text_MB_Y;
  assign rd_sel   = FrameType ? mb_parity(Text_MB_X[0], Text_MB_Y[0]) : Text_MB_X[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin intra_q <= 1'b0; qp_q <= 5'd1; end
    else if (mb_start) begin intra_q <= MB_I_P; qp_q <= Q_param; end
  end
  assign MB_type = intra_q;

  texture_ctrl u_ctrl (
    .clk, .rst_n, .en(Ctrl_texture_en), .ack(Ctrl_texture_ack),
    .mb_intra(MB_I_P), .frame_intra(FrameType), .first_mb, .last_mb, .rd_sel,
    .amba_rd_done, .amba_rd_busy, .amba_wr_empty, .blk_done, .idct_done, .acdc_busy,
    .texture_rsp, .mb_start, .pp_rd_en, .pp_raddr, .acdc_start, .cur_blk,
    .amba_rd_start, .amba_rd_next, .amba_fill_sel);

  // ------------------------------------------------------ ping-pong buffer
  logic        am_pp_wr, pp_wr_en, pp_wr_sel, pp_valid;
  logic [6:0]  am_pp_addr, pp_waddr;
  logic [35:0] am_pp_data, pp_wdata;
  pix_t        pp_data;

  assign pp_wr_en  = FrameType ? am_pp_wr      : DCT_wren;
  assign pp_waddr  = FrameType ? am_pp_addr    : DCT_wraddress;
  assign pp_wdata  = FrameType ? am_pp_data    : MC_error;
  assign pp_wr_sel = FrameType ? amba_fill_sel : ME_MB_X[0];

  pingpong_buffer u_pp (
    .clk, .rst_n, .wr_ram_sel(pp_wr_sel), .en_wr(pp_wr_en), .waddr(pp_waddr),
    .data_in(pp_wdata), .raddr(pp_raddr), .en_rd(pp_rd_en),
    .data_out(pp_data), .valid_out(pp_valid));

  // ---------------------------------------------------------- DCT / IDCT
  logic  t_in_valid, t_in_idct, t_out_valid, t_out_idct;
  coef_t t_in_data, t_out_data;
  logic  iq_valid;
  coef_t iq_data;
  logic [2:0] iq_blk;
  logic [5:0] iq_pix;

  assign t_in_valid = pp_valid | iq_valid;
  assign t_in_idct  = iq_valid;
  assign t_in_data  = iq_valid ? iq_data : coef_t'(pp_data);

  dct2d u_dct (
    .clk, .rst_n, .in_valid(t_in_valid), .in_idct(t_in_idct), .in_data(t_in_data),
    .out_valid(t_out_valid), .out_idct(t_out_idct), .out_data(t_out_data));

  // forward output: column-major order, k -> raster (k mod 8)*8 + k/8
  logic [8:0] fo_cnt, io_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin fo_cnt <= '0; io_cnt <= '0; end
    else if (mb_start) begin fo_cnt <= '0; io_cnt <= '0; end
    else begin
      if (t_out_valid && !t_out_idct) fo_cnt <= fo_cnt + 9'd1;
      if (t_out_valid &&  t_out_idct) io_cnt <= io_cnt + 9'd1;
    end
  end
  assign idct_done = (io_cnt == 9'd384);

  // ------------------------------------------------------------ quantizer
  logic       q_valid, q_cbp_valid, q_cbp;
  coef_t      q_data;
  logic [2:0] q_blk;
  logic [5:0] q_pix;
  logic       norm_req, norm_chroma, norm_ack, norm_valid;
  coef_t      norm_val, norm_res;

  quantizer u_q (
    .clk, .rst_n, .qp(qp_q), .intra(intra_q),
    .in_valid(t_out_valid && !t_out_idct), .in_data(t_out_data),
    .in_blk(fo_cnt[8:6]), .in_pix({fo_cnt[2:0], fo_cnt[5:3]}),
    .out_valid(q_valid), .out_data(q_data), .out_blk(q_blk), .out_pix(q_pix),
    .cbp_valid(q_cbp_valid), .cbp(q_cbp),
    .norm_req, .norm_val, .norm_chroma, .norm_ack, .norm_valid, .norm_res);

  inv_quantizer u_iq (
    .clk, .rst_n, .qp(qp_q), .intra(intra_q),
    .in_valid(q_valid), .in_data(q_data), .in_blk(q_blk), .in_pix(q_pix),
    .out_valid(iq_valid), .out_data(iq_data), .out_blk(iq_blk), .out_pix(iq_pix));

  assign blk_done = iq_valid && (iq_pix == 6'd63);

  // ------------------------------------------------------ AC/DC prediction
  logic       a_valid, a_flag, a_dir, a_cbp_valid, a_cbp;
  coef_t      a_data;
  logic [5:0] a_pix;
  logic [2:0] a_blk;

  acdc_pred #(.MB_COLS(MB_COLS)) u_acdc (
    .clk, .rst_n, .start(acdc_start), .blk(cur_blk), .mb_x(Text_MB_X), .mb_y(Text_MB_Y),
    .q_valid(q_valid && intra_q), .q_data, .q_pix,
    .iq_valid(iq_valid && intra_q), .iq_data, .iq_pix,
    .norm_req, .norm_val, .norm_chroma, .norm_ack, .norm_valid, .norm_res,
    .vlc_valid(a_valid), .vlc_data(a_data), .vlc_pix(a_pix), .vlc_blk(a_blk),
    .acdcp_flag(a_flag), .acdcp_direction(a_dir),
    .cbp_valid(a_cbp_valid), .cbp(a_cbp), .busy(acdc_busy));

  // ----------------------------------------------------------- VLC outputs
  scan_t scan_mode;
  assign qcoeff_valid    = intra_q ? a_valid : q_valid;
  assign qcoeff          = intra_q ? a_data  : q_data;
  assign q_blk_addr      = intra_q ? a_blk   : q_blk;
  assign q_pix_addr      = intra_q ? a_pix   : q_pix;
  assign acdcp_flag      = intra_q & a_flag;
  assign acdcp_direction = intra_q & a_dir;
  assign vlc_cbp_valid   = intra_q ? a_cbp_valid : q_cbp_valid;
  assign vlc_cbp         = intra_q ? a_cbp       : q_cbp;
  assign scan_mode       = !acdcp_flag ? SCAN_ZIGZAG : (acdcp_direction ? SCAN_ALT_H : SCAN_ALT_V);

  scan_order u_scan (.mode(scan_mode), .pos(q_pix_addr), .idx(q_scan_idx));

  // ------------------------------------------------- reconstruction output
  logic        s_valid;
  logic [35:0] s_data;
  logic [31:0] s_pix8;
  logic [6:0]  s_addr;
  logic [5:0]  blk_cbp;

  s2p4 u_s2p (
    .clk, .rst_n, .in_valid(t_out_valid && t_out_idct), .in_data(pix_t'(t_out_data)),
    .in_blk(io_cnt[8:6]), .out_valid(s_valid), .out_data(s_data), .out_pix8(s_pix8),
    .out_addr(s_addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) blk_cbp <= '0;
    else if (q_cbp_valid) blk_cbp[q_blk] <= q_cbp;
  end

  assign IDCT_data_valid  = s_valid && !FrameType;
  assign IDCT_address_out = s_addr;
  assign IDCT_data_out    = s_data;
  assign IDCT_cbp         = blk_cbp[s_addr[6:4]];

  amba_master #(.WIDTH(WIDTH)) u_amba (
    .clk, .rst_n,
    .rd_start(amba_rd_start), .rd_mb_x(amba_rd_next ? nx : Text_MB_X),
    .rd_mb_y(amba_rd_next ? ny : Text_MB_Y), .rd_done(amba_rd_done), .rd_busy(amba_rd_busy),
    .wr_push(s_valid && FrameType), .wr_data(s_pix8), .wr_addr(s_addr),
    .cur_mb_x(Text_MB_X), .cur_mb_y(Text_MB_Y),
    .ptr_x_l(Text_init_L0_frame_ptr_X_table), .ptr_x_c(Text_init_L1_frame_ptr_X_table),
    .ptr_y_l(Text_init_L0_frame_ptr_Y_table), .ptr_y_c(Text_init_UV_frame_ptr_Y_table),
    .wr_empty(amba_wr_empty),
    .pp_wr_en(am_pp_wr), .pp_waddr(am_pp_addr), .pp_wdata(am_pp_data),
    .bus_req(texture_bus_req), .bus_user, .hwrite(texture_HWRITE),
    .haddr(AHB_address_out), .hwdata(AHB_data_out), .hrdata(AHB_data_in));

  a_blk_order: assert property (@(posedge clk) disable iff (!rst_n) blk_done |-> iq_blk == cur_blk);
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) !(pp_valid && iq_valid));
endmodule
