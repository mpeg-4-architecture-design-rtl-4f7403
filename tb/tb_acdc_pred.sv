// tb_acdc_pred: self-checking test of the AC/DC predictor.
//
// Codes every block of a 3 x 2 macroblock frame (MB_COLS = 3) in raster
// order with random quantized coefficients. The testbench plays the
// quantizer (coefficient stream, exact rounded-division normalisation) and
// the inverse quantizer (DC times dc_scaler). A reference model keeps each
// block's DC and first row/column in a grid per colour plane, applies the
// MPEG-4 rules (direction from the DC gradients, DC prediction always,
// AC prediction of the first row or column when it lowers the sum of
// magnitudes, frame edges as DC 1024 / AC 0) and checks every coefficient
// sent to the VLC, the flag, the direction and the coded-block flags.
module tb_acdc_pred;
  import tex_pkg::*;
  localparam int COLS = 3, ROWS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0; logic [2:0] blk = '0; logic [4:0] mb_x = '0, mb_y = '0;
  logic q_valid = 0; coef_t q_data = '0; logic [5:0] q_pix = '0;
  logic iq_valid = 0; coef_t iq_data = '0; logic [5:0] iq_pix = '0;
  logic norm_req; coef_t norm_val; logic norm_chroma;
  logic norm_ack = 0, norm_valid = 0; coef_t norm_res = '0;
  logic vlc_valid; coef_t vlc_data; logic [5:0] vlc_pix; logic [2:0] vlc_blk;
  logic acdcp_flag, acdcp_direction, cbp_valid, cbp, busy;

  acdc_pred #(.MB_COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  int qp = 7;
  // reference grids: [plane][gy][gx][0..7] row (DC + top row), col (DC + left column)
  int g_row [3][2*ROWS][2*COLS][8];
  int g_col [3][2*ROWS][2*COLS][8];
  int exp_v [64];
  int exp_flag, exp_dir, exp_cbp;
  int got_cnt, got_cbp_cnt, mbcbp_cnt;
  int mb_cbp [6];
  int stat_top = 0, stat_left = 0, stat_pred = 0, stat_nopred = 0;

  function automatic int dcs(int q, bit c);
    if (!c) return (q <= 4) ? 8 : (q <= 8) ? 2*q : (q <= 24) ? q + 8 : 2*q - 16;
    else    return (q <= 4) ? 8 : (q <= 24) ? (q + 13) / 2 : q - 6;
  endfunction
  function automatic int iabs(int v); return (v < 0) ? -v : v; endfunction

  // quantizer normalisation port
  always @(posedge clk) begin
    norm_ack <= 0;
    if (norm_req && !norm_ack) begin
      automatic int v = int'(norm_val), d = dcs(qp, norm_chroma);
      automatic int r = (iabs(v) + d / 2) / d;
      norm_ack <= 1;
      fork begin
        automatic int rr = (v < 0) ? -r : r;
        repeat (4) @(posedge clk);
        norm_valid <= 1; norm_res <= 12'(rr);
        @(posedge clk);
        norm_valid <= 0;
      end join_none
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (vlc_valid) begin
      checks++;
      if (int'(vlc_data) != exp_v[vlc_pix] || acdcp_flag != exp_flag[0] ||
          acdcp_direction != exp_dir[0]) begin
        failures++;
        if (failures < 10) $display("pix %0d got %0d exp %0d flag %0d/%0d dir %0d/%0d",
          vlc_pix, vlc_data, exp_v[vlc_pix], acdcp_flag, exp_flag, acdcp_direction, exp_dir);
      end
      got_cnt++;
    end
    if (cbp_valid) begin
      checks++;
      if (got_cbp_cnt == 0) begin
        if (cbp != exp_cbp[0]) failures++;
        got_cbp_cnt++;
      end else begin
        if (cbp != mb_cbp[vlc_blk][0]) failures++;
        mbcbp_cnt++;
      end
    end
  end

  task automatic code_block(int mx, int my, int b);
    int plane = (b < 4) ? 0 : b - 3;
    int gx = (b < 4) ? 2*mx + (b % 2) : mx;
    int gy = (b < 4) ? 2*my + (b / 2) : my;
    int qf [64];
    int ra [8], rc [8];
    int dca, dcb, dcc, top, pdc, s_org, s_prd, usep, nz, sum, d;
    d = dcs(qp, b >= 4);
    for (int i = 0; i < 64; i++) begin
      automatic int sel = int'($urandom_range(3));
      qf[i] = (sel == 0) ? int'($urandom_range(6)) - 3 : 0;
    end
    qf[0] = 1 + int'($urandom_range(2040 / d - 1));
    if ($urandom_range(3) == 0) for (int i = 1; i < 8; i++) qf[i] = int'($urandom_range(20)) - 10;
    // neighbours
    dca = (gx > 0) ? g_col[plane][gy][gx-1][0] : 1024;
    dcc = (gy > 0) ? g_row[plane][gy-1][gx][0] : 1024;
    dcb = (gx > 0 && gy > 0) ? g_row[plane][gy-1][gx-1][0] : 1024;
    top = (iabs(dca - dcb) < iabs(dcb - dcc));
    for (int i = 1; i < 8; i++) begin
      ra[i] = (gx > 0) ? g_col[plane][gy][gx-1][i] : 0;
      rc[i] = (gy > 0) ? g_row[plane][gy-1][gx][i] : 0;
    end
    pdc = ((top ? dcc : dca) + d / 2) / d;
    s_org = 0; s_prd = 0;
    for (int i = 1; i < 8; i++) begin
      automatic int p = top ? i : 8 * i;
      s_org += iabs(qf[p]);
      s_prd += iabs(qf[p] - (top ? rc[i] : ra[i]));
    end
    usep = (s_prd < s_org);
    for (int p = 0; p < 64; p++) exp_v[p] = qf[p];
    exp_v[0] = qf[0] - pdc;
    if (usep) for (int i = 1; i < 8; i++) begin
      automatic int p = top ? i : 8 * i;
      exp_v[p] = qf[p] - (top ? rc[i] : ra[i]);
    end
    nz = 0; sum = 0;
    for (int p = 0; p < 64; p++) begin
      if (exp_v[p] != 0 && (p == 0 || p == 1 || p == 8)) nz = 1;
      sum += iabs(exp_v[p]);
    end
    exp_cbp = nz || sum > 2; exp_flag = usep; exp_dir = top;
    mb_cbp[b] = exp_cbp;
    if (top) stat_top++; else stat_left++;
    if (usep) stat_pred++; else stat_nopred++;
    // update reference grid
    g_row[plane][gy][gx][0] = qf[0] * d;
    g_col[plane][gy][gx][0] = qf[0] * d;
    for (int i = 1; i < 8; i++) begin
      g_row[plane][gy][gx][i] = qf[i];
      g_col[plane][gy][gx][i] = qf[8 * i];
    end
    // drive the block
    got_cnt = 0; got_cbp_cnt = 0;
    @(negedge clk);
    start = 1; blk = 3'(b); mb_x = 5'(mx); mb_y = 5'(my);
    @(negedge clk);
    start = 0;
    repeat (40) @(negedge clk);
    for (int k = 0; k < 64; k++) begin
      q_valid = 1; q_pix = 6'((k % 8) * 8 + k / 8); q_data = 12'(qf[(k % 8) * 8 + k / 8]);
      iq_valid = 1; iq_pix = 6'((k + 60) % 64); iq_data = (k == 4) ? 12'(qf[0] * d) : 12'sd77;
      @(negedge clk);
    end
    q_valid = 0; iq_valid = 0;
    repeat (120) @(negedge clk);
    checks++;
    if (got_cnt != 64 || got_cbp_cnt != 1) begin
      failures++; $display("block %0d: %0d outputs %0d cbp", b, got_cnt, got_cbp_cnt);
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++) for (int y = 0; y < 2*ROWS; y++) for (int x = 0; x < 2*COLS; x++)
      for (int i = 0; i < 8; i++) begin g_row[p][y][x][i] = 0; g_col[p][y][x][i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      qp = (f == 0) ? 3 : (f == 1) ? 7 : (f == 2) ? 15 : 28;
      for (int my = 0; my < ROWS; my++) for (int mx = 0; mx < COLS; mx++) begin
        mbcbp_cnt = 0;
        for (int b = 0; b < 6; b++) code_block(mx, my, b);
        checks++;
        if (mbcbp_cnt != 6) begin failures++; $display("MB cbp count %0d", mbcbp_cnt); end
      end
    end
    $display("directions top=%0d left=%0d, AC prediction used=%0d not=%0d",
             stat_top, stat_left, stat_pred, stat_nopred);
    checks++;
    if (stat_top == 0 || stat_left == 0 || stat_pred == 0 || stat_nopred == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
