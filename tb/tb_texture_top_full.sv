// tb_texture_top_full: end-to-end testbench of texture_top at full size (CIF, 22x18 macroblocks, default parameters).
//
// Around the engine it models the system: a frame memory with a zero-wait
// AMBA slave (address phase, then data phase) holding the current and the
// reconstructed frame, a bus arbiter that grants the engine (bus_user = 1)
// after a random delay, the motion-compensation unit that fills the
// ping-pong buffer with prediction errors in P frames, and the system
// controller that starts each macroblock and acknowledges its finish.
// It codes one I frame over the whole frame (intra macroblocks through the
// bus) and then 30 macroblocks of a P frame, mostly inter, some intra.
// Checks:
//  * I frame: every reconstructed pixel written back over the bus is close
//    to the original (error at most 3*QP + 2) and the frame PSNR is at
//    least 36 dB at QP 2;
//  * intra macroblocks of the P frame: block RMS error at most 2*QP + 2;
//  * inter macroblocks: the quantized coefficients sent to the VLC are
//    decoded here (inverse quantization and a floating-point IDCT) and the
//    engine's reconstructed errors must match within 1; IDCT_cbp must be
//    set exactly when the block has a nonzero coefficient;
//  * every block gives 64 coefficients at distinct positions, the
//    coded-block flags arrive as expected, texture_rsp runs idle, busy,
//    finish, idle;
//  * every mechanism happened at least once: bus reads and writes, MC
//    fills, intra and inter macroblocks, both prediction directions, AC
//    prediction used and not used, all three scans, cbp 0 and 1.
// It reports the cycles per macroblock.
module tb_texture_top_full;
  localparam int COLS = 22, ROWS = 18, W = 16 * COLS, H = 16 * ROWS;
  localparam int PMB = 30;
  localparam int QPI = 2;

  logic        clk = 0, rst_n = 0;
  logic        en = 0, ack = 0;
  logic [4:0]  me_x = 0, mb_x = 0, mb_y = 0, qp = 5'd2;
  logic        ftype = 1, mb_ip = 1;
  logic [2:0]  bus_user = 3'd0;
  logic [35:0] mc_err = '0;
  logic        mc_wren = 0;
  logic [6:0]  mc_addr = '0;
  logic [31:0] hrdata;
  wire  [1:0]  rsp;
  wire         bus_req, hwrite, mb_type, qv, adir, aflag, cbpo, cbpv, icbp, idv;
  wire  [31:0] haddr, hwdata;
  wire  [2:0]  qblk;
  wire  [5:0]  qpix, qscan;
  wire  [11:0] qco;
  wire  [6:0]  iaddr;
  wire  [35:0] idata;

  always #5 clk = ~clk;

  texture_top  dut (
    .Clk(clk), .Resetn(rst_n), .Ctrl_texture_en(en), .Ctrl_texture_ack(ack),
    .ME_MB_X(me_x), .Text_MB_X(mb_x), .Text_MB_Y(mb_y),
    .Text_init_L0_frame_ptr_X_table(9'd0), .Text_init_L1_frame_ptr_X_table(9'd0),
    .Text_init_L0_frame_ptr_Y_table(17'd0), .Text_init_UV_frame_ptr_Y_table(17'd0),
    .FrameType(ftype), .Q_param(qp), .bus_user, .MB_I_P(mb_ip),
    .MC_error(mc_err), .DCT_wren(mc_wren), .DCT_wraddress(mc_addr),
    .texture_rsp(rsp), .texture_bus_req(bus_req), .AHB_data_in(hrdata),
    .texture_HWRITE(hwrite), .AHB_address_out(haddr), .AHB_data_out(hwdata),
    .MB_type(mb_type), .qcoeff_valid(qv), .acdcp_direction(adir), .acdcp_flag(aflag),
    .q_blk_addr(qblk), .q_pix_addr(qpix), .q_scan_idx(qscan), .vlc_cbp(cbpo),
    .vlc_cbp_valid(cbpv), .qcoeff(qco), .IDCT_cbp(icbp), .IDCT_data_valid(idv),
    .IDCT_address_out(iaddr), .IDCT_data_out(idata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, msg); end
  endtask

  // ------------------------------------------------------------ frame memory
  localparam int CUR_Y = 32'h0000_0000, CUR_U = 32'h0001_8C00, CUR_V = 32'h0001_EF00;
  localparam int REC_Y = 32'h0010_0000, REC_U = 32'h0011_8C00, REC_V = 32'h0011_EF00;
  byte unsigned mem [int];
  logic [31:0] a_q;
  logic        w_pend = 1'b0;
  logic [31:0] w_addr;
  int n_rd = 0, n_wr = 0;

  function automatic logic [31:0] rd32(input int a);
    logic [31:0] v;
    for (int i = 0; i < 4; i++) v[8*i +: 8] = mem.exists(a + i) ? mem[a + i] : 8'h00;
    return v;
  endfunction
  assign hrdata = rd32(int'(a_q));

  always @(posedge clk) begin
    a_q <= haddr;
    if (w_pend) begin
      for (int i = 0; i < 4; i++) mem[int'(w_addr) + i] = hwdata[8*i +: 8];
      n_wr++;
    end
    w_pend <= hwrite && rst_n;
    w_addr <= haddr;
  end

  // count bus reads: a read address phase is a new haddr in the current frame
  // while the engine owns the bus and HWRITE is low (counted from the pp writes)
  always @(posedge clk) if (dut.u_amba.pp_wr_en) n_rd++;

  // ----------------------------------------------------------------- arbiter
  int gdel;
  always @(posedge clk) begin
    if (!bus_req) begin bus_user <= 3'd0; gdel <= $urandom_range(0, 6); end
    else if (gdel > 0) gdel <= gdel - 1;
    else bus_user <= 3'd1;
  end

  // ----------------------------------------------------- original pictures
  function automatic int orig_pix(input int c, input int x, input int y);
    // smooth gradients, stripes and a little noise so that prediction works
    int v;
    case (c)
      0: v = 60 + (x * 3) / 2 + y + ((y / 8) % 2) * 20 + int'(($urandom % 5));
      1: v = 110 + x / 2 + ((x / 4) % 2) * 12;
      default: v = 140 - y + ((y / 4) % 2) * 15;
    endcase
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction
  int orig [3][H][W];

  // -------------------------------------------------------- VLC collection
  int   vq [6][64];
  bit   vseen [6][64];
  int   vcount [6];
  int   ncbp;
  int   n_top = 0, n_left = 0, n_flag1 = 0, n_flag0 = 0, n_zz = 0, n_ah = 0, n_av = 0;
  int   n_cbp0 = 0, n_cbp1 = 0;
  always @(negedge clk) if (rst_n) begin
    if (qv) begin
      check(!vseen[qblk][qpix], "position sent twice");
      vseen[qblk][qpix] = 1; vq[qblk][qpix] = int'($signed(qco)); vcount[qblk]++;
      if (qpix == 0 && mb_type) begin
        if (adir) n_top++; else n_left++;
        if (aflag) n_flag1++; else n_flag0++;
      end
      if (!aflag) n_zz++; else if (adir) n_ah++; else n_av++;
    end
    if (cbpv) begin ncbp++; if (cbpo) n_cbp1++; else n_cbp0++; end
  end

  // ------------------------------------------------- P-frame reconstruction
  int  rec_e [6][64];
  int  rec_n;
  bit  rec_cbp [6];
  always @(negedge clk) if (rst_n && idv) begin
    for (int j = 0; j < 4; j++) rec_e[iaddr[6:4]][iaddr[3:0] * 4 + j] = int'($signed(idata[9*j +: 9]));
    rec_cbp[iaddr[6:4]] = icbp;
    rec_n++;
  end

  function automatic int iq(input int l, input int q, input bit intra_dc, input int dcs);
    int m;
    if (intra_dc) return l * dcs;
    if (l == 0) return 0;
    m = q * (2 * (l < 0 ? -l : l) + 1) - ((q % 2 == 0) ? 1 : 0);
    if (m > 2048) m = 2048;
    return l < 0 ? -m : m;
  endfunction

  function automatic int idct_pix(input int f [64], input int x, input int y);
    real s = 0.0;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        real cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        s += cu * cv / 4.0 * f[v * 8 + u] * $cos((2 * x + 1) * u * 3.14159265358979 / 16.0)
                                          * $cos((2 * y + 1) * v * 3.14159265358979 / 16.0);
      end
    if (s >= 0) s = s + 0.5; else s = s - 0.5;
    if (s > 255.0) return 255;
    if (s < -256.0) return -256;
    return int'($rtoi(s));
  endfunction

  // ------------------------------------------------------------- one MB
  int cyc_max = 0, cyc_min = 1 << 30, cyc_sum = 0, n_mb = 0, n_intra = 0, n_inter = 0, n_fill = 0;
  task automatic code_mb(input int x, input int y, input bit frame_i, input bit intra, input int q);
    int t0, t1;
    for (int b = 0; b < 6; b++) begin
      vcount[b] = 0;
      for (int p = 0; p < 64; p++) vseen[b][p] = 0;
    end
    ncbp = 0; rec_n = 0;
    @(posedge clk);
    mb_x <= 5'(x); mb_y <= 5'(y); ftype <= frame_i; mb_ip <= intra; qp <= 5'(q);
    en <= 1;
    @(posedge clk);
    en <= 0;
    t0 = int'($time / 10);
    @(negedge clk);
    check(rsp == 2'd1, "texture_rsp busy after enable");
    while (rsp != 2'd2) @(negedge clk);
    t1 = int'($time / 10);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    check(rsp == 2'd2, "finish held until ack");
    @(posedge clk); ack <= 1; @(posedge clk); ack <= 0;
    @(negedge clk);
    check(rsp == 2'd0, "idle after ack");
    for (int b = 0; b < 6; b++) check(vcount[b] == 64, $sformatf("block %0d sent %0d coefficients", b, vcount[b]));
    check(ncbp == (intra ? 12 : 6), $sformatf("cbp count %0d", ncbp));
    if (!frame_i) check(rec_n == 96, $sformatf("reconstructed words %0d", rec_n));
    cyc_max = (t1 - t0 > cyc_max) ? t1 - t0 : cyc_max;
    cyc_min = (t1 - t0 < cyc_min) ? t1 - t0 : cyc_min;
    cyc_sum += t1 - t0; n_mb++;
    if (intra) n_intra++; else n_inter++;
  endtask

  // -------------------------------------------------------------- stimulus
  initial begin
    fork
      begin
        repeat (3000 * (COLS * ROWS + PMB) + 20000) @(posedge clk);
        $display("TIMEOUT");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
        $finish;
      end
    join_none

    for (int c = 0; c < 3; c++)
      for (int y = 0; y < (c == 0 ? H : H / 2); y++)
        for (int x = 0; x < (c == 0 ? W : W / 2); x++) begin
          orig[c][y][x] = orig_pix(c, x, y);
          mem[(c == 0 ? CUR_Y : (c == 1 ? CUR_U : CUR_V)) + y * (c == 0 ? W : W / 2) + x] = byte'(orig[c][y][x]);
        end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    check(rsp == 2'd0, "idle after reset");

    // I frame
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) code_mb(x, y, 1'b1, 1'b1, QPI);
    begin
      automatic real se = 0.0;
      automatic int  n = 0, emax = 0;
      real psnr;
      for (int c = 0; c < 3; c++)
        for (int y = 0; y < (c == 0 ? H : H / 2); y++)
          for (int x = 0; x < (c == 0 ? W : W / 2); x++) begin
            automatic int a = (c == 0 ? REC_Y : (c == 1 ? REC_U : REC_V)) + y * (c == 0 ? W : W / 2) + x;
            automatic int r = mem.exists(a) ? int'(mem[a]) : -1000;
            automatic int e = r - orig[c][y][x];
            if (e < 0) e = -e;
            if (e > emax) emax = e;
            check(e <= 3 * QPI + 2, $sformatf("I frame pixel c%0d (%0d,%0d) rec %0d orig %0d", c, x, y, r, orig[c][y][x]));
            se += real'(e * e); n++;
          end
      psnr = 10.0 * $log10(255.0 * 255.0 / (se / n + 1e-9));
      $display("I frame: PSNR %0.2f dB, max error %0d, %0d bus reads, %0d bus writes", psnr, emax, n_rd, n_wr);
      check(psnr >= 36.0, "I frame PSNR");
      check(n_wr == 96 * COLS * ROWS, "bus writes");
      check(n_rd == 96 * COLS * ROWS, "bus reads");
    end

    // P frame
    for (int m = 0; m < PMB; m++) begin
      automatic int x = m % COLS, y = (m / COLS) % ROWS, q = $urandom_range(1, 31);
      automatic bit intra = (m % 5 == 3);
      int e_in [6][64];
      // motion-compensation unit writes the prediction errors
      me_x <= 5'(x);
      for (int w = 0; w < 96; w++) begin
        logic [35:0] d;
        for (int j = 0; j < 4; j++) begin
          automatic int v = intra ? $urandom_range(40, 200) : $urandom_range(0, 60) - 30;
          if (!intra && (w / 16) == 2) v = 0;          // one block with nothing to code
          if (!intra && (w / 16) == 5) v = (j == 0) ? 1 : 0;
          e_in[w / 16][(w % 16) * 4 + j] = v;
          d[9*j +: 9] = 9'(v);
        end
        @(posedge clk); mc_wren <= 1; mc_addr <= 7'(w); mc_err <= d;
        n_fill++;
      end
      @(posedge clk); mc_wren <= 0;
      code_mb(x, y, 1'b0, intra, q);
      for (int b = 0; b < 6; b++) begin
        if (!intra) begin
          automatic int f [64];
          automatic bit nz = 0;
          for (int p = 0; p < 64; p++) begin f[p] = iq(vq[b][p], q, 0, 0); nz |= (vq[b][p] != 0); end
          check(rec_cbp[b] == nz, $sformatf("IDCT_cbp block %0d", b));
          for (int y2 = 0; y2 < 8; y2++)
            for (int x2 = 0; x2 < 8; x2++) begin
              automatic int r = idct_pix(f, x2, y2), d = rec_e[b][y2 * 8 + x2] - r;
              check(d >= -1 && d <= 1, $sformatf("inter MB %0d blk %0d (%0d,%0d) engine %0d decoded %0d",
                                                 m, b, x2, y2, rec_e[b][y2 * 8 + x2], r));
            end
        end else begin
          // each coefficient is off by at most QP, so the block's RMS error
          // (orthonormal transform) stays below QP plus rounding
          automatic real se = 0.0;
          for (int p = 0; p < 64; p++) se += real'((rec_e[b][p] - e_in[b][p]) * (rec_e[b][p] - e_in[b][p]));
          check($sqrt(se / 64.0) <= 2.0 * q + 2.0, "intra MB in P frame reconstruction");
        end
      end
    end

    $display("cycles per MB: min %0d max %0d mean %0d", cyc_min, cyc_max, cyc_sum / n_mb);
    $display("prediction: top %0d left %0d, AC prediction used %0d not %0d; scans zz %0d alt-h %0d alt-v %0d; cbp0 %0d cbp1 %0d",
             n_top, n_left, n_flag1, n_flag0, n_zz, n_ah, n_av, n_cbp0, n_cbp1);
    check(n_rd > 0 && n_wr > 0, "mechanism: bus read and write");
    check(n_fill > 0, "mechanism: MC fill");
    check(n_intra > 0 && n_inter > 0, "mechanism: intra and inter MBs");
    check(n_top > 0 && n_left > 0, "mechanism: both prediction directions");
    check(n_flag1 > 0 && n_flag0 > 0, "mechanism: AC prediction used and not used");
    check(n_zz > 0 && n_ah > 0 && n_av > 0, "mechanism: all three scans");
    check(n_cbp0 > 0 && n_cbp1 > 0, "mechanism: cbp 0 and 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
