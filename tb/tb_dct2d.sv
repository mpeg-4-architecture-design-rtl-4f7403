// tb_dct2d: self-checking test of the 2-D DCT/IDCT.
//
// Streams blocks back to back, alternating a DCT of random pixels and an
// IDCT of the rounded exact DCT of other random pixels (the IEEE 1180
// procedure). The DCT output is compared with a double-precision DCT rounded
// to integers (tolerance 1). The IDCT output is compared with a
// double-precision IDCT rounded and clipped to -256..255, and the IEEE 1180
// error statistics (peak, per-pixel mean and mean square, overall mean and
// mean square) are checked for ranges -256..255 and -5..5. The latency from
// the first input of the first block to its first output must be 90 cycles.
module tb_dct2d;
  localparam int NBLK = 1200;   // pairs per range
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_idct = 0;
  logic signed [11:0] in_data = '0;
  logic out_valid, out_idct;
  logic signed [11:0] out_data;

  dct2d dut (.*);

  int checks = 0, failures = 0;
  real cs [8][8];

  // expected streams
  int exp_q [$];
  int exp_mode [$];
  real sum_e [64], sum_e2 [64];
  int  npix_blocks;
  int  peak;
  int  ncyc = 0, t_in0 = -1, t_out0 = -1;

  always @(posedge clk) ncyc++;

  function automatic real cdct(int u, int x);
    return ((u == 0) ? $sqrt(1.0/8.0) : 0.5) * $cos((2*x+1)*u*3.14159265358979323846/16.0);
  endfunction

  function automatic int rnd(real v);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  task automatic fdct(input int f [64], output real F [64]);
    for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
      automatic real s = 0;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        s += f[y*8+x] * cs[v][y] * cs[u][x];
      F[v*8+u] = s;
    end
  endtask

  task automatic idct(input int F [64], output real f [64]);
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      automatic real s = 0;
      for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++)
        s += F[v*8+u] * cs[v][y] * cs[u][x];
      f[y*8+x] = s;
    end
  endtask

  task automatic send_block(input int d [64], input logic mode);
    for (int k = 0; k < 64; k++) begin
      in_valid <= 1; in_idct <= mode; in_data <= 12'(d[k]);
      if (t_in0 < 0) t_in0 = ncyc;
      @(posedge clk);
    end
  endtask

  // collector
  int ocnt = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e, m;
    if (t_out0 < 0) t_out0 = ncyc;
    e = exp_q.pop_front();
    m = exp_mode.pop_front();
    if (m == 0) begin
      checks++;
      if (out_idct !== 1'b0 || (int'(out_data) - e > 1) || (e - int'(out_data) > 1)) begin
        failures++;
        if (failures < 10) $display("DCT mismatch got %0d exp %0d", out_data, e);
      end
    end else begin
      automatic int err = int'(out_data) - e;
      if (out_idct !== 1'b1) failures++;
      sum_e[ocnt % 64]  += err;
      sum_e2[ocnt % 64] += err * err;
      if (err > peak) peak = err;
      if (-err > peak) peak = -err;
    end
    if (m == 1) ocnt++;
  end

  task automatic run_range(input int lo, input int hi);
    int f [64], g [64], c [64], cm [64], dr [64];
    real F [64], G [64], r [64];
    for (int i = 0; i < 64; i++) begin sum_e[i] = 0; sum_e2[i] = 0; end
    peak = 0; ocnt = 0;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        f[i] = lo + int'($urandom_range(hi - lo));
        g[i] = lo + int'($urandom_range(hi - lo));
      end
      // DCT block: expected coefficients, column-major
      fdct(f, F);
      for (int k = 0; k < 64; k++) begin
        automatic int v = k % 8, u = k / 8;
        dr[k] = rnd(F[v*8+u]);
        exp_q.push_back(dr[k]); exp_mode.push_back(0);
      end
      // IDCT block: rounded, clipped exact DCT of g, fed column-major
      fdct(g, G);
      for (int i = 0; i < 64; i++) begin
        c[i] = rnd(G[i]);
        if (c[i] > 2047) c[i] = 2047;
        if (c[i] < -2048) c[i] = -2048;
      end
      idct(c, r);
      for (int k = 0; k < 64; k++) begin
        automatic int e = rnd(r[k]);
        if (e > 255) e = 255;
        if (e < -256) e = -256;
        exp_q.push_back(e); exp_mode.push_back(1);
        cm[k] = c[(k % 8) * 8 + k / 8];
      end
      send_block(f, 1'b0);
      send_block(cm, 1'b1);
    end
    in_valid <= 0;
    repeat (200) @(posedge clk);
    begin
      automatic real omse = 0, ome = 0, mse_max = 0, me_max = 0;
      for (int i = 0; i < 64; i++) begin
        automatic real mse = sum_e2[i] / NBLK, me = sum_e[i] / NBLK;
        omse += mse / 64.0; ome += me / 64.0;
        if (mse > mse_max) mse_max = mse;
        if (me > me_max) me_max = me;
        if (-me > me_max) me_max = -me;
      end
      if (ome < 0) ome = -ome;
      $display("range %0d..%0d: peak=%0d max_mse=%f omse=%f max_me=%f ome=%f",
               lo, hi, peak, mse_max, omse, me_max, ome);
      checks += 5;
      if (peak > 1) failures++;
      if (mse_max >= 0.06) failures++;
      if (omse >= 0.02) failures++;
      if (me_max >= 0.015) failures++;
      if (ome >= 0.0015) failures++;
    end
  endtask

  initial begin
    for (int u = 0; u < 8; u++) for (int x = 0; x < 8; x++) cs[u][x] = cdct(u, x);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_range(-256, 255);
    checks++;
    if (t_out0 - t_in0 != 90) begin
      failures++;
      $display("latency %0d, expected 90", t_out0 - t_in0);
    end
    run_range(-5, 5);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
