// tb_inv_quantizer: self-checking test of the inverse quantizer.
//
// Random levels (small, large and zero) for random QP in both modes are
// compared with the reconstruction rules computed here: intra DC times
// dc_scaler, otherwise QP*(2|L|+1) less one for even QP, signed and limited
// to -2048..2047. The four-cycle latency and the tags are checked too.
module tb_inv_quantizer;
  import tex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] qp; logic intra;
  logic in_valid; coef_t in_data; logic [2:0] in_blk; logic [5:0] in_pix;
  logic out_valid; coef_t out_data; logic [2:0] out_blk; logic [5:0] out_pix;

  inv_quantizer dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$], exp_t [$], exp_tag [$];

  function automatic int dcs(int q, bit c);
    if (!c) return (q <= 4) ? 8 : (q <= 8) ? 2*q : (q <= 24) ? q + 8 : 2*q - 16;
    else    return (q <= 4) ? 8 : (q <= 24) ? (q + 13) / 2 : q - 6;
  endfunction
  function automatic int iqref(int l, int q, bit intr, int pix, int blk);
    int a, r;
    a = (l < 0) ? -l : l;
    if (intr && pix == 0) r = a * dcs(q, blk >= 4);
    else if (a == 0) r = 0;
    else r = q * (2 * a + 1) - ((q % 2 == 0) ? 1 : 0);
    r = (l < 0) ? -r : r;
    return (r > 2047) ? 2047 : (r < -2048) ? -2048 : r;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      automatic int e = exp_q.pop_front(), t = exp_t.pop_front(), g = exp_tag.pop_front();
      if (int'(out_data) != e || int'($time / 10) - t != 4 || g != {out_blk, out_pix}) begin
        failures++;
        if (failures < 10) $display("IQ mismatch got %0d exp %0d", out_data, e);
      end
    end
  end

  initial begin
    in_valid = 0; in_data = '0; in_blk = '0; in_pix = '0; qp = 5'd1; intra = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int b = 0; b < 500; b++) begin
      automatic int q = 1 + int'($urandom_range(30));
      automatic bit intr = 1'($urandom_range(1));
      automatic int blk = int'($urandom_range(5));
      qp = 5'(q); intra = intr;
      for (int k = 0; k < 64; k++) begin
        automatic int sel = int'($urandom_range(3));
        automatic int l = (sel == 0) ? 0 : (sel == 1) ? int'($urandom_range(20)) - 10 :
                          (sel == 2) ? int'($urandom_range(254)) : int'($urandom_range(4095)) - 2048;
        in_valid = 1; in_data = 12'(l); in_blk = 3'(blk); in_pix = 6'(k);
        exp_q.push_back(iqref(l, q, intr, k, blk));
        exp_t.push_back(int'($time / 10)); exp_tag.push_back({3'(blk), 6'(k)});
        @(negedge clk);
      end
      in_valid = 0;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (exp_q.size()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
