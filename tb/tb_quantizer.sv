// tb_quantizer: self-checking test of the quantizer.
//
// Drives blocks of random coefficients for random QP and both coding
// modes, plus normalisation requests in the idle cycles, and compares every
// output with exact integer division (not the reciprocal method), checks
// the four-cycle latency, the tags and the coded-block flag of each block.
module tb_quantizer;
  import tex_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] qp; logic intra;
  logic in_valid; coef_t in_data; logic [2:0] in_blk; logic [5:0] in_pix;
  logic out_valid; coef_t out_data; logic [2:0] out_blk; logic [5:0] out_pix;
  logic cbp_valid, cbp;
  logic norm_req; coef_t norm_val; logic norm_chroma;
  logic norm_ack, norm_valid; coef_t norm_res;

  quantizer dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$], exp_t [$], exp_tag [$], exp_n [$], exp_nt [$], exp_cbp [$];
  function automatic int cyc();
    return int'($time / 10);
  endfunction

  function automatic int dcs(int q, bit c);
    if (!c) return (q <= 4) ? 8 : (q <= 8) ? 2*q : (q <= 24) ? q + 8 : 2*q - 16;
    else    return (q <= 4) ? 8 : (q <= 24) ? (q + 13) / 2 : q - 6;
  endfunction
  function automatic int lim(int v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : v;
  endfunction
  function automatic int qref(int f, int q, bit intr, int pix, int blk);
    int a, r;
    a = (f < 0) ? -f : f;
    if (intr && pix == 0) r = (a + dcs(q, blk >= 4) / 2) / dcs(q, blk >= 4);
    else if (intr) r = a / (2*q);
    else r = (a - q/2 > 0) ? (a - q/2) / (2*q) : 0;
    return lim((f < 0) ? -r : r);
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        automatic int e = exp_q.pop_front(), t = exp_t.pop_front(), g = exp_tag.pop_front();
        if (int'(out_data) != e || cyc() - t != 4 || g != {out_blk, out_pix}) begin
          failures++;
          if (failures < 10) $display("Q mismatch got %0d exp %0d lat %0d", out_data, e, cyc() - t);
        end
      end
    end
    if (norm_valid) begin
      checks++;
      if (exp_n.size() == 0) failures++;
      else begin
        automatic int e = exp_n.pop_front(), t = exp_nt.pop_front();
        if (int'(norm_res) != e || cyc() - t != 4) begin
          failures++;
          $display("norm mismatch got %0d exp %0d", norm_res, e);
        end
      end
    end
    if (cbp_valid) begin
      checks++;
      if (exp_cbp.size() == 0 || cbp != exp_cbp.pop_front()) begin
        failures++; $display("cbp mismatch");
      end
    end
  end

  initial begin
    in_valid = 0; in_data = '0; in_blk = '0; in_pix = '0; qp = 5'd1; intra = 0;
    norm_req = 0; norm_val = '0; norm_chroma = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int b = 0; b < 600; b++) begin
      automatic int q = 1 + int'($urandom_range(30));
      automatic bit intr = 1'($urandom_range(1));
      automatic int blk = int'($urandom_range(5));
      automatic int kind = int'($urandom_range(3));
      automatic int nz = 0, sum = 0;
      @(negedge clk);
      qp = 5'(q); intra = intr;
      for (int k = 0; k < 64; k++) begin
        int f, e, a;
        case (kind)
          0: f = int'($urandom_range(4095)) - 2048;
          1: f = int'($urandom_range(8 * q)) - 4 * q;
          2: f = (k == 0 && intr) ? int'($urandom_range(2040)) : int'($urandom_range(6 * q)) - 3 * q;
          default: f = (k < 4) ? int'($urandom_range(200)) - 100 : 0;
        endcase
        in_valid = 1; in_data = 12'(f); in_blk = 3'(blk); in_pix = 6'(k);
        e = qref(f, q, intr, k, blk);
        exp_q.push_back(e); exp_t.push_back(cyc()); exp_tag.push_back({3'(blk), 6'(k)});
        a = (e < 0) ? -e : e;
        if (intr) begin
          if (a != 0 && (k == 0 || k == 1 || k == 8)) nz = 1;
          sum += a;
        end else if (a != 0) nz = 1;
        @(negedge clk);
      end
      exp_cbp.push_back(nz || (intr && sum > 2));
      in_valid = 0;
      // normalisation requests in the gap
      for (int n = 0; n < 2; n++) begin
        automatic int v = int'($urandom_range(2047));
        automatic bit c = 1'($urandom_range(1));
        norm_req = 1; norm_val = 12'(v); norm_chroma = c;
        #1;
        checks++;
        if (!norm_ack) failures++;
        exp_n.push_back((v + dcs(q, c) / 2) / dcs(q, c)); exp_nt.push_back(cyc());
        @(negedge clk);
        norm_req = 0;
      end
      // a request while a coefficient enters must wait
      in_valid = 1; in_data = 12'd0; in_pix = 6'd5; norm_req = 1;
      exp_q.push_back(0); exp_t.push_back(cyc()); exp_tag.push_back({3'(blk), 6'd5});
      #1; checks++; if (norm_ack) failures++;
      @(negedge clk);
      in_valid = 0; norm_req = 0;
      // the lone coefficient belongs to no full block: flush the block counter
      for (int k = 1; k < 64; k++) begin
        in_valid = 1; in_data = 12'd0; in_pix = 6'(k);
        exp_q.push_back(0); exp_t.push_back(cyc()); exp_tag.push_back({3'(blk), 6'(k)});
        @(negedge clk);
      end
      exp_cbp.push_back(0);
      in_valid = 0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (exp_q.size() || exp_n.size() || exp_cbp.size()) failures++;
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
