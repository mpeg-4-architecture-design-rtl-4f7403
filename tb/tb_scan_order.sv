// tb_scan_order: self-checking test of the scan logic.
//
// The zigzag scan is regenerated here by walking the anti-diagonals, and the
// alternate-horizontal scan from its order list; the alternate-vertical scan
// must be its transpose. Every scan must also be a permutation of 0..63.
module tb_scan_order;
  import tex_pkg::*;
  scan_t mode;
  logic [5:0] pos, idx;
  scan_order dut (.*);

  int checks = 0, failures = 0;
  int zz [64], ah [64];
  int ah_list [64] = '{0,1,2,3,8,9,16,17,10,11,4,5,6,7,15,14,13,12,19,18,24,25,32,33,
                       26,27,20,21,22,23,28,29,30,31,34,35,40,41,48,49,42,43,36,37,38,39,
                       44,45,46,47,50,51,56,57,58,59,52,53,54,55,60,61,62,63};

  initial begin
    int n;
    bit seen [64];
    // zigzag by anti-diagonals, alternating direction
    n = 0;
    for (int s = 0; s < 15; s++) begin
      for (int i = 0; i < 8; i++) begin
        automatic int v = (s % 2 == 0) ? s - i : i;
        automatic int u = s - v;
        if (v >= 0 && v < 8 && u >= 0 && u < 8) begin zz[v*8+u] = n; n++; end
      end
    end
    for (int k = 0; k < 64; k++) ah[ah_list[k]] = k;
    for (int m = 0; m < 3; m++) begin
      for (int i = 0; i < 64; i++) seen[i] = 0;
      for (int p = 0; p < 64; p++) begin
        automatic int e;
        mode = scan_t'(m); pos = 6'(p);
        #1;
        e = (m == 0) ? zz[p] : (m == 1) ? ah[p] : ah[(p % 8) * 8 + p / 8];
        checks++;
        if (int'(idx) != e) begin failures++; $display("mode %0d pos %0d got %0d exp %0d", m, p, idx, e); end
        seen[idx] = 1;
      end
      for (int i = 0; i < 64; i++) begin checks++; if (!seen[i]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
