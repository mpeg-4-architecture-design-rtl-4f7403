// tb_dct_1d: self-checking testbench of the row-wise 1-D DCT/IDCT unit.
//
// Streams 4000 random 8-sample groups (12-bit input, random DCT or IDCT
// mode per group, random idle gaps between groups) through dct_1d with its
// default (row-wise) parameters and compares every output with a
// floating-point reference X(k) = c(k)/2 * sum x(n) cos((2n+1)k*pi/16)
// (and its inverse), scaled to the 4 fractional output bits; the error must
// stay within 2 output LSBs (1/8) plus the coefficient-rounding share that
// grows with the input range (range/4096). It also checks the 18-cycle latency and
// that the mode travels with its group.
module tb_dct_1d;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_idct = 0;
  logic signed [11:0] in_data = '0;
  wire out_valid, out_idct;
  wire signed [15:0] out_data;
  always #5 clk = ~clk;

  dct_1d dut (.clk, .rst_n, .in_valid, .in_idct, .in_data, .out_valid, .out_idct, .out_data);

  int checks = 0, failures = 0;
  real expq [$];
  real tolq [$];
  bit  expm [$];
  int  tin [$];
  real emax = 0.0;
  int  cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real cc(input int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    real e, d;
    int  lat;
    checks++;
    e = expq.pop_front();
    d = real'(out_data) / 16.0 - e;
    if (d < 0) d = -d;
    if (d > emax) emax = d;
    if (d > tolq.pop_front() || out_idct != expm.pop_front()) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d got %0f exp %0f", nout, real'(out_data) / 16.0, e);
    end
    if (nout % 8 == 0) begin
      checks++;
      lat = cyc - tin.pop_front();
      if (lat != 18) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", lat);
      end
    end
    nout++;
  end

  initial begin
    fork
      begin repeat (200000) @(posedge clk); $display("TIMEOUT"); failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
    join_none
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int g = 0; g < 4000; g++) begin
      automatic int  x [8];
      automatic bit  m = $urandom_range(0, 1);
      automatic int  r = (g % 3 == 0) ? 2047 : ((g % 3 == 1) ? 300 : 20);
      for (int n = 0; n < 8; n++) x[n] = $urandom_range(0, 2 * r) - r;
      for (int k = 0; k < 8; k++) begin
        automatic real s = 0.0;
        for (int n = 0; n < 8; n++)
          if (!m) s += cc(k) / 2.0 * x[n] * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
          else    s += cc(n) / 2.0 * x[n] * $cos((2 * k + 1) * n * 3.14159265358979 / 16.0);
        if (s > 2047.9375) s = 2047.9375;
        if (s < -2048.0) s = -2048.0;
        expq.push_back(s);
        expm.push_back(m);
        tolq.push_back(2.0 / 16.0 + r / 4096.0);
      end
      for (int n = 0; n < 8; n++) begin
        @(posedge clk);
        if (n == 0) tin.push_back(cyc + 1);
        in_valid <= 1; in_idct <= m; in_data <= 12'(x[n]);
      end
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); in_valid <= 0;
        repeat ($urandom_range(0, 5)) @(posedge clk);
      end
    end
    @(posedge clk); in_valid <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("max error %0f", emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
