// tb_transpose_mem: self-checking testbench of the transpose memory.
//
// Writes 600 blocks of 64 random words, each in 64 consecutive cycles,
// mostly back to back and sometimes with idle gaps, with a random DCT/IDCT
// mode per block. Whatever the orientation of a block, output j of the
// block must be the word written at index (j mod 8)*8 + j/8, the mode must
// travel with the block, and the first word must come out 51 cycles after
// the first write (reading starts after index 49, one cycle read delay).
module tb_transpose_mem;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_idct = 0;
  logic signed [15:0] wr_data = '0;
  wire  rd_valid, rd_idct;
  wire  signed [15:0] rd_data;
  always #5 clk = ~clk;

  transpose_mem dut (.clk, .rst_n, .wr_valid, .wr_idct, .wr_data, .rd_valid, .rd_idct, .rd_data);

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  logic [15:0] wq [$];
  bit  modeq [$];
  int  t0q [$];
  logic [15:0] cur [64];
  bit  curm;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && rd_valid) begin
    automatic int j = nout % 64;
    if (j == 0) begin
      for (int i = 0; i < 64; i++) cur[i] = wq.pop_front();
      curm = modeq.pop_front();
      checks++;
      if (cyc - t0q.pop_front() != 51) begin failures++; $display("FAIL latency at block %0d", nout / 64); end
    end
    checks++;
    if (rd_data !== cur[(j % 8) * 8 + j / 8] || rd_idct !== curm) begin
      failures++;
      if (failures < 4) $display("FAIL block %0d word %0d got %h exp %h m %0d %0d", nout / 64, j, rd_data, cur[(j % 8) * 8 + j / 8], rd_idct, curm);
    end
    nout++;
  end

  initial begin
    fork
      begin repeat (100000) @(posedge clk); $display("TIMEOUT"); failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
    join_none
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int b = 0; b < 600; b++) begin
      automatic logic [15:0] v [64];
      automatic bit m = $urandom_range(0, 1);
      for (int i = 0; i < 64; i++) v[i] = 16'($urandom);
      for (int i = 0; i < 64; i++) wq.push_back(v[i]);
      modeq.push_back(m);
      for (int i = 0; i < 64; i++) begin
        @(posedge clk);
        if (i == 0) t0q.push_back(cyc + 1);
        wr_valid <= 1; wr_idct <= m; wr_data <= v[i];
      end
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk); wr_valid <= 0;
        repeat ($urandom_range(0, 70)) @(posedge clk);
      end
    end
    @(posedge clk); wr_valid <= 0;
    repeat (80) @(posedge clk);
    checks++;
    if (nout != 600 * 64) begin failures++; $display("FAIL %0d words out", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
