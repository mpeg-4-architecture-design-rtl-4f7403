// tb_pingpong_buffer: self-checking testbench of the ping-pong buffer.
//
// Fills both RAMs with random 4-pixel words through the write port, then
// reads 400 random blocks (random RAM, random block, random gaps) while
// the other RAM is being rewritten, and checks that each block comes out as
// 64 pixels in raster order (pixel 4w+j from bits 9j+8..9j of word w),
// the first on the third clock edge after en_rd is raised.
module tb_pingpong_buffer;
  import tex_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_ram_sel = 0, en_wr = 0, en_rd = 0;
  logic [6:0] waddr = '0;
  logic [35:0] data_in = '0;
  logic [3:0] raddr = '0;
  pix_t data_out;
  wire valid_out;
  always #5 clk = ~clk;

  pingpong_buffer dut (.clk, .rst_n, .wr_ram_sel, .en_wr, .waddr, .data_in, .raddr, .en_rd,
                       .data_out, .valid_out);

  int checks = 0, failures = 0, cyc = 0;
  logic [35:0] model [2][96];
  int expq [$];
  int tq [$];
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && valid_out) begin
    checks++;
    if (tq.size() == 0 || int'(data_out) != expq.pop_front() || cyc != tq.pop_front()) begin
      failures++;
      if (failures < 4) $display("FAIL at cycle %0d got %0d exp %0d at %0d", cyc, data_out, expq[0], tq[0]);
    end
  end

  task automatic wr(input bit s, input int a, input logic [35:0] d);
    @(posedge clk); wr_ram_sel <= s; en_wr <= 1; waddr <= 7'(a); data_in <= d;
    model[s][a] = d;
  endtask

  initial begin
    fork
      begin repeat (100000) @(posedge clk); $display("TIMEOUT"); failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
    join_none
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 2; s++) for (int a = 0; a < 96; a++) wr(s[0], a, {$urandom, $urandom});
    @(posedge clk); en_wr <= 0;
    for (int n = 0; n < 400; n++) begin
      automatic bit s = $urandom_range(0, 1);
      automatic int b = $urandom_range(0, 5);
      automatic int t;
      @(posedge clk); en_rd <= 1; raddr <= {s, 3'(b)};
      t = cyc + 1;
      for (int p = 0; p < 64; p++) begin
        expq.push_back(int'($signed(model[s][b * 16 + p / 4][9 * (p % 4) +: 9])));
        tq.push_back(t + 3 + p);
      end
      @(posedge clk); en_rd <= 0;
      // rewrite the other RAM while this block is read
      for (int k = 0; k < 62; k++)
        if ($urandom_range(0, 1)) wr(!s, $urandom_range(0, 95), {$urandom, $urandom});
        else begin @(posedge clk); en_wr <= 0; end
      @(posedge clk); en_wr <= 0;
      repeat ($urandom_range(2, 4)) @(posedge clk);
    end
    repeat (80) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d pixels missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
