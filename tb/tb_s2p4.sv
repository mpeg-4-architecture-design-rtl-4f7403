// tb_s2p4: self-checking testbench of the serial-to-parallel packer.
//
// Sends 300 blocks of 64 random 9-bit pixels (random idle cycles between
// pixels) and checks every output word: the four pixels in order, their
// 0..255 clipped bytes, the address {block, word}, and one word per four
// pixels.
module tb_s2p4;
  import tex_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pix_t in_data = '0;
  logic [2:0] in_blk = '0;
  wire out_valid;
  wire [35:0] out_data;
  wire [31:0] out_pix8;
  wire [6:0] out_addr;
  always #5 clk = ~clk;

  s2p4 dut (.clk, .rst_n, .in_valid, .in_data, .in_blk, .out_valid, .out_data, .out_pix8, .out_addr);

  int checks = 0, failures = 0;
  logic [35:0] expd [$];
  logic [31:0] expp [$];
  logic [6:0]  expa [$];

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expd.size() == 0 || out_data !== expd.pop_front() || out_pix8 !== expp.pop_front()
        || out_addr !== expa.pop_front()) begin
      failures++;
      if (failures < 10) $display("FAIL word %h addr %h", out_data, out_addr);
    end
  end

  initial begin
    fork
      begin repeat (200000) @(posedge clk); $display("TIMEOUT"); failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
    join_none
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 300; b++) begin
      automatic logic [2:0] blk = 3'($urandom_range(0, 5));
      for (int w = 0; w < 16; w++) begin
        automatic logic [35:0] d;
        automatic logic [31:0] p8;
        for (int j = 0; j < 4; j++) begin
          automatic int v = $urandom_range(0, 511) - 256;
          d[9 * j +: 9] = 9'(v);
          p8[8 * j +: 8] = (v < 0) ? 8'd0 : 8'(v);
          @(posedge clk); in_valid <= 1; in_data <= pix_t'(v); in_blk <= blk;
          if ($urandom_range(0, 3) == 0) begin @(posedge clk); in_valid <= 0; end
        end
        expd.push_back(d); expp.push_back(p8); expa.push_back({blk, 4'(w)});
      end
    end
    @(posedge clk); in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expd.size() != 0) begin failures++; $display("FAIL %0d words missing", expd.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
