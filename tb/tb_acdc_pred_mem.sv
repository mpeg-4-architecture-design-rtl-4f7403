// tb_acdc_pred_mem: self-checking test of the prediction memory.
//
// Writes a distinct pattern to every word, reads it back in a shuffled
// order, checks the one-cycle read latency and that a write does not
// disturb the read data register.
module tb_acdc_pred_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [9:0] addr = '0;
  logic [11:0] wdata = '0, rdata;
  acdc_pred_mem dut (.*);
  int checks = 0, failures = 0;
  function automatic logic [11:0] pat(int a);
    return 12'((a * 37 + 11) ^ (a >> 3));
  endfunction
  initial begin
    @(negedge clk);
    for (int a = 0; a < 742; a++) begin
      en = 1; we = 1; addr = 10'(a); wdata = pat(a); @(negedge clk);
    end
    for (int k = 0; k < 742; k++) begin
      automatic int a = (k * 353) % 742;
      en = 1; we = 0; addr = 10'(a); @(negedge clk);
      checks++;
      if (rdata != pat(a)) begin failures++; $display("addr %0d got %h", a, rdata); end
      // a write leaves rdata alone
      en = 1; we = 1; addr = 10'(a); wdata = pat(a); @(negedge clk);
      checks++;
      if (rdata != pat(a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
