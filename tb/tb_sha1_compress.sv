// tb_sha1_compress -- checks the SHA-1 compression engine with the padded
// one-block messages "abc" and "" (FIPS 180 examples) and its latency.
module tb_sha1_compress;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [511:0] block;
  logic [159:0] digest;
  logic busy, done;
  int checks = 0, failures = 0;

  sha1_compress dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [511:0] blk, input logic [159:0] exp);
    int cyc;
    @(negedge clk);
    block = blk; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (digest !== exp) begin failures++; $display("FAIL sha1 got %h exp %h", digest, exp); end
    checks++;
    if (cyc != 81) begin failures++; $display("FAIL sha1 latency %0d", cyc); end
  endtask

  initial begin
    block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // "abc" = 61 62 63, then 0x80, zeros, 64-bit length 24
    run({24'h616263, 8'h80, 416'h0, 64'd24}, 160'ha9993e364706816aba3e25717850c26c9cd0d89d);
    // empty message: 0x80 then zeros, length 0
    run({8'h80, 504'h0}, 160'hda39a3ee5e6b4b0d3255bfef95601890afd80709);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
