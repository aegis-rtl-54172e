// tb_aes128_enc -- checks the AES-128 core against the FIPS-197 worked
// examples (Appendix B and Appendix C.1) and checks its 10-cycle latency.
module tb_aes128_enc;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] key, din, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes128_enc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; din = p; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL aes: got %h exp %h", dout, exp);
    end
    checks++;
    if (cyc != 11) begin  // sampling edge + 10 round edges
      failures++;
      $display("FAIL aes latency %0d", cyc);
    end
  endtask

  initial begin
    key = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
