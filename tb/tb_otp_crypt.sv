// tb_otp_crypt -- checks the one-time-pad unit against reference AES pads:
// dynamic blocks (pad from V, address, time stamp, chunk index), static
// blocks (time stamp ignored), decryption of the produced ciphertext, and the
// 11-cycle pad latency.
module tb_otp_crypt;
  import aegis_pkg::*;
  import aes_ref_pkg::*;

  localparam logic [61:0] V = 62'h0AE6_1500_AE61_5EC;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, is_static = 1'b0;
  logic [127:0] key;
  addr_t addr;
  ts_t ts;
  logic pad_ready;
  block_t data_in, data_out;
  int checks = 0, failures = 0;

  otp_crypt #(.V_CONST(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [127:0] k, input addr_t a, input ts_t t, input logic st,
                     input block_t pt);
    block_t exp_ct, ct;
    int cyc;
    @(negedge clk);
    key = k; addr = a; ts = t; is_static = st; start = 1'b1; data_in = pt;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!pad_ready) begin @(negedge clk); cyc++; end
    for (int i = 0; i < 4; i++)
      exp_ct[128*i +: 128] = pt[128*i +: 128] ^
                             aes128(k, {V, a, (st ? 32'h0 : t), 2'(i)});
    checks++;
    if (data_out !== exp_ct) begin failures++; $display("FAIL ct a=%h t=%h st=%0d", a, t, st); end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL pad latency %0d", cyc); end
    // decrypt: same pad on the ciphertext gives the plaintext back
    ct = data_out;
    data_in = ct;
    #1;
    checks++;
    if (data_out !== pt) begin failures++; $display("FAIL decrypt"); end
  endtask

  initial begin
    block_t pt;
    key = '0; addr = '0; ts = '0; data_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < 16; i++) pt[32*i +: 32] = $urandom;
      one({$urandom, $urandom, $urandom, $urandom}, {$urandom} & ~32'h3f, $urandom, n % 3 == 2, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
