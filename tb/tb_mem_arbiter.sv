// tb_mem_arbiter -- two masters issue random reads and writes to a memory
// model through the arbiter. Checks: every request completes, read data
// matches a reference copy, master 0 wins when both ask on an idle bus, and a
// granted transfer is never taken over by the other master.
module tb_mem_arbiter;
  import aegis_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic m0_req = 1'b0, m0_we = 1'b0, m1_req = 1'b0, m1_we = 1'b0;
  addr_t m0_addr = '0, m1_addr = '0;
  block_t m0_wdata = '0, m1_wdata = '0, rdata;
  logic m0_ack, m1_ack;
  logic s_req, s_we, s_ack;
  addr_t s_addr;
  block_t s_wdata, s_rdata;
  int checks = 0, failures = 0, both = 0;

  mem_arbiter dut (.*);
  block_mem_model #(.LAT(3)) u_mem (.clk(clk), .req(s_req), .we(s_we), .addr(s_addr),
                                    .wdata(s_wdata), .ack(s_ack), .rdata(s_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t ref_mem [16];
  // a request on the slave side must hold its address until acknowledged
  addr_t prev_addr;
  logic  prev_pending = 1'b0;
  always @(posedge clk) begin
    if (prev_pending && s_req && s_addr != prev_addr) begin
      failures++; $display("FAIL request changed before ack");
    end
    prev_pending <= s_req && !s_ack;
    prev_addr    <= s_addr;
  end

  task automatic m0_op(input logic w, input int a, input block_t d);
    m0_we = w; m0_addr = addr_t'(a * 64); m0_wdata = d; m0_req = 1'b1;
    // the transfer completes on the rising edge that sees the ack
    do @(negedge clk); while (!m0_ack);
    if (!w) begin
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL m0 read %0d", a); end
    end else ref_mem[a] = d;
    @(posedge clk);
    #1 m0_req = 1'b0;
  endtask

  task automatic m1_op(input logic w, input int a, input block_t d);
    m1_we = w; m1_addr = addr_t'(a * 64); m1_wdata = d; m1_req = 1'b1;
    // the transfer completes on the rising edge that sees the ack
    do @(negedge clk); while (!m1_ack);
    if (!w) begin
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL m1 read %0d", a); end
    end else ref_mem[a] = d;
    @(posedge clk);
    #1 m1_req = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // simultaneous requests on an idle bus: master 0 first
    @(negedge clk);
    m0_addr = 32'd64; m1_addr = 32'd128; m0_we = 1'b0; m1_we = 1'b0;
    m0_req = 1'b1; m1_req = 1'b1;
    #1;
    checks++;
    if (!(s_req && s_addr == 32'd64)) begin failures++; $display("FAIL priority"); end
    m0_req = 1'b0; m1_req = 1'b0;
    @(negedge clk);
    // master 1 granted first keeps the bus while master 0 asks
    m1_addr = 32'd192; m1_we = 1'b0; m1_req = 1'b1;
    @(negedge clk);
    m0_addr = 32'd256; m0_req = 1'b1;
    #1;
    checks++;
    if (s_addr != 32'd192) begin failures++; $display("FAIL grant held"); end
    while (!m1_ack) @(negedge clk);
    @(posedge clk);
    #1 m1_req = 1'b0;
    #1;
    checks++;
    if (s_addr != 32'd256) begin failures++; $display("FAIL m0 after m1"); end
    while (!m0_ack) @(negedge clk);
    @(posedge clk);
    #1 m0_req = 1'b0;
    @(negedge clk);
    // random traffic from both masters, in parallel
    fork
      for (int n = 0; n < 60; n++) begin
        block_t d;
        for (int w = 0; w < 16; w++) d[32*w +: 32] = $urandom;
        m0_op($urandom_range(1), $urandom_range(0, 7), d);
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      for (int n = 0; n < 60; n++) begin
        block_t d;
        for (int w = 0; w < 16; w++) d[32*w +: 32] = $urandom;
        m1_op($urandom_range(1), $urandom_range(8, 15), d);
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
    join
    checks++;
    if (u_mem.reads + u_mem.writes != 122) begin
      failures++; $display("FAIL transfer count %0d", u_mem.reads + u_mem.writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
