// tb_hash_tree_iv -- checks the hash-tree integrity unit over a 64-block
// region: tree build (root and stored chunks against a reference tree),
// verification of good blocks, detection of a modified block, of a modified
// hash chunk at two levels and of a replayed old block with its old chunks,
// and update on write-back (new root, new data accepted, old data refused).
module tb_hash_tree_iv;
  import aegis_pkg::*;
  import sha1_ref_pkg::*;

  localparam int    LEAVES = 64;
  localparam addr_t LB = 32'h0002_0000;
  localparam addr_t TB = 32'h0003_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0;
  logic [1:0] cmd;
  logic [5:0] leaf_idx;
  block_t data;
  logic busy, done, ok;
  logic [127:0] root;
  logic mem_req, mem_we, mem_ack;
  addr_t mem_addr;
  block_t mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  hash_tree_iv #(.LEAVES(LEAVES), .LEAF_BASE(LB), .TREE_BASE(TB)) dut (.*);
  block_mem_model #(.LAT(3)) u_mem (.clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr),
                                    .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  block_t leaves [LEAVES];

  // reference root over the current leaves (levels of 16, 4, 1 chunks)
  function automatic logic [127:0] ref_root();
    block_t l1 [16], l2 [4], l3;
    for (int c = 0; c < 16; c++)
      for (int s = 0; s < 4; s++) l1[c][128*s +: 128] = node_hash(leaves[4*c+s]);
    for (int c = 0; c < 4; c++)
      for (int s = 0; s < 4; s++) l2[c][128*s +: 128] = node_hash(l1[4*c+s]);
    for (int s = 0; s < 4; s++) l3[128*s +: 128] = node_hash(l2[s]);
    return node_hash(l3);
  endfunction

  task automatic issue(input logic [1:0] c, input int leaf, input block_t d, output logic res);
    @(negedge clk);
    cmd = c; leaf_idx = 6'(leaf); data = d; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(negedge clk);
    res = ok;
  endtask

  task automatic expect_ok(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: ok=%0d expected %0d", what, got, exp); end
  endtask

  initial begin
    logic r;
    block_t saved, old_l1, old_l2, old_l3, nd;
    cmd = '0; leaf_idx = '0; data = '0;
    for (int i = 0; i < LEAVES; i++) begin
      for (int w = 0; w < 16; w++) leaves[i][32*w +: 32] = $urandom;
      u_mem.mem[LB + 32'(i*64)] = leaves[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    issue(2'd2, 0, '0, r);
    expect_ok("init", r, 1'b1);
    checks++;
    if (root !== ref_root()) begin failures++; $display("FAIL init root"); end
    // first level-1 chunk holds the hashes of leaves 0..3
    checks++;
    if (u_mem.mem[TB][127:0] !== node_hash(leaves[0]) ||
        u_mem.mem[TB][511:384] !== node_hash(leaves[3])) begin
      failures++; $display("FAIL stored chunk");
    end

    for (int n = 0; n < 6; n++) begin
      int i = $urandom_range(LEAVES-1);
      issue(2'd0, i, leaves[i], r);
      expect_ok("verify good", r, 1'b1);
    end

    // modified data block
    nd = leaves[9]; nd[77] = ~nd[77];
    issue(2'd0, 9, nd, r);
    expect_ok("verify modified block", r, 1'b0);

    // modified level-1 chunk (slot of leaf 21 inside chunk 5)
    saved = u_mem.mem[TB + 32'(5*64)];
    u_mem.mem[TB + 32'(5*64)][128 + 3] = ~saved[128 + 3];
    issue(2'd0, 21, leaves[21], r);
    expect_ok("verify modified level-1 chunk", r, 1'b0);
    u_mem.mem[TB + 32'(5*64)] = saved;

    // modified level-2 chunk (chunk 16+1 holds leaves 16..31)
    saved = u_mem.mem[TB + 32'(17*64)];
    u_mem.mem[TB + 32'(17*64)][500] = ~saved[500];
    issue(2'd0, 18, leaves[18], r);
    expect_ok("verify modified level-2 chunk", r, 1'b0);
    u_mem.mem[TB + 32'(17*64)] = saved;
    issue(2'd0, 18, leaves[18], r);
    expect_ok("verify after restore", r, 1'b1);

    // update leaf 42
    old_l1 = u_mem.mem[TB + 32'(10*64)];
    old_l2 = u_mem.mem[TB + 32'(18*64)];
    old_l3 = u_mem.mem[TB + 32'(20*64)];
    saved  = leaves[42];
    for (int w = 0; w < 16; w++) nd[32*w +: 32] = $urandom;
    issue(2'd1, 42, nd, r);
    expect_ok("update", r, 1'b1);
    leaves[42] = nd;
    checks++;
    if (root !== ref_root()) begin failures++; $display("FAIL root after update"); end
    issue(2'd0, 42, nd, r);
    expect_ok("verify new data", r, 1'b1);
    issue(2'd0, 42, saved, r);
    expect_ok("verify old data", r, 1'b0);

    // replay: put back the old block and all of its old chunks
    u_mem.mem[TB + 32'(10*64)] = old_l1;
    u_mem.mem[TB + 32'(18*64)] = old_l2;
    u_mem.mem[TB + 32'(20*64)] = old_l3;
    issue(2'd0, 42, saved, r);
    expect_ok("verify replayed block", r, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
