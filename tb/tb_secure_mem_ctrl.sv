// tb_secure_mem_ctrl -- end-to-end checks of the memory protection unit with
// a memory model: tree build, dynamic write-backs (ciphertext in memory equals
// plaintext XOR the reference pad for the incremented time stamp, a second
// write-back uses a new pad), fills that decrypt correctly with the pad
// latency hidden behind the memory read, static-region decryption with the
// user and supervisor keys, MAC checks of static IV fills against a
// reference MAC, plain blocks, refused requests, and tamper detection of a
// modified block, of a replayed time stamp and of a static block moved to
// another address.
module tb_secure_mem_ctrl;
  import aegis_pkg::*;
  import aes_ref_pkg::*;
  import sha1_ref_pkg::*;

  localparam addr_t DB = 32'h0002_0000;
  localparam addr_t TB = 32'h0003_0000;
  localparam logic [61:0] V = 62'h0AE6_1500_AE61_5EC;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key_dynamic, key_user_static, key_sup_static;
  logic req_valid = 1'b0, req_ready, req_we = 1'b0;
  addr_t req_addr = '0;
  block_t req_wdata = '0, resp_rdata;
  access_class_t req_cls = '0;
  addr_t req_static_base = '0;
  logic resp_valid, resp_err, init_start = 1'b0, init_done, iv_busy, tamper;
  logic mem_req, mem_we, mem_ack;
  addr_t mem_addr;
  block_t mem_wdata, mem_rdata;
  int checks = 0, failures = 0, hidden = 0, bg = 0;

  secure_mem_ctrl #(.LEAVES(64), .DYN_BASE(DB), .TREE_BASE(TB)) dut (.*);
  block_mem_model #(.LAT(14)) u_mem (.clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr),
                                     .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pad latency hidden: the pad is ready when the data block arrives
  always @(posedge clk)
    if (dut.state == dut.S_F_RD && dut.d_ack && dut.pad_ready) hidden++;
  // verification still running after the block was returned
  always @(posedge clk) if (resp_valid && iv_busy) bg++;

  function automatic block_t pad(logic [127:0] k, addr_t a, ts_t t);
    block_t p;
    for (int i = 0; i < 4; i++) p[128*i +: 128] = aes128(k, {V, a, t, 2'(i)});
    return p;
  endfunction

  // reference static MAC and where it is stored
  function automatic logic [127:0] mac(logic [127:0] k, addr_t a, block_t d);
    logic [159:0] h;
    h = sha1_block(d);
    h = sha1_block({k, a, h, 192'd0});
    return h[159 -: 128];
  endfunction

  task automatic put_mac(input logic sup, input addr_t base, input addr_t a, input logic [127:0] m);
    addr_t ma;
    ma = (sup ? 32'h0004_8000 : 32'h0004_0000) + ((a - base) >> 2);
    if (!u_mem.mem.exists({ma[31:6], 6'd0})) u_mem.mem[{ma[31:6], 6'd0}] = '0;
    u_mem.mem[{ma[31:6], 6'd0}][128*(3 - int'(ma[5:4])) +: 128] = m;
  endtask

  function automatic access_class_t mk(logic ivd, logic med, logic mes, logic sup);
    access_class_t c;
    c = '0;
    c.iv_dynamic = ivd; c.me_dynamic = med; c.me_static = mes; c.sup_static = sup;
    return c;
  endfunction

  task automatic xfer(input logic w, input addr_t a, input block_t d, input access_class_t c,
                      output block_t r, output logic err);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1; req_we = w; req_addr = a; req_wdata = d; req_cls = c;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    r = resp_rdata; err = resp_err;
    while (!req_ready) @(negedge clk);
  endtask

  task automatic chk(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic block_t rnd();
    block_t b;
    for (int w = 0; w < 16; w++) b[32*w +: 32] = $urandom;
    return b;
  endfunction

  initial begin
    block_t p [4], r, c1;
    logic err;
    int blks [4];
    key_dynamic = {$urandom, $urandom, $urandom, $urandom};
    key_user_static = {$urandom, $urandom, $urandom, $urandom};
    key_sup_static = {$urandom, $urandom, $urandom, $urandom};
    blks = '{3, 17, 40, 59};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // build the tree over the (empty) dynamic region
    @(negedge clk);
    init_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0;
    while (!init_done) @(negedge clk);
    chk("no tamper after init", !tamper);

    // dynamic write-backs
    foreach (blks[i]) begin
      addr_t a;
      a = DB + addr_t'(blks[i] * 64);
      p[i] = rnd();
      xfer(1'b1, a, p[i], mk(1, 1, 0, 0), r, err);
      chk("write-back ok", !err);
      chk("ciphertext, time stamp 1", u_mem.mem[a] === (p[i] ^ pad(key_dynamic, a, 32'd1)));
      chk("stored time stamp", u_mem.mem[DB + 32'(60*64 + (blks[i]/16)*64)][32*(blks[i]%16) +: 32] == 32'd1);
    end
    // second write-back of the same data: new pad
    begin
      addr_t a;
      a = DB + addr_t'(blks[0] * 64);
      c1 = u_mem.mem[a];
      xfer(1'b1, a, p[0], mk(1, 1, 0, 0), r, err);
      chk("new pad on rewrite", u_mem.mem[a] !== c1 &&
                                u_mem.mem[a] === (p[0] ^ pad(key_dynamic, a, 32'd2)));
    end
    // fills
    foreach (blks[i]) begin
      xfer(1'b0, DB + addr_t'(blks[i] * 64), '0, mk(1, 1, 0, 0), r, err);
      chk("dynamic fill decrypts", r === p[i] && !err);
    end
    chk("no tamper on clean data", !tamper);
    chk("pad ready n_before data (latency hidden)", hidden == 4);
    chk("verification ran in background", bg >= 4);

    // static regions: preload ciphertext made with time stamp 0
    begin
      block_t ps, pv;
      ps = rnd(); pv = rnd();
      u_mem.mem[32'h0001_0040] = ps ^ pad(key_user_static, 32'h0001_0040, 32'd0);
      u_mem.mem[32'h0001_8000] = pv ^ pad(key_sup_static, 32'h0001_8000, 32'd0);
      xfer(1'b0, 32'h0001_0040, '0, mk(0, 0, 1, 0), r, err);
      chk("user static fill", r === ps);
      xfer(1'b0, 32'h0001_8000, '0, mk(0, 0, 1, 1), r, err);
      chk("supervisor static fill", r === pv);
    end
    // static IV fills with correct MACs: user (plain) and supervisor (encrypted)
    begin
      block_t ps, pv;
      access_class_t c;
      ps = rnd(); pv = rnd();
      u_mem.mem[32'h0001_0380] = ps;
      put_mac(1'b0, 32'h0001_0000, 32'h0001_0380, mac(key_user_static, 32'h0001_0380, ps));
      u_mem.mem[32'h0001_8140] = pv ^ pad(key_sup_static, 32'h0001_8140, 32'd0);
      put_mac(1'b1, 32'h0001_8000, 32'h0001_8140,
              mac(key_sup_static, 32'h0001_8140, u_mem.mem[32'h0001_8140]));
      c = '0; c.iv_static = 1'b1;
      req_static_base = 32'h0001_0000;
      xfer(1'b0, 32'h0001_0380, '0, c, r, err);
      chk("user static IV fill", r === ps && !err);
      c.me_static = 1'b1; c.sup_static = 1'b1;
      req_static_base = 32'h0001_8000;
      xfer(1'b0, 32'h0001_8140, '0, c, r, err);
      chk("supervisor static IV+ME fill", r === pv && !err);
      chk("static MACs accepted", !tamper);
      chk("MAC check ran in background", bg >= 6);
    end
    // unprotected block
    begin
      block_t pu;
      pu = rnd();
      xfer(1'b1, 32'h0005_0000, pu, '0, r, err);
      chk("plain write", u_mem.mem[32'h0005_0000] === pu);
      xfer(1'b0, 32'h0005_0000, '0, '0, r, err);
      chk("plain read", r === pu);
    end
    // refused request: no memory traffic
    begin
      int n_before;
      access_class_t f;
      n_before = u_mem.reads + u_mem.writes;
      f = mk(1, 1, 0, 0); f.fault = 1'b1;
      xfer(1'b0, DB, '0, f, r, err);
      chk("fault reported", err);
      chk("no traffic on fault", u_mem.reads + u_mem.writes == n_before);
    end
    chk("still no tamper", !tamper);

    // replayed time stamp block is caught by the tree
    begin
      addr_t ta;
      block_t tsave;
      ta = DB + 32'(60*64 + (blks[1]/16)*64);
      tsave = u_mem.mem[ta];
      u_mem.mem[ta][32*(blks[1]%16) +: 32] = 32'd0;
      xfer(1'b0, DB + addr_t'(blks[1] * 64), '0, mk(1, 1, 0, 0), r, err);
      chk("replayed time stamp detected", tamper);
      u_mem.mem[ta] = tsave;
    end
    // modified data block, with a fresh unit
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    @(negedge clk);
    init_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0;
    while (!init_done) @(negedge clk);
    chk("tamper cleared by rebuild", !tamper);
    u_mem.mem[DB + addr_t'(blks[2] * 64)][100] = ~u_mem.mem[DB + addr_t'(blks[2] * 64)][100];
    xfer(1'b0, DB + addr_t'(blks[2] * 64), '0, mk(1, 1, 0, 0), r, err);
    chk("modified block detected", tamper);

    // static block copied to another address of the same region: MAC fails
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    chk("tamper cleared by reset", !tamper);
    begin
      access_class_t c;
      c = '0; c.iv_static = 1'b1;
      req_static_base = 32'h0001_0000;
      u_mem.mem[32'h0001_03C0] = u_mem.mem[32'h0001_0380];
      put_mac(1'b0, 32'h0001_0000, 32'h0001_03C0, mac(key_user_static, 32'h0001_0380, u_mem.mem[32'h0001_0380]));
      xfer(1'b0, 32'h0001_03C0, '0, c, r, err);
      chk("moved static block detected", tamper);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
