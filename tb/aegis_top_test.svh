// aegis_top_test.svh -- end-to-end test sequence for aegis_secure_top, shared
// by the reduced-size and the default-size testbenches. The including module
// declares P_N_OSC, P_K, P_NB, P_W, CM_AW and instantiates the top as `dut`
// with every port connected to the signals declared here.
//
// Sequence: PUF refused in STD; protected access refused in STD; firmware
// memory written and read; enter PTR; program hash; region setup; tree build;
// PUF initialise and re-generate; dynamic write-backs and fills with a
// security instruction and a public store issued while the background check
// runs (both must stall); a static IV+ME fill whose stored MAC is checked;
// an illegal instruction; suspend, refused access in
// SSP, resume; a modified block raising the tamper flag; exit to STD.
// Each mechanism is counted and must occur at least once.

  import aegis_pkg::*;
  import aes_ref_pkg::*;
  import sha1_ref_pkg::*;

  localparam addr_t DB = 32'h0002_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P_N_OSC-1:0] ro;
  logic si_valid = 1'b0, debug_req = 1'b0, hash_we = 1'b0;
  sec_instr_e si_instr = SI_NONE;
  logic [159:0] hash_in = '0, prog_hash;
  sec_mode_e mode;
  logic si_illegal, stall, debug_allowed, prog_debug;
  logic supervisor = 1'b1, acc_valid = 1'b0, acc_we = 1'b0, acc_fault;
  region_map_t regions = '0;
  addr_t acc_addr = '0;
  logic puf_start = 1'b0, puf_regen = 1'b0, puf_denied, puf_busy, puf_done;
  logic [P_NB*P_K-1:0] puf_mask_in = '0, puf_mask_out;
  logic [P_NB-1:0] puf_response;
  logic [127:0] key_dynamic = 128'h0f1e2d3c_4b5a6978_8796a5b4_c3d2e1f0;
  logic [127:0] key_user_static = 128'h11111111_22222222_33333333_44444444;
  logic [127:0] key_sup_static = 128'h55555555_66666666_77777777_88888888;
  logic blk_valid = 1'b0, blk_ready, blk_we = 1'b0;
  addr_t blk_addr = '0;
  block_t blk_wdata = '0, blk_resp_rdata;
  logic blk_resp_valid, blk_resp_err, iv_init_start = 1'b0, iv_init_done, iv_busy, tamper;
  logic mem_req, mem_we, mem_ack;
  addr_t mem_addr;
  block_t mem_wdata, mem_rdata;
  logic cm_en = 1'b0;
  logic [3:0] cm_we = '0;
  logic [CM_AW-1:0] cm_addr = '0;
  logic [31:0] cm_wdata = '0, cm_rdata;

  int checks = 0, failures = 0;
  int n_mode_switch = 0, n_puf_denied = 0, n_acc_fault = 0, n_stall_si = 0, n_stall_store = 0;
  int n_illegal = 0, n_tamper = 0, n_bg = 0, n_blk_err = 0, n_puf_init = 0, n_puf_regen = 0;
  int n_mac = 0;
  int rank [P_N_OSC];

  ro_array_model #(.N(P_N_OSC)) u_ro (.clk(clk), .ro(ro));
  block_mem_model #(.LAT(14)) u_mem (.clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr),
                                     .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;

  // mechanism counters
  sec_mode_e last_mode = MODE_STD;
  logic      last_tamper = 1'b0;
  always @(posedge clk) begin
    if (mode != last_mode) n_mode_switch++;
    last_mode <= mode;
    if (puf_denied) n_puf_denied++;
    if (acc_fault) n_acc_fault++;
    if (stall && si_valid) n_stall_si++;
    if (stall && acc_valid && acc_we) n_stall_store++;
    if (si_illegal) n_illegal++;
    if (tamper && !last_tamper) n_tamper++;
    last_tamper <= tamper;
    if (blk_resp_valid && iv_busy) n_bg++;
    if (blk_resp_valid && blk_resp_err) n_blk_err++;
    if (mem_req && mem_ack && !mem_we && mem_addr[31:16] == 16'h0004) n_mac++;
  end

  task automatic chk(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic si(input sec_instr_e i);
    @(negedge clk);
    si_instr = i; si_valid = 1'b1;
    @(negedge clk);
    while (stall) @(negedge clk);
    si_valid = 1'b0; si_instr = SI_NONE;
  endtask

  task automatic xfer(input logic w, input addr_t a, input block_t d, output block_t r, output logic err);
    @(negedge clk);
    while (!blk_ready) @(negedge clk);
    blk_valid = 1'b1; blk_we = w; blk_addr = a; blk_wdata = d;
    @(negedge clk);
    blk_valid = 1'b0;
    while (!blk_resp_valid) @(negedge clk);
    r = blk_resp_rdata; err = blk_resp_err;
  endtask

  task automatic puf_run(input logic rg, input logic [P_NB*P_K-1:0] m);
    @(negedge clk);
    puf_regen = rg; puf_mask_in = m; puf_start = 1'b1;
    @(negedge clk);
    puf_start = 1'b0;
    while (!puf_done) @(negedge clk);
    if (rg) n_puf_regen++; else n_puf_init++;
  endtask

  function automatic block_t rnd();
    block_t b;
    for (int w = 0; w < 16; w++) b[32*w +: 32] = $urandom;
    return b;
  endfunction

  initial begin
    repeat (P_N_OSC * P_K * P_NB * (P_W + 8) + 600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t r, pd [3];
    logic err;
    logic [P_NB*P_K-1:0] m0;
    logic [P_NB-1:0] resp0;
    real step, cpr;

    // oscillator frequencies: a random permutation of evenly spaced values
    // between 0.1 and 0.45 of the clock rate
    step = 0.35 * 4294967296.0 / P_N_OSC;
    cpr  = step * P_W / 4294967296.0;           // counts per rank step
    for (int i = 0; i < P_N_OSC; i++) rank[i] = i;
    for (int i = P_N_OSC - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = rank[i]; rank[i] = rank[j]; rank[j] = t;
    end
    for (int i = 0; i < P_N_OSC; i++) u_ro.inc[i] = 32'h1999_9999 + 32'(int'(step * rank[i]));

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("reset in STD", mode == MODE_STD);

    // PUF refused outside PTR
    puf_start = 1'b1;
    @(negedge clk);
    puf_start = 1'b0;
    chk("PUF not started in STD", !puf_busy);

    regions.iv_user_static = '{32'h0001_0000, 32'h0001_1000};
    regions.me_user_static = '{32'h0001_0000, 32'h0001_1000};
    regions.iv_sup_static  = '{32'h0001_8000, 32'h0001_9000};
    regions.me_sup_static  = '{32'h0001_8000, 32'h0001_9000};
    regions.iv_dynamic     = '{DB, DB + 32'h1000};
    regions.me_dynamic     = '{DB, DB + 32'(60 * 64)};

    // protected access refused in STD
    @(negedge clk);
    acc_valid = 1'b1; acc_addr = DB + 32'h40; acc_we = 1'b0;
    @(negedge clk);
    acc_valid = 1'b0;

    // firmware memory
    @(negedge clk);
    cm_en = 1'b1; cm_we = 4'hf; cm_addr = CM_AW'(100); cm_wdata = 32'hc0de_f00d;
    @(negedge clk);
    cm_we = '0;
    @(negedge clk);
    cm_en = 1'b0;
    chk("firmware memory", cm_rdata == 32'hc0de_f00d);

    // enter PTR with debug off, record the program hash
    debug_req = 1'b0;
    si(SI_ENTER_PTR);
    chk("mode PTR", mode == MODE_PTR);
    chk("debug off", !debug_allowed);
    @(negedge clk);
    hash_in = 160'hfeed_beef; hash_we = 1'b1;
    @(negedge clk);
    hash_we = 1'b0;
    chk("program hash", prog_hash == 160'hfeed_beef);

    // build the hash tree
    @(negedge clk);
    iv_init_start = 1'b1;
    @(negedge clk);
    iv_init_start = 1'b0;
    while (!iv_init_done) @(negedge clk);
    chk("no tamper after build", !tamper);

    // PUF initialise and re-generate
    puf_run(1'b0, '0);
    m0 = puf_mask_out;
    resp0 = puf_response;
    for (int b = 0; b < P_NB; b++) begin
      int sel, best;
      sel = -1; best = 0;
      chk("mask one-hot", $countones(m0[b*P_K +: P_K]) == 1);
      for (int c = 0; c < P_K; c++) begin
        int p, a, q, d;
        p = b*P_K + c; a = p % P_N_OSC; q = (p + P_N_OSC/2 - 1) % P_N_OSC;
        d = rank[a] - rank[q];
        if (d < 0) d = -d;
        if (d > best) best = d;
        if (m0[b*P_K + c]) sel = c;
      end
      if (sel >= 0) begin
        int p, a, q, d;
        p = b*P_K + sel; a = p % P_N_OSC; q = (p + P_N_OSC/2 - 1) % P_N_OSC;
        d = rank[a] - rank[q];
        if (d < 0) d = -d;
        chk("chosen pair is (near) the most distant", real'(best - d) * cpr <= 3.0);
        if (real'(d) * cpr > 3.0) chk("PUF bit", puf_response[b] == (rank[a] > rank[q]));
      end
    end
    for (int i = 0; i < P_N_OSC; i++) u_ro.inc[i] = u_ro.inc[i] - (u_ro.inc[i] >> 7);
    puf_run(1'b1, m0);
    chk("PUF re-generates the same response", puf_response == resp0);

    // dynamic write-backs; a security instruction during the background check
    for (int i = 0; i < 3; i++) begin
      pd[i] = rnd();
      xfer(1'b1, DB + 32'(i * 5 * 64), pd[i], r, err);
      chk("write-back accepted", !err);
      if (i == 0) begin
        si(SI_SIGN);
      end
    end
    // fills; a public store during the background check
    for (int i = 0; i < 3; i++) begin
      xfer(1'b0, DB + 32'(i * 5 * 64), '0, r, err);
      chk("fill decrypts", r === pd[i] && !err);
      if (i == 1) begin
        @(negedge clk);
        acc_valid = 1'b1; acc_we = 1'b1; acc_addr = 32'h0005_0000;
        @(negedge clk);
        while (stall) @(negedge clk);
        acc_valid = 1'b0; acc_we = 1'b0;
      end
    end
    chk("ciphertext in memory differs", u_mem.mem[DB] !== pd[0]);
    chk("no tamper yet", !tamper);

    // static IV+ME fill: ciphertext with time stamp 0, MAC over address and
    // stored block at the user MAC table (16 bytes per block)
    begin
      addr_t sa, ma;
      block_t ps, ct;
      logic [159:0] h;
      sa = 32'h0001_0200;
      ps = rnd();
      for (int i = 0; i < 4; i++)
        ct[128*i +: 128] = ps[128*i +: 128] ^
                           aes128(key_user_static, {62'h0AE6_1500_AE61_5EC, sa, 32'd0, 2'(i)});
      u_mem.mem[sa] = ct;
      h = sha1_block(ct);
      h = sha1_block({key_user_static, sa, h, 192'd0});
      ma = 32'h0004_0000 + ((sa - 32'h0001_0000) >> 2);
      u_mem.mem[{ma[31:6], 6'd0}] = '0;
      u_mem.mem[{ma[31:6], 6'd0}][128*(3 - int'(ma[5:4])) +: 128] = h[159 -: 128];
      xfer(1'b0, sa, '0, r, err);
      chk("static fill decrypts", r === ps && !err);
      @(negedge clk);
      while (!blk_ready) @(negedge clk);
      chk("static MAC accepted", !tamper);
    end

    // write to a static region is refused
    xfer(1'b1, 32'h0001_0040, pd[0], r, err);
    chk("static write refused", err);

    // suspend: protected memory refused in SSP; PUF illegal; resume
    si(SI_SUSPEND);
    chk("mode SSP", mode == MODE_SSP);
    xfer(1'b0, DB, '0, r, err);
    chk("SSP access refused", err);
    si(SI_PUF);
    si(SI_RESUME);
    chk("resumed to PTR", mode == MODE_PTR);

    // physical attack on a stored block
    u_mem.mem[DB + 32'(5 * 64)][3] = ~u_mem.mem[DB + 32'(5 * 64)][3];
    xfer(1'b0, DB + 32'(5 * 64), '0, r, err);
    @(negedge clk);
    while (!blk_ready) @(negedge clk);
    chk("tamper detected", tamper);

    si(SI_EXIT);
    chk("back to STD", mode == MODE_STD);

    $display("mechanisms: mode_switch=%0d puf_denied=%0d acc_fault=%0d stall_si=%0d stall_store=%0d illegal=%0d tamper=%0d background=%0d blk_err=%0d puf_init=%0d puf_regen=%0d mac=%0d",
             n_mode_switch, n_puf_denied, n_acc_fault, n_stall_si, n_stall_store, n_illegal,
             n_tamper, n_bg, n_blk_err, n_puf_init, n_puf_regen, n_mac);
    chk("mechanism: mode switch", n_mode_switch >= 4);
    chk("mechanism: PUF refused", n_puf_denied >= 1);
    chk("mechanism: access fault", n_acc_fault >= 1);
    chk("mechanism: instruction stall", n_stall_si >= 1);
    chk("mechanism: store stall", n_stall_store >= 1);
    chk("mechanism: illegal instruction", n_illegal >= 1);
    chk("mechanism: tamper detection", n_tamper >= 1);
    chk("mechanism: background verification", n_bg >= 1);
    chk("mechanism: refused block transfer", n_blk_err >= 2);
    chk("mechanism: PUF initialise", n_puf_init >= 1);
    chk("mechanism: PUF re-generate", n_puf_regen >= 1);
    chk("mechanism: static MAC check", n_mac >= 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
