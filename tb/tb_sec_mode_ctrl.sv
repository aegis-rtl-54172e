// tb_sec_mode_ctrl -- walks the secure-mode controller through every
// instruction in every mode against a reference transition table, and checks
// the catch-up stall (security instruction or PTR store to non-private memory
// while verification is busy), the debug binding and the program hash.
module tb_sec_mode_ctrl;
  import aegis_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid = 1'b0, debug_req = 1'b0, store_valid = 1'b0, store_private = 1'b0;
  logic iv_busy = 1'b0, hash_we = 1'b0;
  sec_instr_e instr = SI_NONE;
  logic [159:0] hash_in = '0, prog_hash;
  sec_mode_e mode;
  logic illegal, stall, debug_allowed, puf_allowed, prog_debug;
  int checks = 0, failures = 0;

  sec_mode_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (mode=%0d)", what, mode); end
  endtask

  // reference: next mode and legality
  function automatic void ref_step(sec_mode_e m, sec_mode_e sv, sec_instr_e i,
                                   output sec_mode_e nm, output logic lg);
    nm = m; lg = 1'b0;
    case (m)
      MODE_STD: if (i == SI_ENTER_TE || i == SI_ENTER_PTR) begin
        lg = 1; nm = (i == SI_ENTER_TE) ? MODE_TE : MODE_PTR;
      end
      MODE_TE, MODE_PTR: case (i)
        SI_ENTER_TE:  begin lg = 1; nm = MODE_TE; end
        SI_ENTER_PTR: begin lg = 1; nm = MODE_PTR; end
        SI_SUSPEND:   begin lg = 1; nm = MODE_SSP; end
        SI_EXIT:      begin lg = 1; nm = MODE_STD; end
        SI_SIGN:      lg = 1;
        SI_PUF:       lg = (m == MODE_PTR);
        default: ;
      endcase
      MODE_SSP: if (i == SI_RESUME) begin lg = 1; nm = sv; end
      default: ;
    endcase
  endfunction

  task automatic exec(input sec_instr_e i);
    @(negedge clk);
    instr = i; instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0; instr = SI_NONE;
  endtask

  initial begin
    sec_mode_e m, sv, nm;
    logic lg;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("reset in STD", mode == MODE_STD);
    chk("debug allowed in STD", debug_allowed);
    m = MODE_STD; sv = MODE_STD;
    for (int n = 0; n < 400; n++) begin
      sec_instr_e i;
      i = sec_instr_e'($urandom_range(1, 7));
      ref_step(m, sv, i, nm, lg);
      debug_req = $urandom_range(1);
      exec(i);
      chk("illegal flag", illegal == !lg);
      if (lg && i == SI_SUSPEND) sv = m;
      if (lg) m = nm;
      chk("mode", mode == m);
      chk("puf allowed", puf_allowed == (m == MODE_PTR));
    end

    // debug frozen at entry
    while (mode != MODE_STD) exec(mode == MODE_SSP ? SI_RESUME : SI_EXIT);
    debug_req = 1'b0;
    exec(SI_ENTER_PTR);
    debug_req = 1'b1;
    chk("debug off in PTR", !debug_allowed && !prog_debug);
    @(negedge clk);
    hash_in = 160'h1234_5678_9abc; hash_we = 1'b1;
    @(negedge clk);
    hash_we = 1'b0;
    chk("program hash", prog_hash == 160'h1234_5678_9abc);

    // stall rules
    iv_busy = 1'b1;
    @(negedge clk);
    instr = SI_EXIT; instr_valid = 1'b1;
    #1 chk("stall on security instruction", stall);
    @(negedge clk);
    chk("instruction held while stalled", mode == MODE_PTR);
    instr_valid = 1'b0; instr = SI_NONE;
    store_valid = 1'b1; store_private = 1'b0;
    #1 chk("stall on PTR public store", stall);
    store_private = 1'b1;
    #1 chk("no stall on private store", !stall);
    store_valid = 1'b0;
    iv_busy = 1'b0;
    store_valid = 1'b1; store_private = 1'b0;
    #1 chk("no stall once caught up", !stall);
    store_valid = 1'b0;
    exec(SI_ENTER_TE);
    iv_busy = 1'b1; store_valid = 1'b1;
    #1 chk("no store stall in TE", !stall);
    store_valid = 1'b0; iv_busy = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
