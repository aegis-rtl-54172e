// sec_mode_ctrl -- secure execution mode state machine and security checks.
//
// Tracks the secure mode (STD, TE, PTR, SSP) and executes the security
// instructions that move between them:
//   STD : ENTER_TE -> TE, ENTER_PTR -> PTR; nothing else is allowed.
//   TE  : ENTER_PTR -> PTR, SUSPEND -> SSP, EXIT -> STD, SIGN; no PUF.
//   PTR : ENTER_TE -> TE, SUSPEND -> SSP, EXIT -> STD, SIGN, PUF.
//   SSP : RESUME -> the mode that was suspended; nothing else is allowed.
// A refused instruction raises `illegal` for one cycle and changes nothing.
// It also enforces the integrity-check catch-up rule: verification of blocks
// runs in the background, but while it is busy (`iv_busy`) a security
// instruction, or a PTR-mode store to memory that is not private, is held
// off with `stall` until the checker has caught up.
// The program-hash register is written by firmware (`hash_we`) when a secure
// mode is entered; the debug-enable request is frozen at entry and reported
// with the hash, so a kernel running with debug on is identified differently.
// Debug access is always allowed in STD and only if frozen on otherwise.
// The modes, their rights, the stall rule and the debug/hash binding follow
// the architecture; the instruction set and the transitions allowed from
// each mode are this design's reading of it.
//
// Interface: `instr_valid`/`instr` are sampled each cycle; when `stall` is
// high the instruction must be held and re-presented. `mode` updates on the
// clock edge that executes the instruction.
module sec_mode_ctrl
  import aegis_pkg::*;
#(
  parameter int unsigned HASH_W = 160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              instr_valid,
  input  sec_instr_e        instr,
  input  logic              debug_req,
  input  logic              store_valid,
  input  logic              store_private,
  input  logic              iv_busy,
  input  logic              hash_we,
  input  logic [HASH_W-1:0] hash_in,
  output sec_mode_e         mode,
  output logic              illegal,
  output logic              stall,
  output logic              debug_allowed,
  output logic              puf_allowed,
  output logic [HASH_W-1:0] prog_hash,
  output logic              prog_debug
);

  sec_mode_e mode_q, saved_q, next_mode;
  logic      legal, instr_stall, store_stall;
  logic      debug_q;

  always_comb begin
    next_mode = mode_q;
    legal     = 1'b0;
    unique case (mode_q)
      MODE_STD: unique case (instr)
        SI_ENTER_TE:  begin legal = 1'b1; next_mode = MODE_TE;  end
        SI_ENTER_PTR: begin legal = 1'b1; next_mode = MODE_PTR; end
        default: ;
      endcase
      MODE_TE: unique case (instr)
        SI_ENTER_TE:  legal = 1'b1;
        SI_ENTER_PTR: begin legal = 1'b1; next_mode = MODE_PTR; end
        SI_SUSPEND:   begin legal = 1'b1; next_mode = MODE_SSP; end
        SI_EXIT:      begin legal = 1'b1; next_mode = MODE_STD; end
        SI_SIGN:      legal = 1'b1;
        default: ;
      endcase
      MODE_PTR: unique case (instr)
        SI_ENTER_TE:  begin legal = 1'b1; next_mode = MODE_TE;  end
        SI_ENTER_PTR: legal = 1'b1;
        SI_SUSPEND:   begin legal = 1'b1; next_mode = MODE_SSP; end
        SI_EXIT:      begin legal = 1'b1; next_mode = MODE_STD; end
        SI_SIGN, SI_PUF: legal = 1'b1;
        default: ;
      endcase
      MODE_SSP: if (instr == SI_RESUME) begin legal = 1'b1; next_mode = saved_q; end
      default: ;
    endcase
    if (instr == SI_NONE) legal = 1'b0;
  end

  assign instr_stall = instr_valid && (instr != SI_NONE) && iv_busy;
  assign store_stall = store_valid && (mode_q == MODE_PTR) && !store_private && iv_busy;
  assign stall       = instr_stall || store_stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= MODE_STD;
      saved_q   <= MODE_STD;
      debug_q   <= 1'b0;
      illegal   <= 1'b0;
      prog_hash <= '0;
    end else begin
      illegal <= 1'b0;
      if (instr_valid && instr != SI_NONE && !instr_stall) begin
        if (!legal) illegal <= 1'b1;
        else begin
          if (mode_q == MODE_STD) debug_q <= debug_req;
          if (instr == SI_SUSPEND) saved_q <= mode_q;
          mode_q <= next_mode;
        end
      end
      if (hash_we && mode_q != MODE_STD) prog_hash <= hash_in;
    end
  end

  assign mode          = mode_q;
  assign prog_debug    = debug_q;
  assign debug_allowed = (mode_q == MODE_STD) || debug_q;
  assign puf_allowed   = (mode_q == MODE_PTR);

endmodule
