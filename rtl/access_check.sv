// access_check -- MMU access permission check for the protected memory regions.
//
// Every physical access is classified against the six protected ranges of the
// memory map: an integrity-verified (IV) and a memory-encrypted (ME) range for
// each of user static, supervisor static and dynamic memory, where IV and ME
// ranges may overlap. The class tells the memory protection unit which
// mechanisms apply, and the check refuses what the current mode may not do:
//   STD, SSP : no protected range at all (only unprotected memory);
//   TE       : IV ranges (verified memory) but no ME range (private memory);
//   PTR      : IV and ME ranges;
//   any mode : no store to a static (read-only) range;
//   user     : no access to the supervisor static ranges.
// The region kinds and the per-mode rights follow the architecture; the
// base/limit encoding ([base, limit), byte addresses), the user/supervisor
// rule and the purely combinational form are this design's choices.
//
// Interface and timing: combinational, `cls` valid in the same cycle as
// `addr`, `we`, `mode`, `supervisor` and `regions`.
module access_check
  import aegis_pkg::*;
(
  input  sec_mode_e     mode,
  input  logic          supervisor,
  input  region_map_t   regions,
  input  addr_t         addr,
  input  logic          we,
  output access_class_t cls
);

  logic iv_us, me_us, iv_ss, me_ss, iv_d, me_d;
  logic any_static, any_me, any_prot, fault;

  always_comb begin
    iv_us = in_region(regions.iv_user_static, addr);
    me_us = in_region(regions.me_user_static, addr);
    iv_ss = in_region(regions.iv_sup_static,  addr);
    me_ss = in_region(regions.me_sup_static,  addr);
    iv_d  = in_region(regions.iv_dynamic,     addr);
    me_d  = in_region(regions.me_dynamic,     addr);

    any_static = iv_us | me_us | iv_ss | me_ss;
    any_me     = me_us | me_ss | me_d;
    any_prot   = any_static | iv_d | me_d;

    fault = 1'b0;
    unique case (mode)
      MODE_STD, MODE_SSP: if (any_prot) fault = 1'b1;
      MODE_TE:            if (any_me)   fault = 1'b1;
      MODE_PTR:           ;
      default:            fault = 1'b1;
    endcase
    if (we && any_static)                  fault = 1'b1;
    if (!supervisor && (iv_ss | me_ss))    fault = 1'b1;

    cls.fault      = fault;
    cls.iv_static  = iv_us | iv_ss;
    cls.iv_dynamic = iv_d;
    cls.me_static  = me_us | me_ss;
    cls.me_dynamic = me_d;
    cls.sup_static = iv_ss | me_ss;
  end

endmodule
