// aegis_secure_top -- security subsystem of a single-chip secure processor.
//
// Everything outside the processor chip is untrusted, so the chip itself must
// hold a secret and protect its off-chip memory. This top gathers the
// security hardware around an existing embedded core and its caches:
//   * ro_puf          ring-oscillator PUF, the source of the chip's secret
//                     (start gated: only allowed in PTR mode);
//   * sec_mode_ctrl   STD / TE / PTR / SSP secure modes, security instruction
//                     checks, program hash, debug binding, IV catch-up stall;
//   * access_check x2 MMU permission check of core accesses (fault and
//                     "private" for the stall rule) and classification of
//                     cache-block transfers;
//   * secure_mem_ctrl counter-mode memory encryption and hash-tree integrity
//                     verification of cache fills and write-backs on one
//                     shared memory bus, MAC check of static IV fills;
//   * code_memory     on-chip RAM for the security-instruction firmware.
// The core, the caches, the UART and the memory controller are not part of
// this RTL: their connections are the ports below. The ring oscillators are
// analog and enter as the `ro` inputs. The protected-region bounds and the
// encryption keys are written by the security firmware and enter as ports.
// The partition follows the architecture's block diagram; the port-level
// interfaces are this design's own.
//
// Timing: see the blocks. A cache block request is taken while `blk_ready`
// and answered by one `blk_resp_valid` pulse; `iv_busy` stays high while
// the hash tree is still checking in the background.
module aegis_secure_top
  import aegis_pkg::*;
#(
  parameter int unsigned N_OSC     = 1024,
  parameter int unsigned K_MASK    = 8,
  parameter int unsigned N_BITS    = 127,
  parameter int unsigned WINDOW    = 1024,
  parameter int unsigned LEAVES    = 64,
  parameter addr_t       DYN_BASE  = 32'h0002_0000,
  parameter addr_t       TREE_BASE = 32'h0003_0000,
  parameter addr_t       MAC_USER_BASE = 32'h0004_0000,
  parameter addr_t       MAC_SUP_BASE  = 32'h0004_8000,
  parameter int unsigned CODE_BYTES = 12288
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ring oscillator outputs
  input  logic [N_OSC-1:0]          ro,
  // security instructions from the core
  input  logic                      si_valid,
  input  sec_instr_e                si_instr,
  input  logic                      debug_req,
  input  logic                      hash_we,
  input  logic [159:0]              hash_in,
  output sec_mode_e                 mode,
  output logic                      si_illegal,
  output logic                      stall,
  output logic                      debug_allowed,
  output logic [159:0]              prog_hash,
  output logic                      prog_debug,
  // core load/store permission check
  input  logic                      supervisor,
  input  region_map_t               regions,
  input  logic                      acc_valid,
  input  addr_t                     acc_addr,
  input  logic                      acc_we,
  output logic                      acc_fault,
  // PUF
  input  logic                      puf_start,
  input  logic                      puf_regen,
  input  logic [N_BITS*K_MASK-1:0]  puf_mask_in,
  output logic                      puf_denied,
  output logic                      puf_busy,
  output logic                      puf_done,
  output logic [N_BITS-1:0]         puf_response,
  output logic [N_BITS*K_MASK-1:0]  puf_mask_out,
  // keys for memory encryption
  input  logic [127:0]              key_dynamic,
  input  logic [127:0]              key_user_static,
  input  logic [127:0]              key_sup_static,
  // cache-block transfers from the data cache
  input  logic                      blk_valid,
  output logic                      blk_ready,
  input  logic                      blk_we,
  input  addr_t                     blk_addr,
  input  block_t                    blk_wdata,
  output logic                      blk_resp_valid,
  output logic                      blk_resp_err,
  output block_t                    blk_resp_rdata,
  input  logic                      iv_init_start,
  output logic                      iv_init_done,
  output logic                      iv_busy,
  output logic                      tamper,
  // memory bus to the memory controller
  output logic                      mem_req,
  output logic                      mem_we,
  output addr_t                     mem_addr,
  output block_t                    mem_wdata,
  input  logic                      mem_ack,
  input  block_t                    mem_rdata,
  // firmware code memory
  input  logic                      cm_en,
  input  logic [3:0]                cm_we,
  input  logic [$clog2(CODE_BYTES/4)-1:0] cm_addr,
  input  logic [31:0]               cm_wdata,
  output logic [31:0]               cm_rdata
);

  access_class_t acc_cls, blk_cls;
  logic          puf_allowed;

  // core access check
  access_check u_acc_core (
    .mode       (mode),
    .supervisor (supervisor),
    .regions    (regions),
    .addr       (acc_addr),
    .we         (acc_we),
    .cls        (acc_cls)
  );
  assign acc_fault = acc_valid && acc_cls.fault;

  // classification of cache-block transfers
  access_check u_acc_blk (
    .mode       (mode),
    .supervisor (supervisor),
    .regions    (regions),
    .addr       (blk_addr),
    .we         (blk_we),
    .cls        (blk_cls)
  );

  sec_mode_ctrl #(.HASH_W(160)) u_mode (
    .clk           (clk),
    .rst_n         (rst_n),
    .instr_valid   (si_valid),
    .instr         (si_instr),
    .debug_req     (debug_req),
    .store_valid   (acc_valid && acc_we),
    .store_private (acc_cls.me_static || acc_cls.me_dynamic),
    .iv_busy       (iv_busy),
    .hash_we       (hash_we),
    .hash_in       (hash_in),
    .mode          (mode),
    .illegal       (si_illegal),
    .stall         (stall),
    .debug_allowed (debug_allowed),
    .puf_allowed   (puf_allowed),
    .prog_hash     (prog_hash),
    .prog_debug    (prog_debug)
  );

  ro_puf #(
    .N_OSC  (N_OSC),
    .K_MASK (K_MASK),
    .N_BITS (N_BITS),
    .WINDOW (WINDOW)
  ) u_puf (
    .clk      (clk),
    .rst_n    (rst_n),
    .ro       (ro),
    .start    (puf_start && puf_allowed),
    .regen    (puf_regen),
    .mask_in  (puf_mask_in),
    .busy     (puf_busy),
    .done     (puf_done),
    .response (puf_response),
    .mask_out (puf_mask_out)
  );
  assign puf_denied = puf_start && !puf_allowed;

  secure_mem_ctrl #(
    .LEAVES    (LEAVES),
    .DYN_BASE  (DYN_BASE),
    .TREE_BASE (TREE_BASE),
    .MAC_USER_BASE (MAC_USER_BASE),
    .MAC_SUP_BASE  (MAC_SUP_BASE)
  ) u_mem (
    .clk             (clk),
    .rst_n           (rst_n),
    .key_dynamic     (key_dynamic),
    .key_user_static (key_user_static),
    .key_sup_static  (key_sup_static),
    .req_valid       (blk_valid),
    .req_ready       (blk_ready),
    .req_we          (blk_we),
    .req_addr        (blk_addr),
    .req_wdata       (blk_wdata),
    .req_cls         (blk_cls),
    .req_static_base (blk_cls.sup_static ? regions.iv_sup_static.base :
                                           regions.iv_user_static.base),
    .resp_valid      (blk_resp_valid),
    .resp_err        (blk_resp_err),
    .resp_rdata      (blk_resp_rdata),
    .init_start      (iv_init_start),
    .init_done       (iv_init_done),
    .iv_busy         (iv_busy),
    .tamper          (tamper),
    .mem_req         (mem_req),
    .mem_we          (mem_we),
    .mem_addr        (mem_addr),
    .mem_wdata       (mem_wdata),
    .mem_ack         (mem_ack),
    .mem_rdata       (mem_rdata)
  );

  code_memory #(.BYTES(CODE_BYTES)) u_code (
    .clk   (clk),
    .en    (cm_en),
    .we    (cm_we),
    .addr  (cm_addr),
    .wdata (cm_wdata),
    .rdata (cm_rdata)
  );

endmodule
