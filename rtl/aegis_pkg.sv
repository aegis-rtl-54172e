// aegis_pkg -- types and constants shared by the AEGIS security blocks.
//
// Holds the four secure execution modes (standard, tamper-evident, private
// tamper-resistant, suspended secure processing), the security-instruction
// opcodes, the protected-region descriptors of the physical memory map and
// the cache-block geometry used by the encryption and integrity units.
// The mode names and the region kinds follow the architecture; the numeric
// encodings, the 512-bit block (four 128-bit pad chunks) split and the
// instruction enum are this design's choices.
package aegis_pkg;

  localparam int unsigned ADDR_W     = 32;   // physical byte address
  localparam int unsigned CHUNK_W    = 128;  // one AES block / pad chunk
  localparam int unsigned CHUNKS     = 4;    // chunks per cache block
  localparam int unsigned BLOCK_W    = CHUNK_W * CHUNKS;  // 512-bit cache block
  localparam int unsigned BLOCK_BYTES = BLOCK_W / 8;      // 64 bytes
  localparam int unsigned TS_W       = 32;   // encryption time stamp

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [CHUNK_W-1:0] chunk_t;
  typedef logic [TS_W-1:0]    ts_t;

  // Secure execution modes.
  typedef enum logic [1:0] {
    MODE_STD = 2'd0,   // standard: no extra protection
    MODE_TE  = 2'd1,   // tamper-evident: integrity of program state
    MODE_PTR = 2'd2,   // private tamper-resistant: integrity and privacy
    MODE_SSP = 2'd3    // suspended secure processing
  } sec_mode_e;

  // Security instructions seen by the mode controller.
  typedef enum logic [2:0] {
    SI_NONE      = 3'd0,
    SI_ENTER_TE  = 3'd1,
    SI_ENTER_PTR = 3'd2,
    SI_SUSPEND   = 3'd3,
    SI_RESUME    = 3'd4,
    SI_EXIT      = 3'd5,
    SI_PUF       = 3'd6,
    SI_SIGN      = 3'd7
  } sec_instr_e;

  // One address range, [base, limit).
  typedef struct packed {
    addr_t base;
    addr_t limit;
  } region_t;

  // The protected ranges of the physical memory map. Each of the three areas
  // (user static, supervisor static, dynamic) has an IV range and an ME range,
  // which may overlap.
  typedef struct packed {
    region_t iv_user_static;
    region_t me_user_static;
    region_t iv_sup_static;
    region_t me_sup_static;
    region_t iv_dynamic;
    region_t me_dynamic;
  } region_map_t;

  // Result of classifying one access.
  typedef struct packed {
    logic fault;       // access refused
    logic iv_static;   // address lies in a static IV range
    logic iv_dynamic;  // address lies in the dynamic IV range
    logic me_static;   // address lies in a static ME range
    logic me_dynamic;  // address lies in the dynamic ME range
    logic sup_static;  // the static hit is in the supervisor static ranges
  } access_class_t;

  function automatic logic in_region(region_t r, addr_t a);
    return (a >= r.base) && (a < r.limit);
  endfunction

endpackage
