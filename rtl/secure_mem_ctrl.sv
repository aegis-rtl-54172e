// secure_mem_ctrl -- memory protection unit between the data cache and the memory bus.
//
// Moves whole 512-bit cache blocks between the on-chip cache and untrusted
// memory and applies the protection the access class asks for:
//  * ME (memory encryption): blocks are stored as block ^ pad (otp_crypt).
//    Dynamic ME blocks use a per-block 32-bit time stamp, incremented on every
//    write-back, so a pad is never reused; static ME blocks use time stamp 0
//    and a per-area key (user or supervisor static).
//  * IV (integrity verification) of the dynamic region: a hash tree
//    (hash_tree_iv) over LEAVES blocks starting at DYN_BASE. The time stamps
//    live in the last LEAVES/16 blocks of that region, sixteen per block, so
//    the same tree protects them.
// Block fill (read): [time-stamp block read and verified] -> pad started ->
// data block read while the pad is computed -> block returned decrypted ->
// hash-tree check of the stored block in the background.
// Write-back: [time-stamp block read, verified, incremented, written, tree
// updated] -> pad -> encrypted block written -> acknowledged -> tree update
// in the background.
// Static IV fill: block returned -> MAC block read -> in the background
// MAC = first 128 bits of C({K, addr, C(block), 0}), C the SHA-1 compression
// and K the static key of the area, compared with the stored MAC.
// A failed check sets the sticky `tamper` flag. While a background check
// runs `iv_busy` is high and no new request is taken (`req_ready` low).
// Both units share one memory bus through mem_arbiter.
// The mechanisms (counter-mode pads with stored time stamps, a hash tree that
// also covers the time stamps, background checking, one shared bus) follow
// the architecture, as do MACs over address and data kept in unprotected
// memory for static IV regions. The time-stamp layout and width, the serial
// sequencing, the fixed dynamic-region geometry, the MAC function and the
// MAC layout (16 bytes per 64-byte block at MAC_USER_BASE / MAC_SUP_BASE
// plus a quarter of the block's offset in its static IV range) are this
// design's choices. Writes to static regions are refused by the access check.
//
// Interface: `req_valid` with `req_we`, `req_addr` (64-byte aligned),
// `req_wdata`, `req_cls`, `req_static_base` (base of the static IV range the
// address lies in) is taken while `req_ready`; `resp_valid` pulses
// once per request with `resp_err` (permission fault) and, for fills,
// `resp_rdata`. `init_start` (when idle) builds the tree over the dynamic
// region; `init_done` pulses when it is finished.
module secure_mem_ctrl
  import aegis_pkg::*;
#(
  parameter int unsigned LEAVES    = 64,
  parameter addr_t       DYN_BASE  = 32'h0002_0000,
  parameter addr_t       TREE_BASE = 32'h0003_0000,
  parameter addr_t       MAC_USER_BASE = 32'h0004_0000,
  parameter addr_t       MAC_SUP_BASE  = 32'h0004_8000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [127:0]  key_dynamic,
  input  logic [127:0]  key_user_static,
  input  logic [127:0]  key_sup_static,
  // cache side
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  addr_t         req_addr,
  input  block_t        req_wdata,
  input  access_class_t req_cls,
  input  addr_t         req_static_base,
  output logic          resp_valid,
  output logic          resp_err,
  output block_t        resp_rdata,
  // control and status
  input  logic          init_start,
  output logic          init_done,
  output logic          iv_busy,
  output logic          tamper,
  // memory bus
  output logic          mem_req,
  output logic          mem_we,
  output addr_t         mem_addr,
  output block_t        mem_wdata,
  input  logic          mem_ack,
  input  block_t        mem_rdata
);

  localparam int unsigned LW       = $clog2(LEAVES);
  localparam int unsigned TS_PER   = BLOCK_W / TS_W;          // 16
  localparam int unsigned TS_LEAF0 = LEAVES - LEAVES / TS_PER;

  localparam logic [1:0] IV_VERIFY = 2'd0;
  localparam logic [1:0] IV_UPDATE = 2'd1;
  localparam logic [1:0] IV_INIT   = 2'd2;

  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_INIT_W,
    S_TS_RD, S_TS_IV, S_TS_IVW, S_TS_WR, S_TS_UPD, S_TS_UPDW,
    S_PAD, S_F_RD, S_F_PAD, S_F_IV, S_F_IVW,
    S_W_PAD, S_W_WR, S_W_IV, S_W_IVW,
    S_M_RD, S_M_H1, S_M_W1, S_M_H2, S_M_W2
  } state_e;

  state_e        state;
  logic          we_q;
  addr_t         addr_q;
  block_t        wdata_q, ct_q, tsblk_q;
  access_class_t cls_q;
  ts_t           ts_q;
  logic          tamper_q;
  addr_t         sbase_q;
  logic [127:0]  mac_q;

  logic [LW-1:0] leaf, ts_leaf;
  logic [3:0]    ts_word;

  assign leaf    = LW'((addr_q - DYN_BASE) >> $clog2(BLOCK_BYTES));
  assign ts_leaf = LW'(TS_LEAF0 + (int'(leaf) / TS_PER));
  assign ts_word = 4'(int'(leaf) % TS_PER);

  // ---------------- static MAC unit ----------------
  addr_t        mac_addr;
  logic         m_start, m_busy, m_done;
  block_t       m_block;
  logic [159:0] m_digest, d1_q;
  logic [127:0] mac_key;

  assign mac_addr = (cls_q.sup_static ? MAC_SUP_BASE : MAC_USER_BASE) +
                    ((addr_q - sbase_q) >> 2);
  assign mac_key  = cls_q.sup_static ? key_sup_static : key_user_static;
  assign m_start  = (state == S_M_H1) || (state == S_M_H2);
  assign m_block  = (state == S_M_H2) ? {mac_key, addr_q, d1_q, 192'd0} : ct_q;

  sha1_compress u_mac (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (m_start),
    .block  (m_block),
    .busy   (m_busy),
    .done   (m_done),
    .digest (m_digest)
  );

  // ---------------- encryption unit ----------------
  logic         otp_start, pad_ready;
  logic [127:0] otp_key;
  block_t       otp_in, otp_out;

  assign otp_key = cls_q.me_dynamic ? key_dynamic :
                   (cls_q.sup_static ? key_sup_static : key_user_static);
  assign otp_in  = we_q ? wdata_q : ct_q;

  otp_crypt u_otp (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (otp_start),
    .key       (otp_key),
    .addr      (addr_q),
    .ts        (ts_q),
    .is_static (!cls_q.me_dynamic),
    .pad_ready (pad_ready),
    .data_in   (otp_in),
    .data_out  (otp_out)
  );

  // ---------------- integrity unit ----------------
  logic          iv_cmd_valid, iv_done, iv_ok, iv_unit_busy;
  logic [1:0]    iv_cmd;
  logic [LW-1:0] iv_leaf;
  block_t        iv_data;
  logic [127:0]  iv_root;
  logic          iv_mreq, iv_mwe, iv_mack;
  addr_t         iv_maddr;
  block_t        iv_mwdata;

  hash_tree_iv #(
    .LEAVES    (LEAVES),
    .LEAF_BASE (DYN_BASE),
    .TREE_BASE (TREE_BASE)
  ) u_iv (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (iv_cmd_valid),
    .cmd       (iv_cmd),
    .leaf_idx  (iv_leaf),
    .data      (iv_data),
    .busy      (iv_unit_busy),
    .done      (iv_done),
    .ok        (iv_ok),
    .root      (iv_root),
    .mem_req   (iv_mreq),
    .mem_we    (iv_mwe),
    .mem_addr  (iv_maddr),
    .mem_wdata (iv_mwdata),
    .mem_ack   (iv_mack),
    .mem_rdata (mem_rdata)
  );

  // ---------------- shared memory bus ----------------
  logic   d_req, d_we, d_ack;
  addr_t  d_addr;
  block_t d_wdata, arb_rdata;

  mem_arbiter u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .m0_req   (iv_mreq),
    .m0_we    (iv_mwe),
    .m0_addr  (iv_maddr),
    .m0_wdata (iv_mwdata),
    .m0_ack   (iv_mack),
    .m1_req   (d_req),
    .m1_we    (d_we),
    .m1_addr  (d_addr),
    .m1_wdata (d_wdata),
    .m1_ack   (d_ack),
    .rdata    (arb_rdata),
    .s_req    (mem_req),
    .s_we     (mem_we),
    .s_addr   (mem_addr),
    .s_wdata  (mem_wdata),
    .s_ack    (mem_ack),
    .s_rdata  (mem_rdata)
  );

  // ---------------- sequencing ----------------
  always_comb begin
    d_req        = 1'b0;
    d_we         = 1'b0;
    d_addr       = addr_q;
    d_wdata      = ct_q;
    iv_cmd_valid = 1'b0;
    iv_cmd       = IV_VERIFY;
    iv_leaf      = leaf;
    iv_data      = ct_q;
    otp_start    = 1'b0;
    unique case (state)
      S_INIT: begin
        iv_cmd_valid = !iv_unit_busy;
        iv_cmd       = IV_INIT;
      end
      S_TS_RD: begin
        d_req  = 1'b1;
        d_addr = DYN_BASE + addr_t'(int'(ts_leaf) * BLOCK_BYTES);
      end
      S_TS_IV: begin
        iv_cmd_valid = !iv_unit_busy;
        iv_leaf      = ts_leaf;
        iv_data      = tsblk_q;
      end
      S_TS_WR: begin
        d_req   = 1'b1;
        d_we    = 1'b1;
        d_addr  = DYN_BASE + addr_t'(int'(ts_leaf) * BLOCK_BYTES);
        d_wdata = tsblk_q;
      end
      S_TS_UPD: begin
        iv_cmd_valid = !iv_unit_busy;
        iv_cmd       = IV_UPDATE;
        iv_leaf      = ts_leaf;
        iv_data      = tsblk_q;
      end
      S_PAD:  otp_start = 1'b1;
      S_F_RD: d_req = 1'b1;
      S_F_IV: iv_cmd_valid = !iv_unit_busy;
      S_M_RD: begin
        d_req  = 1'b1;
        d_addr = {mac_addr[ADDR_W-1:6], 6'd0};
      end
      S_W_WR: begin
        d_req = 1'b1;
        d_we  = 1'b1;
      end
      S_W_IV: begin
        iv_cmd_valid = !iv_unit_busy;
        iv_cmd       = IV_UPDATE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      we_q       <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      ct_q       <= '0;
      tsblk_q    <= '0;
      cls_q      <= '0;
      ts_q       <= '0;
      tamper_q   <= 1'b0;
      sbase_q    <= '0;
      mac_q      <= '0;
      d1_q       <= '0;
      resp_valid <= 1'b0;
      resp_err   <= 1'b0;
      resp_rdata <= '0;
      init_done  <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      init_done  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (init_start) state <= S_INIT;
          else if (req_valid) begin
            we_q     <= req_we;
            addr_q   <= req_addr;
            wdata_q  <= req_wdata;
            ct_q     <= req_wdata;
            cls_q    <= req_cls;
            sbase_q  <= req_static_base;
            ts_q     <= '0;
            resp_err <= 1'b0;
            if (req_cls.fault) begin
              resp_valid <= 1'b1;
              resp_err   <= 1'b1;
            end else if (req_cls.me_dynamic) state <= S_TS_RD;
            else if (req_cls.me_static)      state <= S_PAD;
            else                             state <= req_we ? S_W_WR : S_F_RD;
          end
        end
        S_INIT:   if (!iv_unit_busy) state <= S_INIT_W;
        S_INIT_W: if (iv_done) begin
          if (!iv_ok) tamper_q <= 1'b1;
          init_done <= 1'b1;
          state     <= S_IDLE;
        end
        // time stamp of a dynamic ME block
        S_TS_RD: if (d_ack) begin
          tsblk_q <= arb_rdata;
          state   <= S_TS_IV;
        end
        S_TS_IV: if (!iv_unit_busy) state <= S_TS_IVW;
        S_TS_IVW: if (iv_done) begin
          if (!iv_ok) tamper_q <= 1'b1;
          if (we_q) begin
            ts_q <= tsblk_q[TS_W*ts_word +: TS_W] + 1'b1;
            tsblk_q[TS_W*ts_word +: TS_W] <= tsblk_q[TS_W*ts_word +: TS_W] + 1'b1;
            state <= S_TS_WR;
          end else begin
            ts_q  <= tsblk_q[TS_W*ts_word +: TS_W];
            state <= S_PAD;
          end
        end
        S_TS_WR:  if (d_ack) state <= S_TS_UPD;
        S_TS_UPD: if (!iv_unit_busy) state <= S_TS_UPDW;
        S_TS_UPDW: if (iv_done) begin
          if (!iv_ok) tamper_q <= 1'b1;
          state <= S_PAD;
        end
        // pad computation starts; for a fill the data read overlaps it
        S_PAD: state <= we_q ? S_W_PAD : S_F_RD;
        // ---------------- fill ----------------
        S_F_RD: if (d_ack) begin
          ct_q  <= arb_rdata;
          state <= S_F_PAD;
        end
        S_F_PAD: if (!(cls_q.me_dynamic || cls_q.me_static) || pad_ready) begin
          resp_valid <= 1'b1;
          resp_rdata <= (cls_q.me_dynamic || cls_q.me_static) ? otp_out : ct_q;
          state      <= cls_q.iv_dynamic ? S_F_IV :
                        (cls_q.iv_static ? S_M_RD : S_IDLE);
        end
        S_F_IV:  if (!iv_unit_busy) state <= S_F_IVW;
        S_F_IVW: if (iv_done) begin
          if (!iv_ok) tamper_q <= 1'b1;
          state <= S_IDLE;
        end
        // ---------------- static MAC check ----------------
        S_M_RD: if (d_ack) begin
          mac_q <= arb_rdata[128*(3 - int'(mac_addr[5:4])) +: 128];
          state <= S_M_H1;
        end
        S_M_H1: state <= S_M_W1;
        S_M_W1: if (m_done) begin
          d1_q  <= m_digest;
          state <= S_M_H2;
        end
        S_M_H2: state <= S_M_W2;
        S_M_W2: if (m_done) begin
          if (m_digest[159 -: 128] != mac_q) tamper_q <= 1'b1;
          state <= S_IDLE;
        end
        // ---------------- write-back ----------------
        S_W_PAD: if (pad_ready) begin
          ct_q  <= otp_out;
          state <= S_W_WR;
        end
        S_W_WR: if (d_ack) begin
          resp_valid <= 1'b1;
          state      <= cls_q.iv_dynamic ? S_W_IV : S_IDLE;
        end
        S_W_IV:  if (!iv_unit_busy) state <= S_W_IVW;
        S_W_IVW: if (iv_done) begin
          if (!iv_ok) tamper_q <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign req_ready = (state == S_IDLE) && !init_start;
  assign iv_busy   = iv_unit_busy || (state == S_F_IV) || (state == S_F_IVW) ||
                     (state == S_W_IV) || (state == S_W_IVW) ||
                     (state >= S_M_RD);
  assign tamper    = tamper_q;

endmodule
