// hash_tree_iv -- integrity verification of the dynamic region with a hash tree.
//
// The dynamic region is LEAVES blocks of 512 bits in untrusted memory. Above
// it sits a tree of hash chunks, also in untrusted memory: a chunk is one
// 512-bit block holding ARITY = 4 node hashes of 128 bits, the hashes of its
// four children (data blocks for the first level, chunks above). Only the hash
// of the single top chunk, the root, is kept on chip, so any change to data
// or to a stored hash shows up as a mismatch on the way to the root.
//
//   CMD_VERIFY  block `leaf_idx` was read from memory with contents `data`:
//               read the LEVELS chunks on its path, hash the block and each
//               chunk and compare every hash with the slot of its parent, the
//               last one with the root.
//   CMD_UPDATE  block `leaf_idx` is being written with `data`: read and check
//               the path as above (without the old block), then put the new
//               hash in its slot, rehash and write back each chunk bottom-up
//               and replace the root.
//   CMD_INIT    build the tree over the region as it now is in memory, level
//               by level, and set the root.
// The tree structure, the 4-ary chunk and the on-chip root follow the
// architecture. The hash (first 128 bits of one SHA-1 compression), the
// memory layout (chunks of level l at TREE_BASE, levels packed upward) and
// the init command are this design's choices; there is no hash cache, so
// each verification walks to the root.
//
// Interface: `cmd_valid` with `cmd` is taken when `busy` is low; `done`
// pulses when the command ends, with `ok` low if a mismatch was found; `ok`
// then holds until the next command. The memory port is a request/ack
// handshake: `mem_req` and the other request fields hold until `mem_ack`,
// and read data is taken on the acked cycle. Cost per command with a memory
// ack latency of A cycles: VERIFY = LEVELS reads + (LEVELS+1) hashes of 82
// cycles; UPDATE adds LEVELS writes and LEVELS+1 hashes.
module hash_tree_iv
  import aegis_pkg::*;
#(
  parameter int unsigned LEAVES    = 64,
  parameter int unsigned ARITY     = 4,
  parameter int unsigned HASH_W    = 128,
  parameter addr_t       LEAF_BASE = 32'h0002_0000,
  parameter addr_t       TREE_BASE = 32'h0003_0000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command
  input  logic                      cmd_valid,
  input  logic [1:0]                cmd,
  input  logic [$clog2(LEAVES)-1:0] leaf_idx,
  input  block_t                    data,
  output logic                      busy,
  output logic                      done,
  output logic                      ok,
  output logic [HASH_W-1:0]         root,
  // memory master
  output logic                      mem_req,
  output logic                      mem_we,
  output addr_t                     mem_addr,
  output block_t                    mem_wdata,
  input  logic                      mem_ack,
  input  block_t                    mem_rdata
);

  localparam logic [1:0] CMD_VERIFY = 2'd0;
  localparam logic [1:0] CMD_UPDATE = 2'd1;
  localparam logic [1:0] CMD_INIT   = 2'd2;

  localparam int unsigned LOG_A  = $clog2(ARITY);
  localparam int unsigned LEVELS = $clog2(LEAVES) / LOG_A;
  localparam int unsigned LW     = $clog2(LEAVES);

  // offset, in chunks, of the first chunk of level l (1..LEVELS)
  function automatic int unsigned lvl_off(input int unsigned l);
    int unsigned o;
    o = 0;
    for (int unsigned j = 1; j < LEVELS + 1; j++)
      if (j < l) o += LEAVES >> (LOG_A * j);
    return o;
  endfunction

  function automatic addr_t chunk_addr(input int unsigned l, input int unsigned idx);
    return TREE_BASE + addr_t'((lvl_off(l) + idx) * BLOCK_BYTES);
  endfunction

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_CHK_H, S_CHK_W, S_UPD_H, S_UPD_W, S_UPD_WR,
    S_INIT_RD, S_INIT_H, S_INIT_W, S_INIT_WR, S_ROOT_H, S_ROOT_W
  } state_e;

  state_e                 state;
  logic [1:0]             op_q;
  logic [LW-1:0]          leaf_q;
  block_t                 data_q;
  block_t                 buf_q [LEVELS+1];   // path chunks, index 1..LEVELS
  block_t                 ibuf_q;             // chunk being built by INIT
  logic [$clog2(LEVELS+2)-1:0] cur_q;         // tree level being handled
  logic [LW-1:0]          ci_q;               // INIT chunk index
  logic [LOG_A-1:0]       slot_q;             // INIT slot
  logic [HASH_W-1:0]      root_q;

  logic         h_start, h_busy, h_done;
  block_t       h_block;
  logic [159:0] h_digest;
  logic [HASH_W-1:0] h_val;

  sha1_compress u_hash (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (h_start),
    .block  (h_block),
    .busy   (h_busy),
    .done   (h_done),
    .digest (h_digest)
  );

  assign h_val = h_digest[159 -: HASH_W];
  assign root  = root_q;
  assign busy  = (state != S_IDLE);

  // slot of the level-l node on the current path inside its parent chunk
  function automatic logic [LOG_A-1:0] path_slot(input logic [LW-1:0] leaf, input int unsigned l);
    return LOG_A'(leaf >> (LOG_A * l));
  endfunction

  function automatic int unsigned path_idx(input logic [LW-1:0] leaf, input int unsigned l);
    return int'(leaf >> (LOG_A * l));
  endfunction

  // hash start and what it hashes
  always_comb begin
    h_start = 1'b0;
    h_block = data_q;
    unique case (state)
      S_CHK_H, S_UPD_H: begin
        h_start = 1'b1;
        h_block = (cur_q == 0) ? data_q : buf_q[cur_q];
      end
      S_INIT_H: begin
        h_start = 1'b1;
        h_block = data_q;            // child block just read
      end
      S_ROOT_H: begin
        h_start = 1'b1;
        h_block = ibuf_q;
      end
      default: ;
    endcase
  end

  // memory request
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    unique case (state)
      S_RD: begin
        mem_req  = 1'b1;
        mem_addr = chunk_addr(cur_q, path_idx(leaf_q, cur_q));
      end
      S_UPD_WR: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = chunk_addr(cur_q, path_idx(leaf_q, cur_q));
        mem_wdata = buf_q[cur_q];
      end
      S_INIT_RD: begin
        mem_req  = 1'b1;
        if (cur_q == 1)
          mem_addr = LEAF_BASE + addr_t'((int'(ci_q) * ARITY + int'(slot_q)) * BLOCK_BYTES);
        else
          mem_addr = chunk_addr(cur_q - 1, int'(ci_q) * ARITY + int'(slot_q));
      end
      S_INIT_WR: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = chunk_addr(cur_q, ci_q);
        mem_wdata = ibuf_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= CMD_VERIFY;
      leaf_q <= '0;
      data_q <= '0;
      for (int i = 0; i <= LEVELS; i++) buf_q[i] <= '0;
      ibuf_q <= '0;
      cur_q  <= '0;
      ci_q   <= '0;
      slot_q <= '0;
      root_q <= '0;
      done   <= 1'b0;
      ok     <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op_q   <= cmd;
          leaf_q <= leaf_idx;
          data_q <= data;
          ok     <= 1'b1;
          cur_q  <= 1;
          ci_q   <= '0;
          slot_q <= '0;
          state  <= (cmd == CMD_INIT) ? S_INIT_RD : S_RD;
        end
        // ---------------- path read ----------------
        S_RD: if (mem_ack) begin
          buf_q[cur_q] <= mem_rdata;
          if (cur_q == LEVELS) begin
            cur_q <= (op_q == CMD_VERIFY) ? 0 : 1;
            state <= S_CHK_H;
          end else begin
            cur_q <= cur_q + 1;
          end
        end
        // ---------------- path check ----------------
        S_CHK_H: state <= S_CHK_W;
        S_CHK_W: if (h_done) begin
          if (h_val != ((cur_q == LEVELS) ? root_q
                        : buf_q[cur_q+1][HASH_W*path_slot(leaf_q, cur_q) +: HASH_W])) begin
            ok    <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (cur_q == LEVELS) begin
            if (op_q == CMD_VERIFY) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              cur_q <= 0;
              state <= S_UPD_H;
            end
          end else begin
            cur_q <= cur_q + 1;
            state <= S_CHK_H;
          end
        end
        // ---------------- path update ----------------
        S_UPD_H: state <= S_UPD_W;
        S_UPD_W: if (h_done) begin
          if (cur_q == LEVELS) begin
            root_q <= h_val;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            buf_q[cur_q+1][HASH_W*path_slot(leaf_q, cur_q) +: HASH_W] <= h_val;
            cur_q <= cur_q + 1;
            state <= S_UPD_WR;
          end
        end
        S_UPD_WR: if (mem_ack) state <= S_UPD_H;
        // ---------------- tree build ----------------
        S_INIT_RD: if (mem_ack) begin
          data_q <= mem_rdata;
          state  <= S_INIT_H;
        end
        S_INIT_H: state <= S_INIT_W;
        S_INIT_W: if (h_done) begin
          ibuf_q[HASH_W*slot_q +: HASH_W] <= h_val;
          if (slot_q == LOG_A'(ARITY - 1)) state <= S_INIT_WR;
          else begin
            slot_q <= slot_q + 1;
            state  <= S_INIT_RD;
          end
        end
        S_INIT_WR: if (mem_ack) begin
          slot_q <= '0;
          if (int'(ci_q) == int'(LEAVES >> (LOG_A * cur_q)) - 1) begin
            ci_q <= '0;
            if (cur_q == LEVELS) state <= S_ROOT_H;
            else begin
              cur_q <= cur_q + 1;
              state <= S_INIT_RD;
            end
          end else begin
            ci_q  <= ci_q + 1;
            state <= S_INIT_RD;
          end
        end
        S_ROOT_H: state <= S_ROOT_W;
        S_ROOT_W: if (h_done) begin
          root_q <= h_val;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a request, once raised, holds its address until it is acknowledged
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) (mem_req && !mem_ack) |=> (mem_req && $stable(mem_addr));
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
