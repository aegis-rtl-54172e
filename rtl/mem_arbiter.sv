// mem_arbiter -- shares the one off-chip memory bus between two masters.
//
// The integrity checker (master 0) and the encryption data path (master 1)
// both move blocks and their meta-data (hash chunks, time stamps) over the
// same memory bus. A request is granted when the bus is idle, master 0 first;
// the grant is held until the slave acknowledges, so a transfer is never
// split. Sharing one bus follows the architecture; the fixed priority and
// the request/ack handshake are this design's choices.
//
// Interface: each port is a request/ack pair; request fields must be held
// until ack. The winner's request reaches the slave in the same cycle and the
// slave's `ack`/`rdata` are returned combinationally to it.
module mem_arbiter
  import aegis_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // master 0 (priority)
  input  logic   m0_req,
  input  logic   m0_we,
  input  addr_t  m0_addr,
  input  block_t m0_wdata,
  output logic   m0_ack,
  // master 1
  input  logic   m1_req,
  input  logic   m1_we,
  input  addr_t  m1_addr,
  input  block_t m1_wdata,
  output logic   m1_ack,
  output block_t rdata,
  // slave
  output logic   s_req,
  output logic   s_we,
  output addr_t  s_addr,
  output block_t s_wdata,
  input  logic   s_ack,
  input  block_t s_rdata
);

  logic locked_q, owner_q, owner;

  // owner: keep the locked master, else master 0 if it asks, else master 1
  assign owner = locked_q ? owner_q : !m0_req;

  always_comb begin
    s_req   = owner ? m1_req   : m0_req;
    s_we    = owner ? m1_we    : m0_we;
    s_addr  = owner ? m1_addr  : m0_addr;
    s_wdata = owner ? m1_wdata : m0_wdata;
    m0_ack  = !owner && s_ack;
    m1_ack  = owner && s_ack;
  end

  assign rdata = s_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= 1'b0;
    end else if (s_req && !s_ack) begin
      locked_q <= 1'b1;
      owner_q  <= owner;
    end else if (s_ack) begin
      locked_q <= 1'b0;
    end
  end

endmodule
