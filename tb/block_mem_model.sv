// block_mem_model -- behavioural model of untrusted off-chip memory.
//
// 512-bit blocks at 64-byte aligned byte addresses, sparse (unwritten blocks
// read as zero). A request is acknowledged LAT cycles after it is raised;
// read data comes with the ack. Testbenches reach `mem` hierarchically to
// preload contents or to tamper with them, and read `reads`/`writes`.
module block_mem_model #(
  parameter int unsigned LAT = 4
) (
  input  logic         clk,
  input  logic         req,
  input  logic         we,
  input  logic [31:0]  addr,
  input  logic [511:0] wdata,
  output logic         ack,
  output logic [511:0] rdata
);
  logic [511:0] mem [logic [31:0]];
  int unsigned  wait_q = 0;
  int unsigned  reads = 0, writes = 0;

  initial begin
    ack   = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (wait_q + 1 >= LAT) begin
        wait_q <= 0;
        ack    <= 1'b1;
        if (we) begin
          mem[addr] = wdata;
          writes++;
        end else begin
          rdata <= mem.exists(addr) ? mem[addr] : '0;
          reads++;
        end
      end else wait_q <= wait_q + 1;
    end
  end
endmodule
