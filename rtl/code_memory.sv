// code_memory -- on-chip memory for the security-instruction firmware.
//
// The complex, rarely used security instructions are carried out by firmware
// held on chip, which needs about 12 KB. This is a single-port synchronous
// RAM of BYTES bytes organised as 32-bit words with byte enables. Size
// follows the architecture; the word width, byte enables and one-cycle read
// latency are this design's choices.
//
// Interface: with `en` high, `we` (one bit per byte) writes `wdata` at word
// `addr`; `rdata` returns the word at `addr` one clock after `en` (read
// before write on the same word).
module code_memory #(
  parameter int unsigned BYTES = 12288
) (
  input  logic                          clk,
  input  logic                          en,
  input  logic [3:0]                    we,
  input  logic [$clog2(BYTES/4)-1:0]    addr,
  input  logic [31:0]                   wdata,
  output logic [31:0]                   rdata
);

  localparam int unsigned WORDS = BYTES / 4;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      for (int b = 0; b < 4; b++)
        if (we[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

endmodule
