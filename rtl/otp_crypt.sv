// otp_crypt -- one-time-pad (counter-mode) memory encryption unit.
//
// A cache block leaving the chip is XORed with a pad, and the same pad XORed
// onto the ciphertext restores it. The pad of a 512-bit block is four 128-bit
// AES-128 encryptions, one per chunk i = 0..3, of the word
// {V, block address, time stamp, i}, where V is a fixed constant. Because the
// pad depends only on the address and the time stamp, it can be computed
// while the (larger) block is still on its way from memory, which hides the
// decryption latency. For a static (read-only) region the time stamp is
// forced to zero, so the pad can start as soon as the address is known.
// The scheme and the four parallel AES blocks follow the architecture; the
// bit layout of the AES input and the width of V are this design's choices.
//
// Interface: pulse `start` with `key`, `addr`, `ts` and `is_static` valid.
// `pad_ready` rises when all four chunks are done (11 clock edges after the
// sampling edge, see aes128_enc) and stays high until the next `start`.
// `data_out = data_in ^ pad` is combinational and valid while `pad_ready`
// is high; the same path encrypts and decrypts.
module otp_crypt
  import aegis_pkg::*;
#(
  parameter int unsigned CHUNKS  = aegis_pkg::CHUNKS,
  parameter logic [61:0] V_CONST = 62'h0AE6_1500_AE61_5EC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [127:0]           key,
  input  addr_t                  addr,
  input  ts_t                    ts,
  input  logic                   is_static,
  output logic                   pad_ready,
  input  logic [128*CHUNKS-1:0]  data_in,
  output logic [128*CHUNKS-1:0]  data_out
);

  logic [CHUNKS-1:0] done_c, busy_c;
  logic [127:0]      pad_c [CHUNKS];
  logic [CHUNKS-1:0] got_q;
  ts_t               ts_eff;

  assign ts_eff = is_static ? '0 : ts;

  for (genvar i = 0; i < CHUNKS; i++) begin : g_chunk
    logic [127:0] ctr;
    assign ctr = {V_CONST, addr, ts_eff, 2'(i)};
    aes128_enc u_aes (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .key   (key),
      .din   (ctr),
      .busy  (busy_c[i]),
      .done  (done_c[i]),
      .dout  (pad_c[i])
    );
    // chunk 0 sits in the low 128 bits of the block
    assign data_out[128*i +: 128] = data_in[128*i +: 128] ^ pad_c[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          got_q <= '0;
    else if (start)      got_q <= '0;
    else                 got_q <= got_q | done_c;
  end

  assign pad_ready = &(got_q | done_c) && !(|busy_c) && !start;

endmodule
