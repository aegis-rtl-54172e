// sha1_compress -- SHA-1 compression of one 512-bit block (FIPS 180-4).
//
// Hash engine for the integrity tree. It applies the SHA-1 compression
// function to a single 512-bit block starting from the standard initial
// value; no length padding is added, because every tree node hashed here is
// exactly one block. The architecture asks for a cryptographic hash without
// naming one: SHA-1 is this design's choice.
// One of the 80 rounds runs per clock; the message schedule is kept as a
// sliding window of 16 words. Word 0 of the block is bits [511:480].
//
// Interface: pulse `start` with `block` valid; `done` pulses for one cycle
// 81 clock edges after the sampling edge (1 load + 80 rounds) with `digest`
// valid, which then holds until the next `start`.
module sha1_compress (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [159:0] digest
);

  localparam logic [159:0] H0 = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  logic [31:0] w_q [16];
  logic [31:0] a, b, c, d, e;
  logic [6:0]  t_q;
  logic [31:0] f, k, tmp, w_new;

  always_comb begin
    if (t_q < 7'd20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
    else if (t_q < 7'd40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
    else if (t_q < 7'd60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
    else                  begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
    tmp   = {a[26:0], a[31:27]} + f + e + k + w_q[0];
    w_new = w_q[13] ^ w_q[8] ^ w_q[2] ^ w_q[0];
    w_new = {w_new[30:0], w_new[31]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
      {a, b, c, d, e} <= H0;
      t_q    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      digest <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int i = 0; i < 16; i++) w_q[i] <= block[511-32*i -: 32];
          {a, b, c, d, e} <= H0;
          t_q  <= '0;
          busy <= 1'b1;
        end
      end else begin
        for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
        w_q[15] <= w_new;
        e <= d;
        d <= c;
        c <= {b[1:0], b[31:2]};
        b <= a;
        a <= tmp;
        t_q <= t_q + 7'd1;
        if (t_q == 7'd79) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          digest <= {H0[159:128] + tmp, H0[127:96] + a, H0[95:64] + {b[1:0], b[31:2]},
                     H0[63:32] + c, H0[31:0] + d};
        end
      end
    end
  end

endmodule
