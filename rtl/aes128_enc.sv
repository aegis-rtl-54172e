// aes128_enc -- iterative AES-128 block encryption (FIPS-197).
//
// Generates one 128-bit pad chunk of the memory-encryption unit. The cipher
// is the standard one; the architecture only names it. This implementation
// is iterative: the initial AddRoundKey is applied when `start` is sampled,
// then one full round (SubBytes, ShiftRows, MixColumns except in the last
// round, AddRoundKey) is done per clock while the next round key is expanded
// on the fly. The S-box is computed (multiplicative inverse in GF(2^8) as
// x^254 followed by the affine map), so no table is stored.
//
// Interface: pulse `start` with `key` and `din` valid; `busy` is high while
// rounds run; `done` pulses for one cycle with `dout` valid. Latency: `done`
// rises 10 clock edges after the edge that sampled `start`; `dout` holds
// until the next `start`. A `start` while busy is ignored.
// Byte 0 of a 128-bit word is bits [127:120], as in FIPS-197.
module aes128_enc (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv, sq, b;
    // x^254 = x^-1 in GF(2^8) (0 maps to 0); 254 = 0b11111110
    inv = 8'h01;
    sq  = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) inv = gmul(inv, sq);
      sq = gmul(sq, sq);
    end
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^
           {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sbox(w3[23:16]), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    t  = t ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic [127:0] rk,
                                            input logic last);
    logic [7:0] a [16];
    logic [7:0] b [16];
    logic [127:0] r;
    for (int i = 0; i < 16; i++) a[i] = sbox(s[127-8*i -: 8]);
    // ShiftRows: row r of column c takes the byte of column c+r
    for (int c = 0; c < 4; c++)
      for (int rr = 0; rr < 4; rr++)
        b[rr + 4*c] = a[rr + 4*((c + rr) % 4)];
    if (!last) begin
      for (int c = 0; c < 4; c++) begin
        logic [7:0] s0, s1, s2, s3;
        s0 = b[4*c]; s1 = b[4*c+1]; s2 = b[4*c+2]; s3 = b[4*c+3];
        b[4*c]   = xtime(s0) ^ (xtime(s1) ^ s1) ^ s2 ^ s3;
        b[4*c+1] = s0 ^ xtime(s1) ^ (xtime(s2) ^ s2) ^ s3;
        b[4*c+2] = s0 ^ s1 ^ xtime(s2) ^ (xtime(s3) ^ s3);
        b[4*c+3] = (xtime(s0) ^ s0) ^ s1 ^ s2 ^ xtime(s3);
      end
    end
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = b[i];
    return r ^ rk;
  endfunction

  logic [127:0] state_q, rk_q;
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;   // round about to be executed, 1..10
  logic [127:0] rk_next;

  assign rk_next = next_key(rk_q, rcon_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= din ^ key;
          rk_q    <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= round_fn(state_q, rk_next, round_q == 4'd10);
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;

endmodule
