// sha1_ref_pkg -- reference SHA-1 compression of one 512-bit block, and the
// 128-bit tree-node hash derived from it, for testbenches.
package sha1_ref_pkg;

  function automatic logic [159:0] sha1_block(logic [511:0] blk);
    logic [31:0] w [80];
    logic [31:0] h [5];
    logic [31:0] a, b, c, d, e, f, k, t;
    h = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
    for (int i = 0; i < 16; i++) w[i] = blk[511-32*i -: 32];
    for (int i = 16; i < 80; i++) begin
      t = w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16];
      w[i] = {t[30:0], t[31]};
    end
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
    for (int i = 0; i < 80; i++) begin
      if (i < 20)      begin f = (b & c) | ((~b) & d);        k = 32'h5A827999; end
      else if (i < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
      else if (i < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
      else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
      t = {a[26:0], a[31:27]} + f + e + k + w[i];
      e = d; d = c; c = {b[1:0], b[31:2]}; b = a; a = t;
    end
    return {h[0] + a, h[1] + b, h[2] + c, h[3] + d, h[4] + e};
  endfunction

  function automatic logic [127:0] node_hash(logic [511:0] blk);
    logic [159:0] d;
    d = sha1_block(blk);
    return d[159:32];
  endfunction

endpackage
