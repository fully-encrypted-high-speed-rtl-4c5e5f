// rc2_ref_pkg: reference model of RC2-64 for the testbenches.
//
// A plain sequential rendering of the RFC 2268 encryption and decryption
// loops (one key index j walking 0..63 or 63..0), written separately from
// the pipelined round functions so that the testbenches check the hardware
// against an independent model. Block layout: R[i] = block[16*i +: 16].
package rc2_ref_pkg;

  function automatic logic [63:0] ref_encrypt(logic [63:0] blk, logic [63:0][15:0] k);
    logic [15:0] r[4];
    int j;
    int s[4] = '{1, 2, 3, 5};
    for (int i = 0; i < 4; i++) r[i] = blk[16*i +: 16];
    j = 0;
    for (int rnd = 0; rnd < 16; rnd++) begin
      for (int i = 0; i < 4; i++) begin
        logic [15:0] a, b, c, t;
        a = r[(i+3)%4]; b = r[(i+2)%4]; c = r[(i+1)%4];
        t = r[i] + k[j] + (a & b) + (~a & c);
        j++;
        r[i] = (t << s[i]) | (t >> (16 - s[i]));
      end
      if (rnd == 4 || rnd == 10)
        for (int i = 0; i < 4; i++) r[i] = r[i] + k[r[(i+3)%4] & 16'h3f];
    end
    return {r[3], r[2], r[1], r[0]};
  endfunction

  function automatic logic [63:0] ref_decrypt(logic [63:0] blk, logic [63:0][15:0] k);
    logic [15:0] r[4];
    int j;
    int s[4] = '{1, 2, 3, 5};
    for (int i = 0; i < 4; i++) r[i] = blk[16*i +: 16];
    j = 63;
    for (int rnd = 15; rnd >= 0; rnd--) begin
      for (int i = 3; i >= 0; i--) begin
        logic [15:0] a, b, c, t;
        t = (r[i] >> s[i]) | (r[i] << (16 - s[i]));
        a = r[(i+3)%4]; b = r[(i+2)%4]; c = r[(i+1)%4];
        r[i] = t - k[j] - (a & b) - (~a & c);
        j--;
      end
      if (rnd == 11 || rnd == 5)
        for (int i = 3; i >= 0; i--) r[i] = r[i] - k[r[(i+3)%4] & 16'h3f];
    end
    return {r[3], r[2], r[1], r[0]};
  endfunction

  // A fixed pseudo-random expanded key derived from a seed.
  function automatic logic [63:0][15:0] ref_key(int unsigned seed);
    logic [63:0][15:0] k;
    logic [31:0] x;
    x = seed ^ 32'h9E37_79B9;
    for (int i = 0; i < 64; i++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      k[i] = x[31:16];
    end
    return k;
  endfunction

endpackage
