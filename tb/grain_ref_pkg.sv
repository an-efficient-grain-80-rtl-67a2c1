// grain_ref_pkg: bit-serial reference model of Grain v1 (Grain-80) for the
// testbenches, written straight from the cipher's definition: one step per
// bit, with the full feedback and output functions evaluated on the current
// state and no precomputation, so it shares no structure with the RTL.
//
// Conventions match the RTL ports: key[79] is k_0, iv[63] is IV_0, and
// z[t] is keystream bit t (t = 0 is the first bit after initialisation).
// KAT_ZERO_KS is the published 80-bit keystream for an all-zero key and IV,
// bytes in order, keystream bit 8*m+b in bit b of byte m.
package grain_ref_pkg;

  localparam logic [79:0] KAT_ZERO_KS = 80'hdee931cf1662a72f77d0;

  // Keystream bit t of the zero-key/zero-IV test vector.
  function automatic bit kat_zero_bit(int t);
    int byte_idx;
    byte_idx = t / 8;
    return KAT_ZERO_KS[(9 - byte_idx) * 8 + (t % 8)];
  endfunction

  class grain_model;
    bit s[80];  // LFSR, s[0] oldest
    bit b[80];  // NFSR, b[0] oldest

    function void load(logic [79:0] key, logic [63:0] iv);
      for (int i = 0; i < 80; i++) b[i] = key[79 - i];
      for (int i = 0; i < 80; i++) s[i] = (i < 64) ? iv[63 - i] : 1'b1;
    endfunction

    function bit h_fn();
      bit x0, x1, x2, x3, x4;
      x0 = s[3]; x1 = s[25]; x2 = s[46]; x3 = s[64]; x4 = b[63];
      return x1 ^ x4 ^ (x0 & x3) ^ (x2 & x3) ^ (x3 & x4) ^ (x0 & x1 & x2) ^
             (x0 & x2 & x3) ^ (x0 & x2 & x4) ^ (x1 & x2 & x4) ^ (x2 & x3 & x4);
    endfunction

    function bit out_bit();
      int a[7] = '{1, 2, 4, 10, 31, 43, 56};
      bit z;
      z = h_fn();
      foreach (a[k]) z ^= b[a[k]];
      return z;
    endfunction

    function bit lfsr_fb();
      return s[62] ^ s[51] ^ s[38] ^ s[23] ^ s[13] ^ s[0];
    endfunction

    function bit nfsr_fb();
      return s[0] ^ b[62] ^ b[60] ^ b[52] ^ b[45] ^ b[37] ^ b[33] ^ b[28] ^ b[21] ^
             b[14] ^ b[9] ^ b[0] ^ (b[63] & b[60]) ^ (b[37] & b[33]) ^ (b[15] & b[9]) ^
             (b[60] & b[52] & b[45]) ^ (b[33] & b[28] & b[21]) ^
             (b[63] & b[45] & b[28] & b[9]) ^ (b[60] & b[52] & b[37] & b[33]) ^
             (b[63] & b[60] & b[21] & b[15]) ^ (b[63] & b[60] & b[52] & b[45] & b[37]) ^
             (b[33] & b[28] & b[21] & b[15] & b[9]) ^
             (b[52] & b[45] & b[37] & b[33] & b[28] & b[21]);
    endfunction

    // One clock of the bit-serial cipher; returns the keystream bit of the
    // state before the step. With init set the bit is fed back.
    function bit step(bit init);
      bit z, fl, fn;
      z  = out_bit();
      fl = lfsr_fb() ^ (init & z);
      fn = nfsr_fb() ^ (init & z);
      for (int i = 0; i < 79; i++) begin
        s[i] = s[i + 1];
        b[i] = b[i + 1];
      end
      s[79] = fl;
      b[79] = fn;
      return z;
    endfunction

    // Full key setup and `n` keystream bits.
    function void keystream(logic [79:0] key, logic [63:0] iv, int n, ref bit z[$]);
      bit unused;
      load(key, iv);
      for (int i = 0; i < 160; i++) unused = step(1'b1);
      z.delete();
      for (int i = 0; i < n; i++) z.push_back(step(1'b0));
    endfunction
  endclass

endpackage
