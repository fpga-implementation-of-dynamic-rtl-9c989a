// dks_ref_pkg: reference models used by the testbenches, written from the
// algorithm definitions rather than from the RTL.
//
//   lfsr_seq(n)         element a(n) of the hash LFSR sequence, from the seed
//                       0 1 0 1 0 0 1 0 and g(y) = y^8 + y^4 + y^3 + y^2 + 1
//   toeplitz_ref(k, n)  the n-th hash value (n = 0, 1, ...) of message byte k:
//                       h[r] = XOR over c of a(8n + 7 - r + c) & k[c]
//   period_key(k,p,l)   the l-byte RC4 key of rekey period p: hash values
//                       p*l .. p*l + l - 1 of public key k
//   rc4_ref             textbook RC4: key scheduling with key[i mod len],
//                       then the key stream; M is a power of two <= 256
package dks_ref_pkg;

  // a(k+8) = a(k+6) ^ a(k+5) ^ a(k+4) ^ a(k)
  function automatic bit lfsr_seq(int unsigned n);
    bit a [$];
    a = '{0, 1, 0, 1, 0, 0, 1, 0};
    while (a.size() <= n) begin
      int unsigned k = a.size() - 8;
      a.push_back(a[k+6] ^ a[k+5] ^ a[k+4] ^ a[k]);
    end
    return a[n];
  endfunction

  function automatic logic [7:0] toeplitz_ref(logic [7:0] key, int unsigned n);
    logic [7:0] h = '0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        h[r] ^= lfsr_seq(8*n + 7 - r + c) & key[c];
    return h;
  endfunction

  // Fills ks with nbytes key-stream bytes of RC4 over an M-entry S-box.
  function automatic void rc4_ref(input logic [7:0] key [$], input int unsigned M,
                                  input int unsigned nbytes, output logic [7:0] ks [$]);
    logic [7:0] s [256];
    int unsigned i, j, t;
    logic [7:0] tmp;
    ks = {};
    for (i = 0; i < M; i++) s[i] = 8'(i);
    j = 0;
    for (i = 0; i < M; i++) begin
      j = (j + s[i] + key[i % key.size()]) % M;
      tmp = s[i]; s[i] = s[j]; s[j] = tmp;
    end
    i = 0; j = 0;
    repeat (nbytes) begin
      i = (i + 1) % M;
      j = (j + s[i]) % M;
      tmp = s[i]; s[i] = s[j]; s[j] = tmp;
      t = (s[i] + s[j]) % M;
      ks.push_back(s[t]);
    end
  endfunction

  function automatic void period_key(input logic [7:0] pk, input int unsigned p,
                                     input int unsigned key_len, output logic [7:0] key [$]);
    key = {};
    for (int unsigned b = 0; b < key_len; b++) key.push_back(toeplitz_ref(pk, p*key_len + b));
  endfunction

endpackage
