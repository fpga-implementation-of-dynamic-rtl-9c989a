// dks_pkg: types and constants shared by the dynamic-key stream cipher.
//
// The Toeplitz hash uses a degree-8 LFSR. Its output sequence a0, a1, ...
// starts from the seed (a0..a7) = 0 1 0 1 0 0 1 0 and continues with the
// recurrence a(k+8) = a(k+6) ^ a(k+5) ^ a(k+4) ^ a(k), which is the sequence
// generated by the feedback polynomial g(y) = y^8 + y^4 + y^3 + y^2 + 1
// (reciprocal tap form). The seed and polynomial follow the published design;
// the tap form was chosen because it reproduces the published 15-bit sequence
// 0 1 0 1 0 0 1 0 1 0 0 0 1 0 0.
//
// rc4_state_e lists the states of the RC4 key-stream controller: S-box
// initialisation, the two-step key setup loop and the three-step pseudo-random
// generation loop.
package dks_pkg;

  localparam int unsigned BYTE_W = 8;
  typedef logic [BYTE_W-1:0] byte_t;

  // LFSR seed: bit k holds a(k).
  localparam logic [7:0] LFSR_SEED = 8'b0100_1010;   // a0=0 a1=1 a2=0 a3=1 a4=0 a5=0 a6=1 a7=0
  // Recurrence taps on the window (bit k = a(n+k)): new a(n+8) = ^(window & LFSR_TAPS)
  localparam logic [7:0] LFSR_TAPS = 8'b0111_0001;   // a(n+6), a(n+5), a(n+4), a(n)

  typedef enum logic [2:0] {
    RC4_IDLE,
    RC4_INIT,       // S[i] = i
    RC4_KSA_J,      // j = j + S[i] + L[i mod l]
    RC4_KSA_SWAP,   // swap S[i], S[j]; i = i + 1
    RC4_PRG_J,      // j = j + S[i]
    RC4_PRG_SWAP,   // swap S[i], S[j]; t = S[i] + S[j]
    RC4_PRG_OUT,    // K = S[t]; i = i + 1
    RC4_PRG_HOLD    // key-stream byte waits for its consumer
  } rc4_state_e;

  typedef enum logic [1:0] {
    DKS_FILL,       // collect fresh hash values into the key box
    DKS_SCHED,      // RC4 key scheduling running
    DKS_RUN         // bytes are encrypted / decrypted
  } dks_state_e;

endpackage
