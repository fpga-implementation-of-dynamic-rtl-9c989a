// dks_cipher: one dynamic-key stream cipher unit (encryptor or decryptor).
//
// The public key goes through the Toeplitz hash (toeplitz_hash); KEY_LEN
// successive hash values fill the key box (key_box); RC4 (rc4_keystream)
// schedules that key and then produces the hardware key stream, which
// xor_cipher combines with the data. After REKEY_BYTES data bytes the unit
// replenishes the key: it fills the key box with fresh hash values and runs
// the RC4 key scheduling again. Because the hash LFSR is never reset, the
// fresh hash values differ from the previous ones even when the public key
// has not changed, so every period of REKEY_BYTES bytes uses a new key.
//
// Encryption and decryption are the same operation. Two units fed with the
// same public key produce the same key-stream sequence byte for byte, because
// the hash only advances while the key box is being filled and every step is
// counted in data bytes, not in clocks.
//
// Operating states: FILL (the hash runs for KEY_LEN*8 clocks, one column a
// clock, and the last hash is written one clock later), SCHED (RC4
// initialisation and key setup, 3*M clocks, plus 3 for the first key-stream
// byte), RUN (one data byte per key-stream byte, at best one every 4 clocks).
// A rekey therefore stalls the data for KEY_LEN*8 + 3*M + 5 clocks (901 at
// the defaults) between the last byte of one period and the first of the
// next.
//
// Interface: din/din_valid/din_ready and dout/dout_valid/dout_ready are
// valid-ready pairs; a byte moves when valid and ready are both high at a
// clock edge. din_ready is low while the key is being replenished, which
// stalls the sender. rekeying is high outside RUN. Synchronous active-low
// reset.
//
// Follows the published design: hash -> key box -> RC4 -> XOR, and a key
// stream replenished every n bytes from a hash of the public key. The value
// of n, the key length, the handshakes and the state sequencing are this
// design's own choices. With the 16-byte key, public key 00001111 and
// plaintext 00011011 give ciphertext 01100111 in the first period, which is
// the published worked example.
module dks_cipher
  import dks_pkg::*;
#(
  parameter int unsigned M           = 256,
  parameter int unsigned KEY_LEN     = 16,
  parameter int unsigned REKEY_BYTES = 256,
  localparam int unsigned KW = (KEY_LEN > 1) ? $clog2(KEY_LEN) : 1,
  localparam int unsigned BW = $clog2(REKEY_BYTES + 1),
  localparam int unsigned FILL_COLS = KEY_LEN * BYTE_W,
  localparam int unsigned CW = $clog2(FILL_COLS + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t pub_key,
  input  byte_t din,
  input  logic  din_valid,
  output logic  din_ready,
  output byte_t dout,
  output logic  dout_valid,
  input  logic  dout_ready,
  output logic  rekeying
);

  dks_state_e    state;
  logic [KW-1:0] fill_idx;
  logic [BW-1:0] byte_cnt;
  logic [CW-1:0] col_cnt;       // hash columns taken in this fill
  logic          hash_en, hash_valid, rc4_start, fire, sched_busy;
  byte_t         hash, key_byte, ks;
  logic [KW-1:0] key_idx;
  logic          ks_valid;

  // The hash runs for exactly KEY_LEN hashes per fill, so every fill starts
  // on a hash boundary.
  assign hash_en   = (state == DKS_FILL) && (col_cnt != CW'(FILL_COLS));
  assign rc4_start = (state == DKS_FILL) && hash_valid && (fill_idx == KW'(KEY_LEN - 1));
  assign din_ready = (state == DKS_RUN) && ks_valid && (!dout_valid || dout_ready);
  assign fire      = din_valid && din_ready;
  assign rekeying  = (state != DKS_RUN);

  toeplitz_hash #(.X(BYTE_W), .Y(BYTE_W)) u_hash (
    .clk, .rst_n, .en(hash_en), .pub_key, .hash, .hash_valid
  );

  key_box #(.KEY_LEN(KEY_LEN)) u_kbox (
    .clk, .rst_n,
    .we((state == DKS_FILL) && hash_valid), .waddr(fill_idx), .wdata(hash),
    .raddr(key_idx), .rdata(key_byte)
  );

  rc4_keystream #(.M(M), .KEY_LEN(KEY_LEN)) u_rc4 (
    .clk, .rst_n, .start(rc4_start),
    .key_idx, .key_byte,
    .ks, .ks_valid, .ks_take(fire), .sched_busy
  );

  xor_cipher u_xor (
    .clk, .rst_n, .en(fire), .data(din), .ks, .dout
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= DKS_FILL;
      fill_idx   <= '0;
      col_cnt    <= '0;
      byte_cnt   <= '0;
      dout_valid <= 1'b0;
    end else begin
      if (fire)            dout_valid <= 1'b1;
      else if (dout_ready) dout_valid <= 1'b0;

      unique case (state)
        DKS_FILL: begin
          if (hash_en) col_cnt <= col_cnt + 1'b1;
          if (hash_valid) begin
            fill_idx <= (fill_idx == KW'(KEY_LEN - 1)) ? '0 : fill_idx + 1'b1;
            if (rc4_start) begin
              col_cnt <= '0;
              state   <= DKS_SCHED;
            end
          end
        end
        DKS_SCHED: if (ks_valid && !sched_busy) state <= DKS_RUN;
        DKS_RUN: if (fire) begin
          if (byte_cnt == BW'(REKEY_BYTES - 1)) begin
            byte_cnt <= '0;
            state    <= DKS_FILL;
          end else begin
            byte_cnt <= byte_cnt + 1'b1;
          end
        end
        default: state <= DKS_FILL;
      endcase
    end
  end

  // An offered output byte stays valid and unchanged until it is taken.
  a_dout_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dout_valid && !dout_ready |=> dout_valid && $stable(dout));

endmodule
