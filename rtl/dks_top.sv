// dks_top: a dynamic-key stream cipher link, transmitter and receiver.
//
// The transmitter (a dks_cipher unit) encrypts plain_in with a key stream
// derived from the public key; the cipher bytes go over the link (brought out
// on cipher_out) to the receiver, an identical dks_cipher unit that derives
// the same key stream from the same public key and decrypts them back to
// plain_out. Both units replenish their key every REKEY_BYTES bytes from new
// hash values of the public key, in step with each other.
//
// Interface: plain_in/plain_valid/plain_ready in, plain_out/plain_out_valid/
// plain_out_ready out (valid-ready pairs). cipher_out/cipher_valid show every
// byte the transmitter sends, cipher_fire marks the clock it is taken by the
// receiver. tx_rekeying and rx_rekeying are high while a unit replenishes its
// key. Synchronous active-low reset.
//
// Follows the published encryption/decryption model: the same hash and RC4
// key generation on both sides with XOR for encryption and decryption. Placing
// both ends in one top with a direct link is this design's own choice.
module dks_top
  import dks_pkg::*;
#(
  parameter int unsigned M           = 256,
  parameter int unsigned KEY_LEN     = 16,
  parameter int unsigned REKEY_BYTES = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t pub_key,
  input  byte_t plain_in,
  input  logic  plain_valid,
  output logic  plain_ready,
  output byte_t cipher_out,
  output logic  cipher_valid,
  output logic  cipher_fire,
  output byte_t plain_out,
  output logic  plain_out_valid,
  input  logic  plain_out_ready,
  output logic  tx_rekeying,
  output logic  rx_rekeying
);

  logic rx_ready;

  dks_cipher #(.M(M), .KEY_LEN(KEY_LEN), .REKEY_BYTES(REKEY_BYTES)) u_tx (
    .clk, .rst_n, .pub_key,
    .din(plain_in), .din_valid(plain_valid), .din_ready(plain_ready),
    .dout(cipher_out), .dout_valid(cipher_valid), .dout_ready(rx_ready),
    .rekeying(tx_rekeying)
  );

  dks_cipher #(.M(M), .KEY_LEN(KEY_LEN), .REKEY_BYTES(REKEY_BYTES)) u_rx (
    .clk, .rst_n, .pub_key,
    .din(cipher_out), .din_valid(cipher_valid), .din_ready(rx_ready),
    .dout(plain_out), .dout_valid(plain_out_valid), .dout_ready(plain_out_ready),
    .rekeying(rx_rekeying)
  );

  assign cipher_fire = cipher_valid && rx_ready;

endmodule
