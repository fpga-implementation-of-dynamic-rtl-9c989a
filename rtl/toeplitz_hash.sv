// toeplitz_hash: LFSR-based Toeplitz hash of the public key (the dynamic key
// generator).
//
// The public key byte is captured into a shift register and shifted right, so
// key bit c is the message bit of matrix column c (least significant bit
// first). The LFSR supplies the column, hash_mac ANDs it with the message bit
// and accumulates it, and a 3-bit control unit counts the Y columns of one
// hash. On the last column the finished sum is pushed into the output
// register through its load multiplexer and hash_valid pulses for one clock,
// so a new hash value appears every Y enabled clocks.
//
// The LFSR is not reset between hashes. It keeps running across hash
// computations, so the same public key gives a different hash value each
// time: this is what makes the key dynamic. With the reset seed, the first
// hash of public key 8'hF3 (message bits m0..m7 = 1 1 0 0 1 1 1 1) is 8'h68
// (hash bits h7..h0 = 0 1 1 0 1 0 0 0).
//
// Interface: en advances the whole unit by one column; while en is low
// nothing changes, so the hash sequence depends only on how many hash values
// were taken, not on when. rst_n is synchronous and active low.
//
// Follows the published architecture (LFSR, AND gates, MAC, control unit,
// output multiplexer and register). The bit order of key and hash and the en
// input are this design's own choices.
module toeplitz_hash
  import dks_pkg::*;
#(
  parameter int unsigned X = 8,   // hash length in bits (LFSR degree)
  parameter int unsigned Y = 8    // message length in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [Y-1:0] pub_key,
  output logic [X-1:0] hash,
  output logic         hash_valid
);

  localparam int unsigned CW = (Y > 1) ? $clog2(Y) : 1;

  logic [CW-1:0] cnt;          // control unit: column counter
  logic [Y-1:0]  msg;          // message shift register
  logic [X-1:0]  col;
  logic [X-1:0]  acc_next;
  logic          first, last, mbit;

  assign first = (cnt == '0);
  assign last  = (cnt == CW'(Y - 1));
  // On the first column the key is taken straight from the input.
  assign mbit  = first ? pub_key[0] : msg[0];

  toeplitz_lfsr #(.N(X)) u_lfsr (
    .clk, .rst_n, .load(1'b0), .en, .col, .window()
  );

  hash_mac #(.N(X)) u_mac (
    .clk, .rst_n, .en, .first, .col, .mbit, .acc(), .acc_next
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      msg        <= '0;
      hash       <= '0;
      hash_valid <= 1'b0;
    end else begin
      hash_valid <= 1'b0;
      if (en) begin
        cnt <= last ? '0 : cnt + 1'b1;
        msg <= first ? (pub_key >> 1) : (msg >> 1);
        if (last) begin
          hash       <= acc_next;
          hash_valid <= 1'b1;
        end
      end
    end
  end

endmodule
