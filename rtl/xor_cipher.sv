// xor_cipher: the XOR combiner of the stream cipher.
//
// out = data ^ key-stream byte. The same unit encrypts (C = P ^ K) and
// decrypts (P = C ^ K) because XOR is its own inverse. The result is
// registered: when en is high, dout takes data ^ ks at the clock edge.
// Synchronous active-low reset clears dout.
//
// The XOR follows the published design; the output register is this design's
// own choice.
module xor_cipher
  import dks_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  byte_t data,
  input  byte_t ks,
  output byte_t dout
);

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= data ^ ks;
  end

endmodule
