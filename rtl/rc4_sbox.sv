// rc4_sbox: the RC4 substitution box S, an M-entry array of bytes.
//
// Three combinational read ports give S[i], S[j] and S[t] (the key-stream
// byte K). Two write operations, never used in the same clock:
//   init_we  writes S[init_addr] = init_addr (initialisation, one entry a
//            clock);
//   swap_we  exchanges S[addr_i] and S[addr_j] in one clock (both entries are
//            written from the old values, so i == j leaves S unchanged).
// M must be a power of two no larger than 256; entries are always a byte wide.
// There is no reset: the controller initialises every entry before use.
//
// The three outputs and the swap follow the published S-box block; doing the
// swap in one clock with a two-write-port array is this design's own choice.
module rc4_sbox
  import dks_pkg::*;
#(
  parameter int unsigned M = 256,
  localparam int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          init_we,
  input  logic [AW-1:0] init_addr,
  input  logic          swap_we,
  input  logic [AW-1:0] addr_i,
  input  logic [AW-1:0] addr_j,
  input  logic [AW-1:0] addr_t,
  output byte_t         si,
  output byte_t         sj,
  output byte_t         st
);

  byte_t s [M];

  always_ff @(posedge clk) begin
    if (init_we) begin
      s[init_addr] <= BYTE_W'(init_addr);
    end else if (swap_we) begin
      s[addr_i] <= s[addr_j];
      s[addr_j] <= s[addr_i];
    end
  end

  assign si = s[addr_i];
  assign sj = s[addr_j];
  assign st = s[addr_t];

endmodule
