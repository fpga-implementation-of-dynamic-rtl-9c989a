// key_box: register file that holds the RC4 key L (the "K-box").
//
// KEY_LEN bytes, each written from the hash output. One synchronous write
// port (we, waddr, wdata) and one combinational read port (raddr -> rdata)
// that the RC4 key setup reads as L[i mod KEY_LEN]. Reset clears all bytes.
//
// The published design names this block and feeds it with the hash value; its
// size (16 bytes, the top of the 5..16 byte range the design quotes for RC4
// keys) and the port structure are this design's own choices.
module key_box
  import dks_pkg::*;
#(
  parameter int unsigned KEY_LEN = 16,
  localparam int unsigned AW = (KEY_LEN > 1) ? $clog2(KEY_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  byte_t         wdata,
  input  logic [AW-1:0] raddr,
  output byte_t         rdata
);

  byte_t mem [KEY_LEN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < KEY_LEN; k++) mem[k] <= '0;
    end else if (we && (int'(waddr) < KEY_LEN)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < KEY_LEN) ? mem[raddr] : '0;

endmodule
