// hash_mac: AND-and-accumulate stage of the Toeplitz hash.
//
// Each clock one message bit is multiplied (AND) with every row of the current
// Toeplitz column and the products are accumulated modulo 2 (XOR) into N
// accumulator flip-flops, one per hash bit. This is the GF(2) matrix-vector
// product h = T * m, computed one column per clock.
//
// Interface: when en is high the accumulator takes acc_next. first marks the
// first column of a new hash, which starts the sum from zero instead of the
// old accumulator value. acc_next is the combinational sum including the
// current column, so the last column's sum can be pushed out in the same
// clock. Synchronous active-low reset clears the accumulators.
//
// The AND gates and the XOR accumulators follow the published hash
// architecture; the first/en control is this design's own.
module hash_mac #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic [N-1:0] col,
  input  logic         mbit,
  output logic [N-1:0] acc,
  output logic [N-1:0] acc_next
);

  always_comb acc_next = (first ? '0 : acc) ^ (col & {N{mbit}});

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule
