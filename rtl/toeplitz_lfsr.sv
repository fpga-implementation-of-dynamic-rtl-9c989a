// toeplitz_lfsr: LFSR that produces one column of the Toeplitz hash matrix per
// clock.
//
// An 8-stage register holds a window of the LFSR sequence, bit k = a(n+k).
// Every enabled clock the window moves one step along the sequence: the
// register shifts towards bit 0 and the new element a(n+8), the XOR of the
// tapped stages, enters at bit 7. Column n of the Toeplitz matrix is
// T[r][n] = a(7-r+n), so the column is the window read in reverse order:
// col[r] = window[7-r]. Seen as a column, each new one is the previous column
// moved down one row with the new sequence element on top, which is how the
// published design describes the matrix.
//
// Interface: load (synchronous, has priority over en) puts SEED into the
// window; en advances it. rst_n is an active-low synchronous reset that also
// loads SEED. col is combinational from the register.
//
// Follows the published design: the degree-8 polynomial, the seed and the
// column construction. The load input and the reset polarity are this
// design's own choices.
module toeplitz_lfsr
  import dks_pkg::*;
#(
  parameter int unsigned     N    = 8,
  parameter logic [N-1:0]    SEED = LFSR_SEED,
  parameter logic [N-1:0]    TAPS = LFSR_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [N-1:0] col,      // col[r] = row r of the current matrix column
  output logic [N-1:0] window    // window[k] = a(n+k)
);

  always_ff @(posedge clk) begin
    if (!rst_n || load) window <= SEED;
    else if (en)        window <= {^(window & TAPS), window[N-1:1]};
  end

  always_comb begin
    for (int r = 0; r < N; r++) col[r] = window[N-1-r];
  end

endmodule
