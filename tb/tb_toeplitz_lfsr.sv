// tb_toeplitz_lfsr: checks the hash LFSR against the published 15-bit output
// sequence, the published 8x8 Toeplitz matrix (column by column), the
// reference recurrence over 600 steps, the hold (en low) and reload
// behaviour, and the maximal period of 255 steps.
module tb_toeplitz_lfsr;
  import dks_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0] col, window;
  int checks = 0, failures = 0;

  // Published sequence a0..a14 and matrix rows (row 0 first, column 0 left).
  localparam bit [14:0] SEQ = 15'b010100101000100;           // a0 is the leftmost
  localparam logic [7:0] ROWS [8] = '{8'b01000100, 8'b10100010, 8'b01010001, 8'b00101000,
                                      8'b10010100, 8'b01001010, 8'b10100101, 8'b01010010};

  toeplitz_lfsr dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // Column c of the published matrix: bit r = ROWS[r][7-c]
    for (int c = 0; c < 8; c++) begin
      logic [7:0] exp_col;
      for (int r = 0; r < 8; r++) exp_col[r] = ROWS[r][7-c];
      check(col === exp_col, $sformatf("matrix column %0d: got %b exp %b", c, col, exp_col));
      check(window[0] === SEQ[14-c], $sformatf("sequence a%0d", c));
      en = 1; @(posedge clk); #1; en = 0;
    end
    // a8..a14 via window[0] after 8 steps (window bit 0 is a(n))
    for (int c = 8; c < 15; c++) begin
      check(window[0] === SEQ[14-c], $sformatf("sequence a%0d", c));
      en = 1; @(posedge clk); #1; en = 0;
    end
    // Hold: en low
    begin
      logic [7:0] w0;
      w0 = window;
      repeat (5) @(posedge clk);
      #1 check(window === w0, "hold while en low");
    end
    // Reload
    load = 1; en = 1; @(posedge clk); #1; load = 0; en = 0;
    check(window === 8'b01001010, "reload seed");
    // Long run against the recurrence
    for (int n = 0; n < 600; n++) begin
      logic [7:0] exp_w;
      for (int k = 0; k < 8; k++) exp_w[k] = lfsr_seq(n + k);
      check(window === exp_w, $sformatf("window at step %0d", n));
      en = 1; @(posedge clk); #1; en = 0;
    end
    // Period: 255 steps from the seed return to it, and not before
    load = 1; @(posedge clk); #1; load = 0;
    en = 1;
    begin
      int steps;
      steps = 0;
      do begin @(posedge clk); #1; steps++; end while (window !== 8'b01001010 && steps < 300);
      check(steps == 255, $sformatf("period %0d", steps));
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
