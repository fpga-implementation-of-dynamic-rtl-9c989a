// tb_toeplitz_hash: checks the published hash example (message bits
// 1 1 0 0 1 1 1 1, i.e. key 8'hF3, gives 0 1 1 0 1 0 0 0 = 8'h68), then a
// stream of random keys against the reference, with en dropping at random:
// every hash must appear exactly 8 enabled clocks after the previous one and
// equal the reference hash of the key presented at its first column.
module tb_toeplitz_hash;
  import dks_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] pub_key = 0, hash;
  logic hash_valid;
  int checks = 0, failures = 0;

  toeplitz_hash dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_hash;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // Published example: first hash after reset.
    pub_key <= 8'hF3; en <= 1;
    repeat (7) begin @(posedge clk); #1 check(hash_valid === 0, "no early valid"); end
    @(posedge clk); #1;
    check(hash_valid === 1, "valid after 8 clocks");
    check(hash === 8'h68, $sformatf("published example: got %b", hash));
    check(hash === toeplitz_ref(8'hF3, 0), "reference agrees with example");
    n_hash = 1;
    // Random keys, random enable gaps.
    for (int h = 1; h < 150; h++) begin
      logic [7:0] k;
      int en_cnt, valid_seen;
      k = 8'($urandom);
      en_cnt = 0; valid_seen = 0;
      en = 0; pub_key = k;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      while (en_cnt < 8) begin
        logic e;
        e = ($urandom_range(0, 2) != 0);
        en = e;
        @(posedge clk); #1;
        if (e) en_cnt++;
        if (hash_valid) begin
          valid_seen++;
          check(en_cnt == 8, $sformatf("hash %0d valid after %0d enabled clocks", h, en_cnt));
          check(hash === toeplitz_ref(k, h), $sformatf("hash %0d of %h: got %h exp %h", h, k, hash, toeplitz_ref(k, h)));
        end
        // the key may change after the first column was taken
        if (en_cnt == 1) pub_key = 8'($urandom);
      end
      check(valid_seen == 1, "one hash per 8 enabled clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
