// tb_dks_top: end-to-end test of the transmitter/receiver link at the
// default parameters (M = 256, 16-byte key, rekey every 256 bytes).
//
// 700 random plaintext bytes go in with random gaps; the recovered plaintext
// is drained with random back-pressure. Checked: every recovered byte equals
// the plaintext byte in order; every cipher byte on the link equals the
// plaintext XOR the reference key stream of its period (RC4 keyed with 16
// Toeplitz hash values of the public key); the public key changes between
// periods and both ends follow. Each mechanism must occur at least once and
// is counted: key replenishment on both ends, sender stalls during a rekey,
// back-pressure from the receiver output, and a public key change.
module tb_dks_top;
  import dks_ref_pkg::*;

  localparam int unsigned M = 256, KEY_LEN = 16, REKEY = 256;
  localparam int unsigned NBYTES = 700;

  logic clk = 0, rst_n = 0;
  logic [7:0] pub_key = 8'hF3, plain_in = 0, cipher_out, plain_out;
  logic plain_valid = 0, plain_ready, cipher_valid, cipher_fire;
  logic plain_out_valid, plain_out_ready = 0, tx_rekeying, rx_rekeying;
  int checks = 0, failures = 0;

  dks_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference key stream, one period at a time.
  logic [7:0] period_pk [$];
  logic [7:0] ks_cache [$];
  int cached_period = -1;
  function automatic logic [7:0] ref_ks(int n);
    logic [7:0] key [$];
    int p = n / REKEY;
    if (p != cached_period) begin
      period_key(period_pk[p], p, KEY_LEN, key);
      rc4_ref(key, M, REKEY, ks_cache);
      cached_period = p;
    end
    return ks_cache[n % REKEY];
  endfunction

  logic [7:0] plain_q [$], cipher_q [$];
  int in_bytes = 0, link_bytes = 0, out_bytes = 0;
  int tx_rekeys = 0, rx_rekeys = 0, stalls = 0, backpressure = 0, key_changes = 0;
  logic tx_rk_d = 1, rx_rk_d = 1;

  always @(posedge clk) if (rst_n) begin
    if (tx_rekeying && !tx_rk_d) begin period_pk.push_back(pub_key); tx_rekeys++; end
    if (rx_rekeying && !rx_rk_d) rx_rekeys++;
    tx_rk_d <= tx_rekeying;
    rx_rk_d <= rx_rekeying;
    if (plain_valid && !plain_ready && tx_rekeying) stalls++;
    if (plain_valid && plain_ready) begin
      plain_q.push_back(plain_in);
      cipher_q.push_back(plain_in ^ ref_ks(in_bytes));
      in_bytes++;
    end
    if (cipher_fire) begin
      check(cipher_q.size() > 0 && cipher_out === cipher_q[0],
            $sformatf("cipher byte %0d got %h exp %h", link_bytes, cipher_out, cipher_q.size() > 0 ? cipher_q[0] : 8'h00));
      if (cipher_q.size() > 0) void'(cipher_q.pop_front());
      link_bytes++;
    end
    if (plain_out_valid && !plain_out_ready) backpressure++;
    if (plain_out_valid && plain_out_ready) begin
      check(plain_q.size() > 0 && plain_out === plain_q[0],
            $sformatf("plain byte %0d got %h exp %h", out_bytes, plain_out, plain_q.size() > 0 ? plain_q[0] : 8'h00));
      if (plain_q.size() > 0) void'(plain_q.pop_front());
      out_bytes++;
    end
  end

  logic fire_now;
  int   last_change;

  initial begin
    period_pk.push_back(pub_key);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last_change = -1;
    while (out_bytes < NBYTES) begin
      if (!plain_valid && in_bytes < NBYTES && $urandom_range(0, 3) != 0) begin
        plain_valid = 1; plain_in = 8'($urandom);
      end
      plain_out_ready = ($urandom_range(0, 5) != 0);
      // new public key once per period, while both ends are running
      if (!tx_rekeying && in_bytes / REKEY != last_change) begin
        pub_key = 8'($urandom);
        last_change = in_bytes / REKEY;
        key_changes++;
      end
      #1 fire_now = plain_valid && plain_ready;
      @(posedge clk); #1;
      if (fire_now) plain_valid = 0;
    end
    repeat (5) @(posedge clk);
    $display("tx_rekeys=%0d rx_rekeys=%0d stalls=%0d backpressure=%0d key_changes=%0d bytes=%0d",
             tx_rekeys, rx_rekeys, stalls, backpressure, key_changes, out_bytes);
    check(tx_rekeys >= 2, "transmitter replenished its key");
    check(rx_rekeys == tx_rekeys, "receiver rekeyed in step");
    check(stalls > 0, "sender stalled during a rekey");
    check(backpressure > 0, "receiver output back-pressure");
    check(key_changes > 0, "public key changed");
    check(in_bytes == NBYTES && link_bytes == NBYTES && plain_q.size() == 0, "all bytes through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
