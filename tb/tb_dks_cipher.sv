// tb_dks_cipher: one cipher unit with a short rekey period (20 bytes).
//
// Random data with random valid gaps and random output back-pressure; the
// public key changes at random while the unit is running. Every output byte
// must equal its input byte XOR the reference key stream: RC4 keyed with the
// 16 Toeplitz hash values of the public key that belong to the current
// period. Also checked: four or more rekeys happen, each one stalls the input
// for exactly KEY_LEN*8 + 3*M + 5 clocks, and the input is refused while
// rekeying.
module tb_dks_cipher;
  import dks_ref_pkg::*;

  localparam int unsigned M = 256, KEY_LEN = 16, REKEY = 20;
  localparam int unsigned NBYTES = 110;

  logic clk = 0, rst_n = 0;
  logic [7:0] pub_key = 8'h3C, din = 0, dout;
  logic din_valid = 0, din_ready, dout_valid, dout_ready = 0, rekeying;
  int checks = 0, failures = 0;

  dks_cipher #(.REKEY_BYTES(REKEY)) dut (.*);
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

  // Scoreboard
  logic [7:0] exp_q [$];
  logic [7:0] ks_q [$];
  logic [7:0] period_pk [$];
  int in_bytes = 0, out_bytes = 0, rekeys = 0, stalls = 0, backpressure = 0;
  int rk_len = 0;
  logic rekeying_d = 1;

  // Reference key stream for the byte with global index n.
  function automatic logic [7:0] ref_ks(int n);
    logic [7:0] key [$], ks [$];
    int p = n / REKEY;
    period_key(period_pk[p], p, KEY_LEN, key);
    rc4_ref(key, M, REKEY, ks);
    return ks[n % REKEY];
  endfunction

  always @(posedge clk) if (rst_n) begin
    // the public key of a period is the one present when its fill starts
    if (rekeying && !rekeying_d) period_pk.push_back(pub_key);
    if (rekeying) rk_len++;
    if (!rekeying && rekeying_d && period_pk.size() > 1) begin
      rekeys++;
      check(rk_len == KEY_LEN*8 + 3*M + 5, $sformatf("rekey stall %0d clocks", rk_len));
    end
    if (!rekeying) rk_len = 0;
    rekeying_d <= rekeying;
    if (din_valid && rekeying) begin
      stalls++;
      check(!din_ready, "input refused while rekeying");
    end
    if (din_valid && din_ready) begin
      exp_q.push_back(din ^ ref_ks(in_bytes));
      in_bytes++;
    end
    if (dout_valid && !dout_ready) backpressure++;
    if (dout_valid && dout_ready) begin
      check(exp_q.size() > 0 && dout === exp_q[0],
            $sformatf("byte %0d got %h exp %h", out_bytes, dout, exp_q.size() > 0 ? exp_q[0] : 8'h00));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      out_bytes++;
    end
  end

  logic fire_now;

  initial begin
    period_pk.push_back(8'h3C);   // key present at reset
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (out_bytes < NBYTES) begin
      // offer a byte until it is taken
      if (!din_valid && in_bytes < NBYTES && $urandom_range(0, 3) != 0) begin
        din_valid = 1; din = 8'($urandom);
      end
      dout_ready = ($urandom_range(0, 4) != 0);
      if (!rekeying && $urandom_range(0, 30) == 0) pub_key = 8'($urandom);
      #1 fire_now = din_valid && din_ready;
      @(posedge clk); #1;
      if (fire_now) din_valid = 0;
    end
    check(rekeys >= 4, $sformatf("rekeys %0d", rekeys));
    check(stalls > 0, "sender stalled during rekey");
    check(backpressure > 0, "output back-pressure exercised");
    check(in_bytes == NBYTES && exp_q.size() == 0, "all bytes out");
    $display("rekeys=%0d stalls=%0d backpressure=%0d bytes=%0d", rekeys, stalls, backpressure, out_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
