// tb_dks_example: the published worked example run through the complete
// transmitter/receiver link at default parameters. Public key 00001111 and
// plaintext 00011011 go in. The first key after reset is RC4 keyed with the
// first 16 Toeplitz hash values of 00001111; its first key-stream byte is
// 01111100, so the cipher byte must be the published 01100111 and the
// receiver must return 00011011. The reference model must agree. Also
// checked: the first byte can only be accepted after the 901-clock key fill
// and key scheduling.
module tb_dks_example;
  import dks_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] pub_key = 8'b0000_1111, plain_in = 8'b0001_1011, cipher_out, plain_out;
  logic plain_valid = 0, plain_ready, cipher_valid, cipher_fire;
  logic plain_out_valid, plain_out_ready = 1, tx_rekeying, rx_rekeying;
  int checks = 0, failures = 0;

  dks_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] key [$], ks [$];
    int cyc;
    period_key(8'b0000_1111, 0, 16, key);
    rc4_ref(key, 256, 1, ks);
    repeat (2) @(posedge clk);
    #1 rst_n = 1; plain_valid = 1;
    cyc = 0;
    while (!plain_ready && cyc < 3000) begin @(posedge clk); #1 cyc++; end
    check(cyc == 901, $sformatf("first byte accepted after %0d clocks", cyc));
    @(posedge clk); #1 plain_valid = 0;
    check(ks[0] === 8'b0111_1100, $sformatf("reference key-stream byte %b", ks[0]));
    check(cipher_valid && cipher_out === 8'b0110_0111,
          $sformatf("cipher %b exp 01100111", cipher_out));
    cyc = 0;
    while (!plain_out_valid && cyc < 100) begin @(posedge clk); #1 cyc++; end
    check(plain_out === 8'b0001_1011, $sformatf("recovered %b", plain_out));
    $display("key-stream byte %b, cipher %b", ks[0], cipher_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
