// tb_xor_cipher: the XOR combiner with the published worked example
// (plaintext 00011011 and ciphertext 01100111, i.e. key-stream byte
// 01111100) in both directions, then random bytes, the hold while en is low
// and reset.
module tb_xor_cipher;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] data = 0, ks = 0, dout;
  logic [7:0] expv;
  int checks = 0, failures = 0;

  xor_cipher dut (.*);
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
    @(posedge clk); #1 check(dout === 8'h00, "reset clears");
    rst_n = 1;
    // encryption example
    en = 1; data = 8'b0001_1011; ks = 8'b0111_1100;
    @(posedge clk); #1 check(dout === 8'b0110_0111, "published encryption example");
    // decryption example
    data = 8'b0110_0111;
    @(posedge clk); #1 check(dout === 8'b0001_1011, "published decryption example");
    expv = dout;
    for (int n = 0; n < 2000; n++) begin
      en = 1'($urandom); data = 8'($urandom); ks = 8'($urandom);
      @(posedge clk);
      if (en) begin
        expv = 8'h00;
        for (int b = 0; b < 8; b++) expv[b] = (data[b] != ks[b]);
      end
      #1 check(dout === expv, $sformatf("step %0d got %h exp %h", n, dout, expv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
