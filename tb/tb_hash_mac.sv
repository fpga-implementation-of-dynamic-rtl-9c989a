// tb_hash_mac: drives random columns and message bits into the AND/XOR
// accumulator and compares acc and acc_next with a GF(2) model, including
// the restart on first, the hold while en is low and reset.
module tb_hash_mac;
  logic clk = 0, rst_n = 0, en = 0, first = 0, mbit = 0;
  logic [7:0] col = 0, acc, acc_next;
  logic [7:0] model;
  int checks = 0, failures = 0;

  hash_mac dut (.*);
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
    repeat (2) @(posedge clk);
    #1 check(acc === 8'h00, "reset clears");
    rst_n = 1;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] exp_next;
      col   = 8'($urandom);
      mbit  = 1'($urandom);
      first = ($urandom_range(0, 7) == 0);
      en    = ($urandom_range(0, 3) != 0);
      exp_next = (first ? 8'h00 : model) ^ (mbit ? col : 8'h00);
      #1 check(acc_next === exp_next, $sformatf("acc_next %h exp %h", acc_next, exp_next));
      @(posedge clk);
      if (en) model = exp_next;
      #1 check(acc === model, $sformatf("acc %h exp %h", acc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
