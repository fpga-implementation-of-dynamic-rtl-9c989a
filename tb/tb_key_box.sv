// tb_key_box: random writes and reads of the 16-byte key register file
// against an array model, including reset clearing and write enable.
module tb_key_box;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  key_box dut (.*);
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
    // preload junk before reset so reset has something to clear
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      #1 we = 1; waddr = 4'(k); wdata = 8'hA5 ^ 8'(k);
      @(posedge clk);
    end
    #1 we = 0; rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    foreach (model[k]) model[k] = 8'h00;
    for (int k = 0; k < 16; k++) begin
      raddr = 4'(k); #1 check(rdata === 8'h00, $sformatf("reset clears %0d", k));
    end
    for (int n = 0; n < 3000; n++) begin
      we = 1'($urandom); waddr = 4'($urandom); wdata = 8'($urandom); raddr = 4'($urandom);
      #1 check(rdata === model[raddr], $sformatf("read %0d got %h exp %h", raddr, rdata, model[raddr]));
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
