// tb_rc4_sbox: initialises the 256-entry S-box, checks S[a] = a on all
// three read ports, then performs random swaps (including i == j) and
// compares every read port with an array model.
module tb_rc4_sbox;
  logic clk = 0, init_we = 0, swap_we = 0;
  logic [7:0] init_addr = 0, addr_i = 0, addr_j = 0, addr_t = 0;
  logic [7:0] si, sj, st;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  rc4_sbox dut (.*);
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
    #1;
    for (int a = 0; a < 256; a++) begin
      init_we = 1; init_addr = 8'(a);
      @(posedge clk); #1;
      model[a] = 8'(a);
    end
    init_we = 0;
    for (int a = 0; a < 256; a++) begin
      addr_i = 8'(a); addr_j = 8'(255 - a); addr_t = 8'(a + 7);
      #1 check(si === 8'(a) && sj === 8'(255 - a) && st === 8'(a + 7), $sformatf("init %0d", a));
    end
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] tmp;
      addr_i = 8'($urandom); addr_j = ($urandom_range(0, 9) == 0) ? addr_i : 8'($urandom);
      addr_t = 8'($urandom);
      swap_we = 1'($urandom);
      #1 check(si === model[addr_i] && sj === model[addr_j] && st === model[addr_t],
               $sformatf("read at step %0d", n));
      @(posedge clk);
      if (swap_we) begin
        tmp = model[addr_i]; model[addr_i] = model[addr_j]; model[addr_j] = tmp;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
