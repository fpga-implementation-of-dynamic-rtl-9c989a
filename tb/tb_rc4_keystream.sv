// tb_rc4_keystream: RC4 key scheduling and key-stream generation.
//
// Instance u16 (defaults: M = 256, 16-byte key) runs random keys against the
// reference RC4 model, restarts in the middle of a stream, and checks the
// timing: the first byte is offered exactly 3*M + 3 clocks after start and,
// when every byte is taken at once, one byte follows every 4 clocks.
// Instance u3 (3-byte key) must reproduce the well-known RC4 test vector
// for the key "Key": EB 9F 77 81 B7 34 CA 72 A7 19.
module tb_rc4_keystream;
  import dks_ref_pkg::*;

  localparam int unsigned M = 256;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // 16-byte key instance
  logic       start16 = 0, take16 = 0, valid16, busy16;
  logic [3:0] kidx16;
  logic [7:0] ks16, key16 [16];
  rc4_keystream u16 (.clk, .rst_n, .start(start16), .key_idx(kidx16), .key_byte(key16[kidx16]),
                     .ks(ks16), .ks_valid(valid16), .ks_take(take16), .sched_busy(busy16));

  // 3-byte key instance
  logic       start3 = 0, take3 = 0, valid3, busy3;
  logic [1:0] kidx3;
  logic [7:0] ks3;
  logic [7:0] key3 [3] = '{8'h4B, 8'h65, 8'h79};   // "Key"
  rc4_keystream #(.KEY_LEN(3)) u3 (.clk, .rst_n, .start(start3), .key_idx(kidx3),
                     .key_byte(kidx3 < 3 ? key3[kidx3] : 8'h00),
                     .ks(ks3), .ks_valid(valid3), .ks_take(take3), .sched_busy(busy3));

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

  // Starts u16 and returns nbytes key-stream bytes, checking the timing.
  task automatic run16(int nbytes, output logic [7:0] got [$]);
    int cyc, last;
    got = {};
    #1 start16 = 1;
    @(posedge clk); #1 start16 = 0;
    cyc = 0; last = 0;
    while (got.size() < nbytes && cyc < 20000) begin
      take16 = valid16;
      if (valid16) begin
        if (got.size() == 0) check(cyc == 3*M + 3, $sformatf("first byte after %0d clocks", cyc));
        else                 check(cyc - last == 4, $sformatf("byte spacing %0d", cyc - last));
        last = cyc;
        got.push_back(ks16);
      end
      @(posedge clk); #1; cyc++;
      take16 = 0;
    end
    check(got.size() == nbytes, "all bytes delivered");
  endtask

  initial begin
    logic [7:0] got [$], exp_ks [$], kq [$];
    logic [7:0] vec [10] = '{8'hEB, 8'h9F, 8'h77, 8'h81, 8'hB7, 8'h34, 8'hCA, 8'h72, 8'hA7, 8'h19};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(valid16 === 0 && busy16 === 0, "idle after reset");

    // Published RC4 vector on the 3-byte instance, with random take delays.
    start3 = 1; @(posedge clk); #1 start3 = 0;
    check(busy3 === 1, "busy during key scheduling");
    for (int n = 0; n < 10; n++) begin
      int guard;
      guard = 0;
      while (!valid3 && guard < 5000) begin @(posedge clk); #1 guard++; end
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      check(valid3 === 1 && ks3 === vec[n], $sformatf("vector byte %0d got %h exp %h", n, ks3, vec[n]));
      take3 = 1; @(posedge clk); #1 take3 = 0;
    end

    // Random 16-byte keys against the reference model.
    for (int k = 0; k < 4; k++) begin
      kq = {};
      for (int b = 0; b < 16; b++) begin key16[b] = 8'($urandom); kq.push_back(key16[b]); end
      run16(40 + 20*k, got);
      rc4_ref(kq, M, got.size(), exp_ks);
      for (int n = 0; n < got.size(); n++)
        check(got[n] === exp_ks[n], $sformatf("key %0d byte %0d got %h exp %h", k, n, got[n], exp_ks[n]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
