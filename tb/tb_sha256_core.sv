// tb_sha256_core: self-checking test of the SHA-256 engine.
//
// The bench pads messages itself (a 1 bit, zeros, the 64-bit bit length) and feeds the blocks.
// Expected digests are the FIPS 180-4 examples "abc" and the 448-bit two-block message, and
// two generated messages (byte i = 7i+3 mod 256, 55 and 1000 bytes) whose digests were
// computed with an independent SHA-256 implementation. Every block must finish exactly 66
// cycles after it is taken (64 rounds, the final addition, the done register).
module tb_sha256_core;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         blk_valid = 1'b0, first = 1'b0;
  logic [511:0] blk = '0;
  logic         ready, done;
  logic [255:0] digest;
  int checks = 0, failures = 0;
  byte unsigned msg [$];

  sha256_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hash_msg(input logic [255:0] exp, input string what);
    byte unsigned p [$];
    longint unsigned bits;
    int n;
    p = msg;
    bits = 64'(msg.size()) * 8;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(bits[8*i +: 8]);
    for (int b = 0; b < p.size() / 64; b++) begin
      @(negedge clk);
      check(ready, "ready before a block");
      for (int i = 0; i < 64; i++) blk[511 - 8*i -: 8] = p[64*b + i];
      first = (b == 0);
      blk_valid = 1'b1;
      @(negedge clk);
      blk_valid = 1'b0; blk = '0;
      n = 1;
      while (!done && n < 200) begin @(negedge clk); n++; end
      check(n == 66, $sformatf("block time %0d cycles", n));
    end
    check(digest == exp, $sformatf("%s: %h", what, digest));
  endtask

  initial begin
    string s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    s = "abc";
    msg.delete(); foreach (s[i]) msg.push_back(s[i]);
    hash_msg(256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc");
    s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    msg.delete(); foreach (s[i]) msg.push_back(s[i]);
    hash_msg(256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, "two blocks");
    msg.delete(); for (int i = 0; i < 55; i++) msg.push_back(8'((i * 7 + 3) % 256));
    hash_msg(256'he7313d333c272e639f790978283f9eb392e843d0f29b7016828bb1daa4aac70b, "55 bytes");
    msg.delete(); for (int i = 0; i < 1000; i++) msg.push_back(8'((i * 7 + 3) % 256));
    hash_msg(256'h1e9bc38cbf860b9ec31918b065f9b52476c549a782e0e7990bed8ce3868d2371, "1000 bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
