// tb_des3_core: self-checking test of the 3-DES encryptor.
//
// Expected values are published test vectors: two single-DES vectors run with K1 = K2 = K3 (EDE
// then reduces to single DES) and the three-block Triple-DES example of NIST SP 800-67. Each
// encryption is also timed: `done` must come exactly 48 cycles after `start`, and `busy` must be
// high in between. One block is started in the cycle right after the previous `done`.
module tb_des3_core;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [191:0] key = '0;
  logic [63:0]  din = '0;
  logic         busy, done;
  logic [63:0]  dout;
  int checks = 0, failures = 0;

  des3_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic encrypt(input logic [191:0] k, input logic [63:0] p, input logic [63:0] exp);
    int n;
    @(negedge clk);
    key = k; din = p; start = 1'b1;
    @(negedge clk);
    start = 1'b0; key = '0; din = '0;      // the core must have captured what it needs
    n = 1;
    while (!done) begin
      check(busy, "busy during encryption");
      @(negedge clk);
      n++;
      if (n > 200) break;
    end
    check(n == 48, $sformatf("latency %0d cycles, expected 48", n));
    check(dout == exp, $sformatf("E(%h) = %h, expected %h", p, dout, exp));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    encrypt({3{64'h133457799BBCDFF1}}, 64'h0123456789ABCDEF, 64'h85E813540F0AB405);
    encrypt({3{64'h0E329232EA6D0D73}}, 64'h8787878787878787, 64'h0000000000000000);
    encrypt({3{64'h0123456789ABCDEF}}, 64'h4E6F772069732074, 64'h3FA40E8A984D4815);
    encrypt({64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123},
            64'h5468652071756663, 64'hA826FD8CE53B855F);
    encrypt({64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123},
            64'h6B2062726F776E20, 64'hCCE21C8112256FE6);
    encrypt({64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123},
            64'h666F78206A756D70, 64'h68D5C05DD9B6B900);
    // result is held after done
    repeat (5) @(negedge clk);
    check(dout == 64'h68D5C05DD9B6B900 && !busy, "result held while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
