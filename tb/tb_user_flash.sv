// tb_user_flash: self-checking test of the user flash model.
//
// Loads words through the factory port, reads them back through the access port, programs
// words through the access port and checks them through the factory port. It times every
// access (ack RD_LAT or WR_LAT cycles after the request), checks that busy blocks a second
// request and that the contents survive a reset, as non-volatile memory must.
module tb_user_flash;
  import su_pkg::*;
  localparam int RD = 7, WR = 35;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   req = 1'b0, we = 1'b0, prog_we = 1'b0;
  faddr_t addr = '0, prog_addr = '0;
  word_t  wdata = '0, prog_wdata = '0;
  logic   busy, ack;
  word_t  rdata, prog_rdata;
  word_t  ref_mem [32];
  int checks = 0, failures = 0;

  user_flash #(.DEPTH(32), .RD_LAT(RD), .WR_LAT(WR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input bit w, input faddr_t a, input word_t d, output word_t q);
    int n;
    @(negedge clk);
    req = 1'b1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 1'b0; addr = ~a; wdata = ~d;
    n = 1;
    while (!ack) begin
      check(busy, "busy while an access runs");
      @(negedge clk); n++;
      if (n > 100) break;
    end
    check(n == (w ? WR : RD), $sformatf("%s latency %0d", w ? "program" : "read", n));
    q = rdata;
  endtask

  initial begin
    word_t q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      ref_mem[i] = $urandom;
      prog_we = 1'b1; prog_addr = faddr_t'(i); prog_wdata = ref_mem[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int i = 0; i < 32; i += 3) begin
      access(1'b0, faddr_t'(i), '0, q);
      check(q == ref_mem[i], $sformatf("read word %0d", i));
    end
    for (int i = 1; i < 32; i += 5) begin
      ref_mem[i] = $urandom;
      access(1'b1, faddr_t'(i), ref_mem[i], q);
    end
    // reset must not clear the array
    rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1;
    check(!busy && !ack, "access logic reset");
    for (int i = 0; i < 32; i++) begin
      prog_addr = faddr_t'(i); #1;
      check(prog_rdata == ref_mem[i], $sformatf("word %0d after program and reset", i));
    end
    access(1'b0, 5'd6, '0, q);
    check(q == ref_mem[6], "programmed word read through the access port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
