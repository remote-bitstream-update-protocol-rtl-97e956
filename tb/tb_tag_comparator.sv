// tb_tag_comparator: self-checking test of the equality comparator.
//
// Equal operands, operands that differ in exactly one bit (every position) and random pairs.
module tb_tag_comparator;
  logic [63:0] a, b;
  logic eq;
  int checks = 0, failures = 0;

  tag_comparator #(.W(64)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = {$urandom, $urandom};
      b = a; #1 check(eq === 1'b1, "equal operands");
      b = a ^ (64'd1 << i); #1 check(eq === 1'b0, $sformatf("bit %0d differs", i));
    end
    for (int i = 0; i < 200; i++) begin
      a = {$urandom, $urandom};
      b = (i % 2) ? a : {$urandom, $urandom};
      #1 check(eq == (i % 2 == 1 || a == b), "random pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
