// tb_rs232_ctrl: self-checking test of the RS232 network controller.
//
// Runs at 16 clock cycles per bit. The bench has its own serialiser and deserialiser, written
// from the 8N1 frame definition (start 0, eight data bits LSB first, stop 1). It checks that
// eight received bytes form one 64-bit command, most significant byte first; that a partial
// message is dropped after an idle gap; that a frame with a bad stop bit is dropped; and that a
// transmitted block comes out as eight frames with the right bit time and byte order.
module tb_rs232_ctrl;
  localparam int CPB = 16;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        rxd = 1'b1;
  logic        txd, cmd_valid, tx_ready;
  logic        tx_valid = 1'b0;
  logic [63:0] cmd, tx_block = '0;
  int checks = 0, failures = 0;
  logic [63:0] got_cmd[$];

  rs232_ctrl #(.CLK_HZ(CPB), .BAUD(1), .IDLE_BITS(40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cmd_valid) got_cmd.push_back(cmd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b, input bit good_stop = 1'b1);
    rxd = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = good_stop; repeat (CPB) @(negedge clk);
    rxd = 1'b1; repeat (2) @(negedge clk);
  endtask

  task automatic send_block(input logic [63:0] v);
    for (int i = 7; i >= 0; i--) send_byte(v[8*i +: 8]);
  endtask

  // receive one frame from txd, checking the bit time
  task automatic recv_byte(output logic [7:0] b, output bit ok);
    int t;
    ok = 1'b1;
    t = 0;
    while (txd) begin @(negedge clk); t++; if (t > 5000) begin ok = 1'b0; return; end end
    repeat (CPB / 2) @(negedge clk);
    if (txd) ok = 1'b0;
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = txd; end
    repeat (CPB) @(negedge clk);
    if (!txd) ok = 1'b0;
  endtask

  initial begin
    logic [7:0] b;
    logic [63:0] r;
    bit ok;
    longint t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // one full command
    send_block(64'hA826FD8CE53B855F);
    repeat (CPB) @(negedge clk);
    check(got_cmd.size() == 1, "one command after eight bytes");
    if (got_cmd.size() > 0) check(got_cmd.pop_front() == 64'hA826FD8CE53B855F, "command value");

    // three bytes, an idle gap, then a full command: the partial message is dropped
    send_byte(8'h11); send_byte(8'h22); send_byte(8'h33);
    repeat (CPB * 60) @(negedge clk);
    send_block(64'h0123456789ABCDEF);
    repeat (CPB) @(negedge clk);
    check(got_cmd.size() == 1, "partial message dropped after idle gap");
    if (got_cmd.size() > 0) check(got_cmd.pop_front() == 64'h0123456789ABCDEF, "command after gap");

    // a frame with a broken stop bit is not counted
    send_byte(8'hFF, 1'b0);
    repeat (CPB * 60) @(negedge clk);
    send_block(64'hFEDCBA9876543210);
    repeat (CPB) @(negedge clk);
    check(got_cmd.size() == 1, "bad frame dropped");
    if (got_cmd.size() > 0) check(got_cmd.pop_front() == 64'hFEDCBA9876543210, "command after bad frame");

    // transmit a block
    check(tx_ready, "transmitter idle");
    @(negedge clk);
    tx_block = 64'h68D5C05DD9B6B900; tx_valid = 1'b1;
    @(negedge clk);
    tx_valid = 1'b0; tx_block = '0;
    check(!tx_ready, "transmitter busy after accepting a block");
    t0 = $time;
    for (int i = 7; i >= 0; i--) begin
      recv_byte(b, ok);
      check(ok, "frame format on txd");
      r[8*i +: 8] = b;
    end
    t1 = $time;
    check(r == 64'h68D5C05DD9B6B900, $sformatf("sent %h", r));
    // eight frames of 10 bits each, back to back: 80 bit times less the half bit skipped at the end
    check((t1 - t0) / 10 >= 79 * CPB && (t1 - t0) / 10 <= 80 * CPB + 4, $sformatf("block time %0d cycles", (t1 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
