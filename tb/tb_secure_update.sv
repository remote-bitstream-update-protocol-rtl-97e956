// tb_secure_update: end-to-end test of the secure-update subsystem at its default parameters
// (60 MHz clock, 115200 bit/s, TAG_UL = 1).
//
// The bench plays the system designer on the serial line and the factory programmer on the
// flash port, and power-cycles the device with rst_n while the flash keeps its contents.
// Expected ciphertexts were computed with an independent Triple-DES implementation checked
// against the NIST SP 800-67 example:
//   E_Kreq(1)  = 5EBEF98CE2AD394C   E_Kack1(1) = 4812911A2944BF0A   E_Kack2(1) = 3093A21879031A9A
// Sequence: (a) TAG_F = 0: version mismatch, shutdown; (b) TAG_F = 1 with the flag set: first
// power-up of a new version, E_Kack2(1) is sent and the flag cleared; a replayed command, a
// command under the wrong key and a command split by an idle gap are ignored; the right command
// moves TAG_F to 2, sets the flag, returns E_Kack1(1) and stops the system; (c) the same
// bitstream powered up again is refused (replay). Every mechanism is counted and must occur.
// The power-up time up to waiting for a command is checked against this design's own step
// times (278 cycles) and reported next to the 524 cycles of the reference implementation,
// whose flash is slower.
module tb_secure_update;
  import su_pkg::*;
  localparam int CPB = (60_000_000 + 115_200 / 2) / 115_200;
  localparam key_t KREQ  = {64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123};
  localparam key_t KACK1 = {64'h133457799BBCDFF1, 64'h0E329232EA6D0D73, 64'hFEDCBA9876543210};
  localparam key_t KACK2 = {64'h1F1F1F1F0E0E0E0E, 64'h3000000000000000, 64'h0123456789ABCDEF};
  localparam block_t C_REQ  = 64'h5EBEF98CE2AD394C;
  localparam block_t C_ACK1 = 64'h4812911A2944BF0A;
  localparam block_t C_ACK2 = 64'h3093A21879031A9A;

  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic txd, alarm;
  su_state_e state;
  logic prog_we = 1'b0;
  faddr_t prog_addr = '0;
  word_t prog_wdata = '0, prog_rdata;
  block_t got [$];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_mismatch = 0, n_first_ack = 0, n_reject = 0, n_accept = 0, n_replay = 0;
  int n_overlap = 0, n_gap = 0;

  secure_update dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.ci_start && dut.nvm_req) n_overlap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic prog(input int a, input word_t d);
    @(negedge clk);
    prog_we = 1'b1; prog_addr = faddr_t'(a); prog_wdata = d;
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  function automatic word_t peek(input int a);
    return dut.u_flash.mem[a];
  endfunction

  task automatic prog_key(input int base, input key_t k);
    for (int i = 0; i < 6; i++) prog(base + i, k[191 - 32*i -: 32]);
  endtask

  task automatic power_up;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic wait_state(input su_state_e s, input int limit, output int n);
    n = 0;
    while (state != s && n < limit) begin @(negedge clk); n++; end
    check(state == s, $sformatf("reached %s", s.name()));
  endtask

  // serial driver (8N1, LSB first), MSB byte of a block first
  task automatic send_byte(input logic [7:0] b);
    rxd = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = 1'b1; repeat (CPB) @(negedge clk);
  endtask
  task automatic send_block(input block_t v);
    for (int i = 7; i >= 0; i--) send_byte(v[8*i +: 8]);
    repeat (4 * CPB) @(negedge clk);
  endtask

  // serial monitor
  initial begin
    forever begin
      block_t v;
      for (int i = 7; i >= 0; i--) begin
        @(negedge txd);
        repeat (CPB / 2) @(negedge clk);
        for (int j = 0; j < 8; j++) begin repeat (CPB) @(negedge clk); v[8*i + j] = txd; end
        repeat (CPB) @(negedge clk);
        if (!txd) begin failures++; $display("FAIL: stop bit on txd"); end
      end
      got.push_back(v);
    end
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    prog(0, 32'h0); prog(1, 32'h0); prog(2, 32'h0);
    prog_key(4, KREQ); prog_key(10, KACK1); prog_key(16, KACK2);

    // (a) TAG_F = 0, TAG_UL = 1
    power_up();
    wait_state(S_SHUTDOWN, 500, n);
    if (alarm && state == S_SHUTDOWN) n_mismatch++;
    repeat (100) @(negedge clk);
    check(got.size() == 0 && alarm, "mismatch: alarm, nothing sent");

    // (b) first power-up of version 1: TAG_F = 1, flag set
    rst_n = 1'b0;
    prog(1, 32'h1); prog(2, 32'h1);
    power_up();
    wait_state(S_WAIT_CMD, 2000, n);
    $display("power-up to command wait: %0d cycles (reference implementation: 524)", n);
    // Expected from this design's step times (a field of w words takes 8w+1 cycles, a state
    // ends one cycle after its last done): read TAG_F 18, compare 1, read flag 10, read K_ack2
    // 50, flag write (38) under E_Kack2 (49) 49, send 1, read K_req 50, K_ack1 read (50) with
    // E_Kreq (49) 50, E_Kack1 49: 278 cycles.
    check(n == 278, "power-up time of the protocol steps");
    check(!alarm, "valid version runs");
    check(peek(2) == 32'h0, "flag cleared");
    n = 0;
    while (got.size() == 0 && n < 100000) begin @(negedge clk); n++; end
    check(got.size() == 1 && got[0] == C_ACK2, "E_Kack2(TAG_UL) received");
    if (got.size() == 1 && got[0] == C_ACK2) n_first_ack++;
    got.delete();

    send_block(64'h8FCCAB366EF50CCE);   // a command computed for another version
    send_block(C_ACK1);                 // right tag, wrong key
    check(state == S_WAIT_CMD && peek(1) == 32'h1, "wrong commands ignored");
    if (state == S_WAIT_CMD) n_reject += 2;
    for (int i = 7; i >= 4; i--) send_byte(C_REQ[8*i +: 8]);   // half a command, then silence
    repeat (60 * CPB) @(negedge clk);
    check(state == S_WAIT_CMD, "partial command not taken");
    if (state == S_WAIT_CMD) n_gap++;
    send_block(C_REQ);
    wait_state(S_SHUTDOWN, 1000, n);
    check(alarm, "system stopped after the update command");
    check(peek(0) == 32'h0 && peek(1) == 32'h2, "TAG_F incremented to 2");
    check(peek(2) == 32'h1, "flag set");
    n = 0;
    while (got.size() == 0 && n < 100000) begin @(negedge clk); n++; end
    check(got.size() == 1 && got[0] == C_ACK1, "E_Kack1(TAG_UL) received");
    if (alarm && got.size() == 1 && got[0] == C_ACK1) n_accept++;
    got.delete();

    // (c) replay: the version-1 bitstream powered up again
    power_up();
    wait_state(S_SHUTDOWN, 500, n);
    repeat (100) @(negedge clk);
    if (alarm && got.size() == 0) n_replay++;

    check(n_mismatch > 0, "mechanism: version mismatch shutdown");
    check(n_first_ack > 0, "mechanism: first power-up acknowledgement");
    check(n_reject > 0, "mechanism: wrong command ignored");
    check(n_gap > 0, "mechanism: partial command dropped");
    check(n_accept > 0, "mechanism: update accepted");
    check(n_replay > 0, "mechanism: replayed bitstream refused");
    check(n_overlap == 2, $sformatf("mechanism: flash access under encryption (%0d)", n_overlap));
    $display("mismatch=%0d first_ack=%0d reject=%0d gap=%0d accept=%0d replay=%0d overlap=%0d",
             n_mismatch, n_first_ack, n_reject, n_gap, n_accept, n_replay, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
