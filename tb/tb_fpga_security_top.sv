// tb_fpga_security_top: end-to-end test of both designs at the top's default parameters
// (60 MHz clock, 115200 bit/s, TAG_UL = 1).
//
// While the update protocol waits for its command, a second thread hashes a generated 1000-byte message
// (byte i = 7i+3 mod 256, padded by the bench) through the SHA-256 engine and checks the
// digest, computed with an independent SHA-256 implementation, and the 66-cycle block time.
// A third thread has the RSA engine verify a 1024-bit signature made with an independent RSA
// implementation (E = 65537), then the same signature with one bit flipped, which must fail.
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
module tb_fpga_security_top;
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

  logic         sha_blk_valid = 1'b0, sha_first = 1'b0;
  logic [511:0] sha_blk = '0;
  logic         sha_ready, sha_done;
  logic [255:0] sha_digest;
  int n_sha_blocks = 0;
  localparam logic [1023:0] N1024 = 1024'hf2be6bc48b74691e99e7c79c03a2a6d936ca8de9ca1c3d90333f6da7e6e76955ade0923b7c9e85e974042d58c64a6d033c806d1dba9eab809625a5738635d5a442392758b9f2afa9203d906f714bc04ae116d5539a589c3ed5b79576aa7d6c508ef210f9af323d8c7002f47600990acc4380e6d704f72af0a07a99838c6d3c47;
  localparam logic [1023:0] R2_1024 = 1024'h1842dd0d408d13510f79a4f42e28743ad3116c71806c05565f4027ac20bd08b547ec97315bf11acfb4ce501a118428ec427d82219b1d81d82d3cb3bac1e2a01bd748899a7376635f8e67be986f7f2e2ba7b71eda10e0e708921dfa282f46a4cb6131dccb04ad0a005334c305c9ba47bdc6f7ad0d887eed67060bc2a989c34793;
  localparam logic [1023:0] SIG1024 = 1024'h58a2d9049aa313961cb2523b0803c54ab82c61e422c6344782360eb1ffbb2c845992e5bb4e6daf0d0befdbf4b2f72fda7eb7359d70743b07071968cee5b140211ad4cd82755bab8e65a507341b09163be8bdd6232321ae4bdc0b95be9c732eae6ca8dc9ceb792fff3f806fc071364ed4e42adaaaee9b3dd0908c7e30b46e8d82;
  localparam logic [1023:0] EM1024 = 1024'h000000dbba23cac3d2e5f14a69626116b45ba9dad70bbd96ed14b3e2ed1f9bd8b93b29a5ac2e9dbb4478d4a3daed4b3aef8d4187c710d576a12a44bdd5574af42ff9a7375964295030fe428f67fa3020f64a4a6f88696de06b9bebda01d8a36aa106b90e1fa9166f18a7af086995e1cad7a34d8d36de6aee11f16fa9a356f797;
  logic          rsa_start = 1'b0;
  logic [1023:0] rsa_sig = '0;
  logic          rsa_busy, rsa_done, rsa_match;
  logic [1023:0] rsa_result;
  int n_rsa_pass = 0, n_rsa_reject = 0;
  bit sha_finished = 1'b0;

  fpga_security_top dut (
    .clk, .rst_n, .su_rxd(rxd), .su_txd(txd), .su_alarm(alarm), .su_state(state),
    .su_prog_we(prog_we), .su_prog_addr(prog_addr), .su_prog_wdata(prog_wdata),
    .su_prog_rdata(prog_rdata), .sha_blk_valid, .sha_first, .sha_blk, .sha_ready, .sha_done,
    .sha_digest, .rsa_start, .rsa_modulus(N1024), .rsa_r2(R2_1024), .rsa_exponent(17'd65537),
    .rsa_sig, .rsa_em(EM1024), .rsa_busy, .rsa_done, .rsa_result, .rsa_match
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.u_update.ci_start && dut.u_update.nvm_req) n_overlap++;

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
    return dut.u_update.u_flash.mem[a];
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

  // kernel-signature thread: runs after the hash, while the subsystem still waits
  task automatic rsa_run(input logic [1023:0] sg, output bit m);
    int n;
    @(negedge clk);
    rsa_sig = sg; rsa_start = 1'b1;
    @(negedge clk);
    rsa_start = 1'b0;
    n = 1;
    while (!rsa_done && n < 30000) begin @(negedge clk); n++; end
    check(n == 19 * 1027 + 1, $sformatf("RSA-1024 verification time %0d", n));
    m = rsa_match;
  endtask

  initial begin
    bit m;
    wait (sha_finished);
    rsa_run(SIG1024, m);
    check(m && rsa_result == EM1024, "RSA: valid signature accepted");
    if (m) n_rsa_pass++;
    rsa_run(SIG1024 ^ (1024'h1 << 77), m);
    check(!m, "RSA: altered signature rejected");
    if (!m) n_rsa_reject++;
  end

  // kernel-hash thread
  initial begin
    byte unsigned p [$];
    int n;
    for (int i = 0; i < 1000; i++) p.push_back(8'((i * 7 + 3) % 256));
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(8'((64'd8000 >> (8 * i)) & 64'hFF));
    // run while the update subsystem waits for a command, between two power cycles
    wait (rst_n && state == S_WAIT_CMD);
    for (int b = 0; b < p.size() / 64; b++) begin
      @(negedge clk);
      while (!sha_ready || !rst_n) @(negedge clk);
      for (int i = 0; i < 64; i++) sha_blk[511 - 8*i -: 8] = p[64*b + i];
      sha_first = (b == 0);
      sha_blk_valid = 1'b1;
      @(negedge clk);
      sha_blk_valid = 1'b0;
      n = 1;
      while (!sha_done && n < 200) begin @(negedge clk); n++; end
      check(n == 66, $sformatf("SHA-256 block time %0d", n));
      n_sha_blocks++;
    end
    check(sha_digest == 256'h1e9bc38cbf860b9ec31918b065f9b52476c549a782e0e7990bed8ce3868d2371,
          "SHA-256 digest of the 1000-byte message");
    sha_finished = 1'b1;
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
    check(sha_finished && n_sha_blocks == 16, "mechanism: kernel message hashed");
    check(n_rsa_pass == 1 && n_rsa_reject == 1, "mechanism: signature accepted and rejected");
    check(n_overlap == 2, $sformatf("mechanism: flash access under encryption (%0d)", n_overlap));
    $display("sha_blocks=%0d rsa_pass=%0d rsa_reject=%0d", n_sha_blocks, n_rsa_pass, n_rsa_reject);
    $display("mismatch=%0d first_ack=%0d reject=%0d gap=%0d accept=%0d replay=%0d overlap=%0d",
             n_mismatch, n_first_ack, n_reject, n_gap, n_accept, n_replay, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
