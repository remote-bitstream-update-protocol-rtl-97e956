// tb_master_fsm: self-checking test of the protocol controller.
//
// The FSM's neighbours are bench models: a field store answering flash requests after a fixed
// delay, a stand-in cipher (a key-dependent mixing function, 48 cycles), an equality check and
// a serial port that records sent blocks and delivers commands. Four power-ups are run:
//   1. TAG_F differs from TAG_UL: shutdown at once, nothing sent, nothing written.
//   2. TAG_F = TAG_UL, flag clear: a wrong command is ignored, the right one moves TAG_F to
//      TAG_F+1, sets the flag, sends E_Kack1(TAG_UL) and shuts down.
//   3. The old bitstream again (replay): TAG_F no longer matches, shutdown.
//   4. The new bitstream (TAG_UL+1): the flag is cleared, E_Kack2(new TAG_UL) is sent, and the
//      FSM waits for the next command.
// The bench also checks that the flag write runs alongside E_Kack2 and the K_ack1 read
// alongside E_Kreq, as the protocol's timing overlaps them.
module tb_master_fsm;
  import su_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  block_t tag_ul = '0;
  logic nvm_req, nvm_we, nvm_done = 1'b0;
  nvm_field_e nvm_field;
  logic [NVM_DATA_W-1:0] nvm_wdata, nvm_rdata = '0;
  logic ci_start, ci_done = 1'b0;
  key_t ci_key;
  block_t ci_din, ci_dout = '0;
  block_t cmp_a, cmp_b;
  logic cmp_eq;
  logic cmd_valid = 1'b0;
  block_t cmd = '0;
  logic tx_valid, tx_ready = 1'b1;
  block_t tx_block;
  logic alarm;
  su_state_e state;

  key_t   fld [5];          // bench copy of the flash fields
  block_t sent [$];
  int writes = 0, overlaps = 0;
  int checks = 0, failures = 0;

  master_fsm dut (.*);

  assign cmp_eq = (cmp_a == cmp_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t enc(key_t k, block_t p);
    return {p[31:0], p[63:32]} ^ k[191:128] ^ {k[95:64], k[127:96]} ^ (k[63:0] + 64'd3);
  endfunction

  // flash field store, 9 cycles per access
  always @(posedge clk) begin
    if (rst_n && nvm_req) begin
      automatic nvm_field_e f = nvm_field;
      automatic logic w = nvm_we;
      automatic logic [NVM_DATA_W-1:0] d = nvm_wdata;
      if (ci_start) overlaps++;
      fork
        begin
          repeat (9) @(posedge clk);
          if (w) begin fld[f] <= d; writes++; end
          nvm_rdata <= fld[f];
          nvm_done <= 1'b1;
          @(posedge clk) nvm_done <= 1'b0;
        end
      join_none
    end
  end

  // cipher stand-in, 48 cycles
  always @(posedge clk) begin
    if (rst_n && ci_start) begin
      automatic block_t r = enc(ci_key, ci_din);
      fork
        begin
          repeat (48) @(posedge clk);
          ci_dout <= r;
          ci_done <= 1'b1;
          @(posedge clk) ci_done <= 1'b0;
        end
      join_none
    end
  end

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) sent.push_back(tx_block);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic power_up(input block_t tul);
    rst_n = 1'b0;
    tag_ul = tul;
    sent.delete();
    writes = 0; overlaps = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic wait_state(input su_state_e s, input int limit);
    int n = 0;
    while (state != s && n < limit) begin @(negedge clk); n++; end
    check(state == s, $sformatf("reached %s", s.name()));
  endtask

  task automatic send_cmd(input block_t c);
    @(negedge clk); cmd = c; cmd_valid = 1'b1;
    @(negedge clk); cmd_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    key_t kreq, kack1, kack2;
    kreq  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    kack1 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    kack2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    fld[F_TAG_F] = 192'd41; fld[F_FLAG] = '0;
    fld[F_KREQ] = kreq; fld[F_KACK1] = kack1; fld[F_KACK2] = kack2;

    // 1. wrong version
    power_up(64'd40);
    wait_state(S_SHUTDOWN, 200);
    check(alarm, "alarm on version mismatch");
    repeat (20) @(negedge clk);
    check(state == S_SHUTDOWN && sent.size() == 0 && writes == 0, "shutdown is final and silent");

    // 2. matching version, update command
    power_up(64'd41);
    wait_state(S_WAIT_CMD, 400);
    check(!alarm && sent.size() == 0, "no acknowledgement when flag is clear");
    check(overlaps == 1, "K_ack1 read overlaps E_Kreq");
    send_cmd(enc(kreq, 64'd40));                 // replayed command of an older version
    send_cmd(enc(kack1, 64'd41));                // right tag, wrong key
    check(state == S_WAIT_CMD && writes == 0, "wrong commands ignored");
    send_cmd(enc(kreq, 64'd41));
    wait_state(S_SHUTDOWN, 200);
    check(alarm, "system stopped after update command");
    check(fld[F_TAG_F][63:0] == 64'd42, "TAG_F incremented");
    check(fld[F_FLAG][0] == 1'b1, "flag set");
    check(sent.size() == 1 && sent[0] == enc(kack1, 64'd41), "E_Kack1(TAG_UL) sent");

    // 3. replay of the old bitstream
    power_up(64'd41);
    wait_state(S_SHUTDOWN, 200);
    check(sent.size() == 0, "old bitstream refused");

    // 4. new bitstream, first power-up
    power_up(64'd42);
    wait_state(S_WAIT_CMD, 600);
    check(!alarm, "new version runs");
    check(fld[F_FLAG][0] == 1'b0, "flag cleared");
    check(sent.size() == 1 && sent[0] == enc(kack2, 64'd42), "E_Kack2(new TAG_UL) sent");
    check(overlaps == 2, "flag write overlaps E_Kack2");

    // 5. second power-up of the new bitstream: no second acknowledgement
    power_up(64'd42);
    wait_state(S_WAIT_CMD, 600);
    check(sent.size() == 0, "startup acknowledged only once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
