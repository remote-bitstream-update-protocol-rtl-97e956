// des3_core: Triple-DES block encryptor, one DES round per clock, 48 cycles per block.
//
// Computes C = E_K3(D_K2(E_K1(P))) (the EDE form of FIPS 46-3 / SP 800-67) on one 64-bit block.
// The three DES passes run back to back through a single round datapath: 16 encryption rounds
// with K1, 16 decryption rounds with K2, 16 encryption rounds with K3. The key schedule is
// computed on the fly from PC-1 of the current key, rotating C and D left while encrypting and
// right while decrypting, so no round keys are stored. Between two passes the final and initial
// permutations cancel, which leaves only the swap of the two halves.
//
// Interface: pulse `start` for one cycle while `busy` is low, with `key` = {K1, K2, K3} and
// `din` valid in that cycle (K2 and K3 are captured then; key and din may change afterwards).
// Timing: round 1 is computed in the start cycle, so `done` pulses for one cycle exactly 48
// cycles after `start`, with `dout` valid from then until the next start. The 48-cycle latency
// is the 3-DES time of the implementation the design follows; the datapath itself and the
// start/done handshake are this design's choices.
module des3_core
  import des_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [191:0]  key,
  input  logic [63:0]   din,
  output logic          busy,
  output logic          done,
  output logic [63:0]   dout
);

  logic [5:0]   rnd_q;        // index of the round computed this cycle when busy
  logic [63:0]  lr_q;         // L||R after the last round
  logic [55:0]  cd_q;         // C||D after the last round's rotation
  logic [127:0] k23_q;        // K2 and K3, captured at start

  logic         go;
  logic [5:0]   rnd;
  logic [3:0]   rnd16;
  logic         dec;
  logic [55:0]  cd_in, cd_rot, cd_next;
  logic [63:0]  lr_in, lr_next;
  logic [47:0]  rkey;

  assign go    = start && !busy;
  assign rnd   = busy ? rnd_q : 6'd0;
  assign rnd16 = rnd[3:0];
  assign dec   = (rnd >= 6'd16) && (rnd < 6'd32);

  always_comb begin
    // Select the round input: a fresh block, the start of pass 2 or 3, or the running state.
    if (go) begin
      cd_in = des_pc1(key[191:128]);
      lr_in = des_ip(din);
    end else if (rnd == 6'd16) begin
      cd_in = des_pc1(k23_q[127:64]);
      lr_in = {lr_q[31:0], lr_q[63:32]};
    end else if (rnd == 6'd32) begin
      cd_in = des_pc1(k23_q[63:0]);
      lr_in = {lr_q[31:0], lr_q[63:32]};
    end else begin
      cd_in = cd_q;
      lr_in = lr_q;
    end
    // Round key: encryption rotates left before PC-2, decryption rotates right after it.
    if (dec) begin
      cd_rot  = cd_in;
      cd_next = des_ror(cd_in, SHIFT_T[15 - rnd16]);
    end else begin
      cd_rot  = des_rol(cd_in, SHIFT_T[rnd16]);
      cd_next = cd_rot;
    end
    rkey    = des_pc2(cd_rot);
    lr_next = {lr_in[31:0], lr_in[63:32] ^ des_f(lr_in[31:0], rkey)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rnd_q <= '0;
      lr_q  <= '0;
      cd_q  <= '0;
      k23_q <= '0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      if (go) k23_q <= key[127:0];
      if (go || busy) begin
        lr_q <= lr_next;
        cd_q <= cd_next;
        if (rnd == 6'd47) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          dout  <= des_fp({lr_next[31:0], lr_next[63:32]});
          rnd_q <= '0;
        end else begin
          busy  <= 1'b1;
          rnd_q <= rnd + 6'd1;
        end
      end
    end
  end

  // A start while busy is ignored; the users of this core never issue one.
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("des3_core: start while busy");

endmodule
