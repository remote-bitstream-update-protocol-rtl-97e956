// master_fsm: controller of the replay-proof remote update protocol.
//
// At every power-up (reset) the FSM runs the four steps of the protocol:
//  1. Power-up check: read TAG_F from the user flash and compare it with TAG_UL, the version
//     built into the running bitstream. If they differ, the bitstream is an old (replayed) or
//     unauthorised one: go to shutdown.
//  2. First power-up of a new version: read the flag. If it is set, read K_ack2, clear the flag
//     while encrypting TAG_UL with K_ack2, and send E_Kack2(TAG_UL) to the system designer as
//     the proof that the new version has been received and started.
//  3. Authentication: read K_req and compute E_Kreq(TAG_UL), reading K_ack1 meanwhile; then
//     compute E_Kack1(TAG_UL). Wait for a 64-bit command from the network; a command that is not
//     E_Kreq(TAG_UL) is ignored and the FSM keeps waiting.
//  4. Update authorisation: write TAG_F + 1 and set the flag, send E_Kack1(TAG_UL) as the
//     acknowledgement of the update command, and shut the system down so that only a bitstream
//     of the next version (TAG_UL = TAG_F + 1) can run afterwards.
// In shutdown `alarm` is high (it stops the user design) and the FSM stays there until the next
// reset. Flash accesses go through nvm_ctrl (field-level req/done), encryptions through
// des3_core (start/done, 48 cycles), messages through rs232_ctrl (cmd_valid in, valid/ready out)
// and both equality checks through one tag_comparator whose operands this FSM selects.
// Messages are sent without waiting for the end of the transmission, so sending costs no time
// in the protocol. The steps, their order and the two overlaps (flag write with E_Kack2, K_ack1
// read with E_Kreq) follow the document; the encodings (flag = bit 0 of its word) and the
// handshakes are this design's choices.
module master_fsm
  import su_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  block_t                tag_ul,
  // flash controller
  output logic                  nvm_req,
  output logic                  nvm_we,
  output nvm_field_e            nvm_field,
  output logic [NVM_DATA_W-1:0] nvm_wdata,
  input  logic [NVM_DATA_W-1:0] nvm_rdata,
  input  logic                  nvm_done,
  // 3-DES encryptor
  output logic                  ci_start,
  output key_t                  ci_key,
  output block_t                ci_din,
  input  logic                  ci_done,
  input  block_t                ci_dout,
  // comparator
  output block_t                cmp_a,
  output block_t                cmp_b,
  input  logic                  cmp_eq,
  // network controller
  input  logic                  cmd_valid,
  input  block_t                cmd,
  output logic                  tx_valid,
  output block_t                tx_block,
  input  logic                  tx_ready,
  // status
  output logic                  alarm,
  output su_state_e             state
);

  su_state_e st_q;
  logic      entered_q;   // low in the first cycle of a state: issue its requests then
  logic      nvm_ok_q;    // the state's flash access has finished
  logic      ci_ok_q;     // the state's encryption has finished
  block_t    tagf_q;
  key_t      key_q;       // K_ack2 or K_req
  key_t      kack1_q;
  block_t    ctag_q;      // E_Kack2(TAG_UL), then E_Kreq(TAG_UL)
  block_t    ctag_ack1_q; // E_Kack1(TAG_UL)

  assign state  = st_q;
  assign alarm  = (st_q == S_SHUTDOWN);
  assign ci_din = tag_ul;

  // flash requests
  always_comb begin
    nvm_req   = 1'b0;
    nvm_we    = 1'b0;
    nvm_field = F_TAG_F;
    nvm_wdata = '0;
    if (!entered_q) begin
      case (st_q)
        S_RD_TAGF:  begin nvm_req = 1'b1; nvm_field = F_TAG_F; end
        S_RD_FLAG:  begin nvm_req = 1'b1; nvm_field = F_FLAG;  end
        S_RD_KACK2: begin nvm_req = 1'b1; nvm_field = F_KACK2; end
        S_ACK2:     begin nvm_req = 1'b1; nvm_field = F_FLAG; nvm_we = 1'b1; end
        S_RD_KREQ:  begin nvm_req = 1'b1; nvm_field = F_KREQ;  end
        S_ENC_KREQ: begin nvm_req = 1'b1; nvm_field = F_KACK1; end
        S_WR_TAGF:  begin nvm_req = 1'b1; nvm_field = F_TAG_F; nvm_we = 1'b1;
                          nvm_wdata = NVM_DATA_W'(tagf_q + 1'b1); end
        S_WR_FLAG:  begin nvm_req = 1'b1; nvm_field = F_FLAG; nvm_we = 1'b1;
                          nvm_wdata = NVM_DATA_W'(1); end
        default: ;
      endcase
    end
  end

  // encryptions: the key is taken in the start cycle
  always_comb begin
    ci_start = !entered_q && (st_q == S_ACK2 || st_q == S_ENC_KREQ || st_q == S_ENC_KACK1);
    ci_key   = (st_q == S_ENC_KACK1) ? kack1_q : key_q;
  end

  // comparator operands
  always_comb begin
    if (st_q == S_WAIT_CMD) begin
      cmp_a = cmd;
      cmp_b = ctag_q;
    end else begin
      cmp_a = tagf_q;
      cmp_b = tag_ul;
    end
  end

  // messages
  always_comb begin
    tx_valid = 1'b0;
    tx_block = ctag_ack1_q;
    if (st_q == S_SEND_ACK2) begin
      tx_valid = 1'b1;
      tx_block = ctag_q;
    end else if (st_q == S_SEND_ACK1) begin
      tx_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_RD_TAGF;
      entered_q   <= 1'b0;
      nvm_ok_q    <= 1'b0;
      ci_ok_q     <= 1'b0;
      tagf_q      <= '0;
      key_q       <= '0;
      kack1_q     <= '0;
      ctag_q      <= '0;
      ctag_ack1_q <= '0;
    end else begin
      entered_q <= 1'b1;
      if (nvm_done) nvm_ok_q <= 1'b1;
      if (ci_done)  ci_ok_q  <= 1'b1;

      case (st_q)
        S_RD_TAGF: if (nvm_done) begin
          tagf_q <= nvm_rdata[BLK_W-1:0];
          go(S_CHK_TAG);
        end
        S_CHK_TAG: go(cmp_eq ? S_RD_FLAG : S_SHUTDOWN);
        S_RD_FLAG: if (nvm_done) go(nvm_rdata[0] ? S_RD_KACK2 : S_RD_KREQ);
        S_RD_KACK2: if (nvm_done) begin
          key_q <= nvm_rdata;
          go(S_ACK2);
        end
        S_ACK2: begin
          if (ci_done) ctag_q <= ci_dout;
          if ((nvm_ok_q || nvm_done) && (ci_ok_q || ci_done)) go(S_SEND_ACK2);
        end
        S_SEND_ACK2: if (tx_ready) go(S_RD_KREQ);
        S_RD_KREQ: if (nvm_done) begin
          key_q <= nvm_rdata;
          go(S_ENC_KREQ);
        end
        S_ENC_KREQ: begin
          if (ci_done)  ctag_q  <= ci_dout;
          if (nvm_done) kack1_q <= nvm_rdata;
          if ((nvm_ok_q || nvm_done) && (ci_ok_q || ci_done)) go(S_ENC_KACK1);
        end
        S_ENC_KACK1: if (ci_done) begin
          ctag_ack1_q <= ci_dout;
          go(S_WAIT_CMD);
        end
        S_WAIT_CMD: if (cmd_valid && cmp_eq) go(S_WR_TAGF);
        S_WR_TAGF: if (nvm_done) go(S_WR_FLAG);
        S_WR_FLAG: if (nvm_done) go(S_SEND_ACK1);
        S_SEND_ACK1: if (tx_ready) go(S_SHUTDOWN);
        default: st_q <= S_SHUTDOWN;
      endcase
    end
  end

  // Move to state s; its requests are issued in its first cycle.
  task automatic go(input su_state_e s);
    st_q      <= s;
    entered_q <= 1'b0;
    nvm_ok_q  <= 1'b0;
    ci_ok_q   <= 1'b0;
  endtask

  a_shutdown_is_final: assert property (@(posedge clk) disable iff (!rst_n)
                                        (st_q == S_SHUTDOWN) |=> (st_q == S_SHUTDOWN))
    else $error("master_fsm: left shutdown without a reset");

endmodule
