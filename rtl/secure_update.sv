// secure_update: replay-proof remote bitstream update subsystem for a flash-based FPGA.
//
// The subsystem sits in the user logic next to the user design. It keeps the version tag the
// device has accepted, TAG_F, in non-volatile user flash and compares it at every power-up with
// TAG_UL, the version compiled into the running bitstream (the TAG_UL parameter). A bitstream
// whose tag differs, such as an old bitstream replayed by an attacker, raises `alarm`, which
// stops the user design. An update is authorised by the command E_Kreq(TAG_UL) received on the
// serial link; the subsystem then moves TAG_F to TAG_F + 1, answers E_Kack1(TAG_UL) and stops,
// so that only the next version's bitstream can run. At the first power-up of that bitstream it
// reports E_Kack2(TAG_UL) to confirm that the new version is running. The keys K_req, K_ack1 and
// K_ack2 are 3-DES keys held in the same flash. The bitstream itself is loaded and decrypted by
// the FPGA's own configuration logic, outside this block.
//
// Blocks: master_fsm (protocol), des3_core (3-DES, 48 cycles per block), tag_comparator,
// rs232_ctrl (64-bit messages as 8 serial bytes, most significant first), nvm_ctrl (field
// accesses) and user_flash (model of the on-chip flash). Ports: `rxd`/`txd` serial link,
// `alarm` to the user design, `state` for observation, and the flash's factory programming port
// `prog_*` through which keys, TAG_F and flag are loaded before deployment.
// The structure follows the document; the serial bit rate, the tag width (one 3-DES block) and
// the flash map are this design's choices.
module secure_update
  import su_pkg::*;
#(
  parameter int unsigned CLK_HZ = 60_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter block_t      TAG_UL = 64'h0000_0000_0000_0001,
  parameter int unsigned FLASH_RD_LAT = 7,
  parameter int unsigned FLASH_WR_LAT = 35
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rxd,
  output logic      txd,
  output logic      alarm,
  output su_state_e state,
  input  logic      prog_we,
  input  faddr_t    prog_addr,
  input  word_t     prog_wdata,
  output word_t     prog_rdata
);

  // flash controller <-> FSM
  logic                  nvm_req, nvm_we, nvm_busy, nvm_done;
  nvm_field_e            nvm_field;
  logic [NVM_DATA_W-1:0] nvm_wdata, nvm_rdata;
  // flash controller <-> flash
  logic   f_req, f_we, f_busy, f_ack;
  faddr_t f_addr;
  word_t  f_wdata, f_rdata;
  // cipher
  logic   ci_start, ci_busy, ci_done;
  key_t   ci_key;
  block_t ci_din, ci_dout;
  // comparator
  block_t cmp_a, cmp_b;
  logic   cmp_eq;
  // network
  logic   cmd_valid, tx_valid, tx_ready;
  block_t cmd, tx_block;

  master_fsm u_fsm (
    .clk, .rst_n, .tag_ul(TAG_UL),
    .nvm_req, .nvm_we, .nvm_field, .nvm_wdata, .nvm_rdata, .nvm_done,
    .ci_start, .ci_key, .ci_din, .ci_done, .ci_dout,
    .cmp_a, .cmp_b, .cmp_eq,
    .cmd_valid, .cmd, .tx_valid, .tx_block, .tx_ready,
    .alarm, .state
  );

  des3_core u_des3 (
    .clk, .rst_n, .start(ci_start), .key(ci_key), .din(ci_din),
    .busy(ci_busy), .done(ci_done), .dout(ci_dout)
  );

  tag_comparator #(.W(BLK_W)) u_comp (.a(cmp_a), .b(cmp_b), .eq(cmp_eq));

  rs232_ctrl #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rs232 (
    .clk, .rst_n, .rxd, .txd, .cmd_valid, .cmd, .tx_valid, .tx_block, .tx_ready
  );

  nvm_ctrl u_nvm (
    .clk, .rst_n, .req(nvm_req), .we(nvm_we), .field(nvm_field), .wdata(nvm_wdata),
    .rdata(nvm_rdata), .busy(nvm_busy), .done(nvm_done),
    .f_req, .f_we, .f_addr, .f_wdata, .f_busy, .f_ack, .f_rdata
  );

  user_flash #(.RD_LAT(FLASH_RD_LAT), .WR_LAT(FLASH_WR_LAT)) u_flash (
    .clk, .rst_n, .req(f_req), .we(f_we), .addr(f_addr), .wdata(f_wdata),
    .busy(f_busy), .ack(f_ack), .rdata(f_rdata),
    .prog_we, .prog_addr, .prog_wdata, .prog_rdata
  );

  // The FSM never issues a second encryption or flash access before the previous one is done.
  a_cipher_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) ci_start |-> !ci_busy);
  a_nvm_idle_on_req:      assert property (@(posedge clk) disable iff (!rst_n) nvm_req |-> !nvm_busy);

endmodule
