// su_pkg: types and constants shared by the secure-update subsystem.
//
// The protocol works on 64-bit blocks (the 3-DES block size): a version tag TAG is one block and
// every message on the serial link (update command, acknowledgements) is one encrypted block.
// Each of the three protocol keys K_req, K_ack1 and K_ack2 is a 3-DES key of three 64-bit DES
// keys. The user flash is organised in 32-bit words; nvm_field_e names the five protocol fields
// kept there and field_base/field_words give this design's memory map (its own choice):
//   word 0-1  TAG_F    version accepted by the device (high word first)
//   word 2    flag     bit 0 set: a new version was authorised and not yet acknowledged
//   word 4-9  K_req, word 10-15 K_ack1, word 16-21 K_ack2 (K1 first, high word first)
package su_pkg;

  localparam int unsigned BLK_W   = 64;   // 3-DES block, TAG and message width
  localparam int unsigned KEY_W   = 192;  // 3-DES key: K1 | K2 | K3, 64 bits each with parity
  localparam int unsigned WORD_W  = 32;   // user flash word
  localparam int unsigned FADDR_W = 5;    // user flash word address
  localparam int unsigned NVM_DATA_W = KEY_W;  // widest field moved by the flash controller

  typedef logic [BLK_W-1:0]  block_t;
  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [FADDR_W-1:0] faddr_t;

  typedef enum logic [2:0] {
    F_TAG_F = 3'd0,
    F_FLAG  = 3'd1,
    F_KREQ  = 3'd2,
    F_KACK1 = 3'd3,
    F_KACK2 = 3'd4
  } nvm_field_e;

  function automatic faddr_t field_base(input nvm_field_e f);
    case (f)
      F_TAG_F: return 5'd0;
      F_FLAG:  return 5'd2;
      F_KREQ:  return 5'd4;
      F_KACK1: return 5'd10;
      default: return 5'd16;
    endcase
  endfunction

  function automatic logic [2:0] field_words(input nvm_field_e f);
    case (f)
      F_TAG_F: return 3'd2;
      F_FLAG:  return 3'd1;
      default: return 3'd6;
    endcase
  endfunction

  // Steps of the master FSM (listing lines in brackets).
  typedef enum logic [3:0] {
    S_RD_TAGF   = 4'd0,   // step 1: read TAG_F                      (1)
    S_CHK_TAG   = 4'd1,   // step 1: TAG_F = TAG_UL ?                 (2-4)
    S_RD_FLAG   = 4'd2,   // step 2: read flag                        (5-6)
    S_RD_KACK2  = 4'd3,   // step 2: read K_ack2                      (7)
    S_ACK2      = 4'd4,   // step 2: clear flag || E_Kack2(TAG_UL)    (8)
    S_SEND_ACK2 = 4'd5,   // step 2: send E_Kack2(TAG_UL)             (9)
    S_RD_KREQ   = 4'd6,   // step 3: read K_req                       (11)
    S_ENC_KREQ  = 4'd7,   // step 3: E_Kreq(TAG_UL) || read K_ack1    (12-13)
    S_ENC_KACK1 = 4'd8,   // step 3: E_Kack1(TAG_UL)                  (14)
    S_WAIT_CMD  = 4'd9,   // step 3: wait for CMD = E_Kreq(TAG_UL)    (15-16, 19-20)
    S_WR_TAGF   = 4'd10,  // step 4: write TAG_F + 1                  (17)
    S_WR_FLAG   = 4'd11,  // step 4: set flag                         (17)
    S_SEND_ACK1 = 4'd12,  // step 4: send E_Kack1(TAG_UL)             (18)
    S_SHUTDOWN  = 4'd13   // system shutdown, ALARM raised            (22)
  } su_state_e;

endpackage
