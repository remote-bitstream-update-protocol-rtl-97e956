// nvm_ctrl: flash controller that moves whole protocol fields between the master FSM and the
// 32-bit user flash.
//
// The FSM asks for one field (TAG_F, flag, K_req, K_ack1 or K_ack2) with a one-cycle `req`,
// `we` and `field`; the controller looks up the field's base address and length in the memory
// map of su_pkg and issues one flash access per word, lowest address first. A read assembles the
// words into `rdata`, right-aligned, the word at the base address most significant; a write
// takes the field's value right-aligned from `wdata`. `done` pulses for one cycle when the last
// word has been acknowledged; `busy` is high from the request until then. A field of n words
// takes n*(flash latency + 1) + 1 cycles. The document gives only the name of this block and its
// size; the field-level interface and the word sequencing are this design's choices.
module nvm_ctrl
  import su_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // field port (master FSM)
  input  logic                  req,
  input  logic                  we,
  input  nvm_field_e            field,
  input  logic [NVM_DATA_W-1:0] wdata,
  output logic [NVM_DATA_W-1:0] rdata,
  output logic                  busy,
  output logic                  done,
  // word port (user flash)
  output logic                  f_req,
  output logic                  f_we,
  output faddr_t                f_addr,
  output word_t                 f_wdata,
  input  logic                  f_busy,
  input  logic                  f_ack,
  input  word_t                 f_rdata
);

  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT} ctl_e;

  ctl_e                  st_q;
  logic                  we_q;
  faddr_t                addr_q;
  logic [2:0]            left_q;     // words still to access, including the current one
  logic [NVM_DATA_W-1:0] wbuf_q;     // write data, current word at the top of the field

  assign busy    = (st_q != C_IDLE);
  assign f_req   = (st_q == C_ISSUE);
  assign f_we    = we_q;
  assign f_addr  = addr_q;

  // current word of a write: bits [32*left-1 -: 32] of the right-aligned field
  always_comb begin
    f_wdata = '0;
    for (int i = 1; i <= 6; i++)
      if (left_q == 3'(i)) f_wdata = wbuf_q[32*i-1 -: 32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= C_IDLE;
      we_q   <= 1'b0;
      addr_q <= '0;
      left_q <= '0;
      wbuf_q <= '0;
      rdata  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st_q)
        C_IDLE: if (req) begin
          st_q   <= C_ISSUE;
          we_q   <= we;
          addr_q <= field_base(field);
          left_q <= field_words(field);
          wbuf_q <= wdata;
          if (!we) rdata <= '0;
        end
        C_ISSUE: if (!f_busy) st_q <= C_WAIT;
        C_WAIT: if (f_ack) begin
          if (!we_q) rdata <= {rdata[NVM_DATA_W-WORD_W-1:0], f_rdata};
          addr_q <= addr_q + 1'b1;
          left_q <= left_q - 3'd1;
          if (left_q == 3'd1) begin
            st_q <= C_IDLE;
            done <= 1'b1;
          end else begin
            st_q <= C_ISSUE;
          end
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  a_no_req_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(req && busy))
    else $error("nvm_ctrl: request while busy");

endmodule
