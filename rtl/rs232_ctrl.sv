// rs232_ctrl: serial network controller of the secure-update subsystem.
//
// Carries the protocol's 64-bit messages over an RS232 line as eight bytes, most significant
// byte first. Receive side: bytes from uart_rx are shifted into a 64-bit register; after the
// eighth byte `cmd_valid` pulses for one cycle with the complete block on `cmd`. If the line
// stays idle for IDLE_BITS bit times in the middle of a message, the partial message is
// discarded so that the next byte starts a new block. Transmit side: a 64-bit block is taken
// with a valid/ready handshake (`tx_ready` is high while nothing is being sent) and sent as
// eight bytes back to back. The bit rate is CLK_HZ/BAUD. The document names an RS232 link; the
// byte order, the framing of blocks and the idle timeout are this design's choices.
module rs232_ctrl #(
  parameter int unsigned CLK_HZ    = 60_000_000,
  parameter int unsigned BAUD      = 115_200,
  parameter int unsigned IDLE_BITS = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rxd,
  output logic        txd,
  output logic        cmd_valid,
  output logic [63:0] cmd,
  input  logic        tx_valid,
  input  logic [63:0] tx_block,
  output logic        tx_ready
);

  localparam int unsigned CPB    = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned IDLE_C = CPB * IDLE_BITS;
  localparam int unsigned IW     = $clog2(IDLE_C + 1);

  // ---------------- receive ----------------
  logic          rx_valid;
  logic [7:0]    rx_byte;
  logic [2:0]    rx_cnt_q;
  logic [63:0]   rx_shift_q;
  logic [IW-1:0] idle_q;

  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .data(rx_byte)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt_q   <= '0;
      rx_shift_q <= '0;
      idle_q     <= '0;
      cmd_valid  <= 1'b0;
      cmd        <= '0;
    end else begin
      cmd_valid <= 1'b0;
      if (rx_valid) begin
        idle_q     <= '0;
        rx_shift_q <= {rx_shift_q[55:0], rx_byte};
        rx_cnt_q   <= rx_cnt_q + 3'd1;
        if (rx_cnt_q == 3'd7) begin
          cmd_valid <= 1'b1;
          cmd       <= {rx_shift_q[55:0], rx_byte};
        end
      end else if (rx_cnt_q != 3'd0) begin
        if (idle_q == IW'(IDLE_C)) begin
          rx_cnt_q <= '0;
          idle_q   <= '0;
        end else begin
          idle_q <= idle_q + 1'b1;
        end
      end
    end
  end

  // ---------------- transmit ----------------
  logic        utx_ready;
  logic        sending_q;
  logic [2:0]  tx_cnt_q;
  logic [63:0] tx_shift_q;

  assign tx_ready = !sending_q;

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (
    .clk, .rst_n, .valid(sending_q), .data(tx_shift_q[63:56]), .ready(utx_ready), .txd
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending_q  <= 1'b0;
      tx_cnt_q   <= '0;
      tx_shift_q <= '0;
    end else if (!sending_q) begin
      if (tx_valid) begin
        sending_q  <= 1'b1;
        tx_shift_q <= tx_block;
        tx_cnt_q   <= '0;
      end
    end else if (utx_ready) begin
      // uart_tx takes the current top byte in this cycle
      tx_shift_q <= {tx_shift_q[55:0], 8'h00};
      tx_cnt_q   <= tx_cnt_q + 3'd1;
      if (tx_cnt_q == 3'd7) sending_q <= 1'b0;
    end
  end

endmodule
