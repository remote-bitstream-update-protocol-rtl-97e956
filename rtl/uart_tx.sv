// uart_tx: RS232 byte transmitter, 8 data bits, no parity, one stop bit, LSB first.
//
// A byte is accepted with a valid/ready handshake when the transmitter is idle; the line then
// carries a start bit (0), eight data bits and a stop bit (1), each CLKS_PER_BIT clock cycles
// long, so one byte occupies 10*CLKS_PER_BIT cycles. `txd` idles high. Frame format and bit
// timing are the usual RS232 conventions, chosen by this design.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 521
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  logic [9:0]  frame_q;     // remaining bits, LSB goes out first
  logic [3:0]  bits_q;      // bits still to send, including the current one
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt_q;

  assign ready = (bits_q == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '1;
      bits_q  <= '0;
      cnt_q   <= '0;
      txd     <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (valid) begin
        frame_q <= {1'b1, data, 1'b0};
        bits_q  <= 4'd10;
        cnt_q   <= '0;
        txd     <= 1'b0;
      end
    end else if (cnt_q == CLKS_PER_BIT[$bits(cnt_q)-1:0] - 1'b1) begin
      cnt_q   <= '0;
      frame_q <= {1'b1, frame_q[9:1]};
      bits_q  <= bits_q - 4'd1;
      txd     <= (bits_q == 4'd1) ? 1'b1 : frame_q[1];
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
