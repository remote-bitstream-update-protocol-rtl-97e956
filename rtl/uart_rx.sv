// uart_rx: RS232 byte receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// The line is synchronised with two flip-flops. A falling edge starts a frame; the start bit is
// re-checked at its middle, then each data bit and the stop bit are sampled at the middle of
// their bit time (CLKS_PER_BIT clock cycles per bit). A frame whose stop bit is 0 is dropped.
// `valid` pulses for one cycle with `data` in the cycle after the stop bit has been sampled.
// Frame format, mid-bit sampling and the dropping of bad frames are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 521
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT) + 1;
  localparam logic [CW-1:0] HALF = CW'(CLKS_PER_BIT / 2);
  localparam logic [CW-1:0] FULL = CW'(CLKS_PER_BIT - 1);

  logic [1:0]    sync_q;
  logic          busy_q;
  logic [3:0]    bit_q;       // 0: start bit, 1-8: data, 9: stop
  logic [CW-1:0] cnt_q;
  logic [7:0]    shift_q;
  logic          line;

  assign line = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= 2'b11;
      busy_q  <= 1'b0;
      bit_q   <= '0;
      cnt_q   <= '0;
      shift_q <= '0;
      valid   <= 1'b0;
      data    <= '0;
    end else begin
      sync_q <= {sync_q[0], rxd};
      valid  <= 1'b0;
      if (!busy_q) begin
        if (!line) begin
          busy_q <= 1'b1;
          bit_q  <= '0;
          cnt_q  <= '0;
        end
      end else if ((bit_q == 4'd0) ? (cnt_q == HALF) : (cnt_q == FULL)) begin
        cnt_q <= '0;
        if (bit_q == 4'd0) begin
          if (line) busy_q <= 1'b0;          // glitch, not a start bit
          else      bit_q  <= 4'd1;
        end else if (bit_q == 4'd9) begin
          busy_q <= 1'b0;
          if (line) begin
            valid <= 1'b1;
            data  <= shift_q;
          end
        end else begin
          shift_q <= {line, shift_q[7:1]};
          bit_q   <= bit_q + 4'd1;
        end
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule
