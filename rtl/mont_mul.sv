// mont_mul: bit-serial Montgomery modular multiplier, P = A * B * 2^-W mod N.
//
// Radix-2 Montgomery multiplication (Montgomery, 1985): for each bit a_i of A, least
// significant first, T = T + a_i*B, then T = T + N if T is odd, then T = T / 2. After W steps
// T < 2N, and one more cycle subtracts N if T >= N. The modulus N must be odd and A, B < N.
// Interface: pulse `start` with `a`, `b`, `n` (held stable until `done`); `done` pulses for one
// cycle W+2 cycles after `start` (W steps and the final reduction), with `p` valid until the
// next start. This is a helper of
// rsa_verify; its architecture is this design's choice.
module mont_mul #(
  parameter int unsigned W = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic         done,
  output logic [W-1:0] p
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  a_q;
  logic [W+1:0]  t_q;
  logic [CW-1:0] cnt_q;
  logic          busy_q;
  logic [W+1:0]  t_add, t_red, t_sub;

  always_comb begin
    t_add = t_q + (a_q[0] ? {2'b00, b} : '0);
    t_red = t_add + (t_add[0] ? {2'b00, n} : '0);
    t_sub = t_q - {2'b00, n};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      t_q    <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done   <= 1'b0;
      p      <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q    <= a;
        t_q    <= '0;
        cnt_q  <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        if (cnt_q == CW'(W)) begin
          // final reduction: T < 2N here
          p      <= (t_q >= {2'b00, n}) ? t_sub[W-1:0] : t_q[W-1:0];
          busy_q <= 1'b0;
          done   <= 1'b1;
        end else begin
          t_q   <= t_red >> 1;
          a_q   <= a_q >> 1;
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
