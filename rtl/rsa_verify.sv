// rsa_verify: RSA signature verification engine, S^E mod N compared with the expected message.
//
// Checks a signature the way the boot loader of the secure-boot case study checks the kernel
// signature: the public-key operation M' = S^E mod N is computed and compared with the encoded
// message EM that the loader built from the kernel hash. Exponentiation is left-to-right
// binary over Montgomery products from mont_mul: S is brought into Montgomery form with the
// precomputed R2 = 2^(2W) mod N, each further exponent bit costs a squaring and, for a 1 bit, a
// multiplication by S, and a final product by 1 leaves Montgomery form. The most significant
// bit of the E_W-bit exponent must be 1 (E = 65537 with E_W = 17 by default).
//
// Interface: pulse `start` with `modulus` (odd), `r2`, `exponent`, `sig` and `em`, all held
// until `done`. `done` pulses once with `result` = S^E mod N and `match` = (result == em).
// Timing: 2 + (E_W-1) + (popcount(E)-1) products, each taking W+3 cycles (W+2 in mont_mul and
// one to start the next), plus one cycle: for W = 1024, E = 65537, 19 * 1027 + 1 = 19 514
// cycles, about 0.2 ms at 100 MHz. The document names an
// RSA-1024 verification and its cycle count; the exponent, the Montgomery datapath and the
// interface are this design's choices.
module rsa_verify #(
  parameter int unsigned W   = 1024,
  parameter int unsigned E_W = 17
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   modulus,
  input  logic [W-1:0]   r2,
  input  logic [E_W-1:0] exponent,
  input  logic [W-1:0]   sig,
  input  logic [W-1:0]   em,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   result,
  output logic           match
);

  typedef enum logic [2:0] {R_IDLE, R_TOMONT, R_SQR, R_MUL, R_FROMMONT} rsa_state_e;

  rsa_state_e st_q;
  logic [W-1:0] xm_q;     // S in Montgomery form
  logic [W-1:0] acc_q;    // running power in Montgomery form
  logic [$clog2(E_W)-1:0] bit_q;   // exponent bit handled by the next squaring
  logic         issue_q;  // start the product of the current state in this cycle

  logic         mm_done;
  logic [W-1:0] mm_a, mm_b, mm_p;

  mont_mul #(.W(W)) u_mm (
    .clk, .rst_n, .start(issue_q), .a(mm_a), .b(mm_b), .n(modulus), .done(mm_done), .p(mm_p)
  );

  always_comb begin
    case (st_q)
      R_TOMONT:   begin mm_a = sig;   mm_b = r2;    end
      R_SQR:      begin mm_a = acc_q; mm_b = acc_q; end
      R_MUL:      begin mm_a = acc_q; mm_b = xm_q;  end
      default:    begin mm_a = acc_q; mm_b = W'(1); end
    endcase
  end

  assign busy = (st_q != R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= R_IDLE;
      xm_q    <= '0;
      acc_q   <= '0;
      bit_q   <= '0;
      issue_q <= 1'b0;
      done    <= 1'b0;
      result  <= '0;
      match   <= 1'b0;
    end else begin
      done    <= 1'b0;
      issue_q <= 1'b0;
      case (st_q)
        R_IDLE: if (start) begin
          st_q    <= R_TOMONT;
          issue_q <= 1'b1;
        end
        R_TOMONT: if (mm_done) begin
          xm_q    <= mm_p;
          acc_q   <= mm_p;                  // leading exponent bit is 1
          bit_q   <= $bits(bit_q)'(E_W - 2);
          st_q    <= (E_W > 1) ? R_SQR : R_FROMMONT;
          issue_q <= 1'b1;
        end
        R_SQR: if (mm_done) begin
          acc_q   <= mm_p;
          issue_q <= 1'b1;
          if (exponent[bit_q]) st_q <= R_MUL;
          else if (bit_q == '0) st_q <= R_FROMMONT;
          else bit_q <= bit_q - 1'b1;
        end
        R_MUL: if (mm_done) begin
          acc_q   <= mm_p;
          issue_q <= 1'b1;
          if (bit_q == '0) st_q <= R_FROMMONT;
          else begin
            bit_q <= bit_q - 1'b1;
            st_q  <= R_SQR;
          end
        end
        R_FROMMONT: if (mm_done) begin
          result <= mm_p;
          match  <= (mm_p == em);
          done   <= 1'b1;
          st_q   <= R_IDLE;
        end
        default: st_q <= R_IDLE;
      endcase
    end
  end

  a_msb_set: assert property (@(posedge clk) disable iff (!rst_n) start |-> exponent[E_W-1])
    else $error("rsa_verify: exponent must have its top bit set");

endmodule
