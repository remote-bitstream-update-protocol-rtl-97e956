// sha256_core: SHA-256 compression engine (FIPS 180-4), one round per clock.
//
// Hashes a message given as padded 512-bit blocks, the job of the hardware hash core of the
// secure-boot case study, where the boot loader hashes the kernel image before starting it.
// `first` with the first block loads the initial hash value H(0); later blocks continue from the
// running value. The 16 message words are loaded into a shift register that expands the
// message schedule on the fly (W[t] from W[t-16], W[t-15], W[t-7], W[t-2]), so only 16 words
// are stored. The round constants K and H(0) are the standard's: the first 32 bits of the
// fractional parts of the cube roots of the first 64 primes and of the square roots of the
// first 8 primes.
//
// Interface: offer a block with `blk_valid` and `blk` (word 0 in bits [511:480]) while `ready`
// is high; it is taken in that cycle. Timing: 64 rounds, one per cycle, then one cycle to add
// the working variables to the hash value: if the block is taken in cycle 0, `done` is high in
// cycle 66, with `digest` (H0 in bits [255:224]) valid from then until the next block ends. Padding of the message is left to the
// loader that feeds the core. The document names a hardware SHA-256 core and its speed; the
// round-per-cycle architecture and this block interface are this design's choices.
module sha256_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         blk_valid,
  input  logic         first,
  input  logic [511:0] blk,
  output logic         ready,
  output logic         done,
  output logic [255:0] digest
);

  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };
  localparam logic [31:0] H0 [8] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a, 32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  function automatic logic [31:0] rotr(input logic [31:0] x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0] h_q [8];     // hash value H
  logic [31:0] v_q [8];     // working variables a..h
  logic [31:0] w_q [16];    // W[t] .. W[t+15]
  logic [6:0]  t_q;         // round index, 64 = final addition
  logic        busy_q;

  logic [31:0] s0, s1, ch, maj, t1, t2, ws0, ws1, w_new;

  assign ready = !busy_q;

  always_comb begin
    s1    = rotr(v_q[4], 6) ^ rotr(v_q[4], 11) ^ rotr(v_q[4], 25);
    ch    = (v_q[4] & v_q[5]) ^ (~v_q[4] & v_q[6]);
    t1    = v_q[7] + s1 + ch + K[t_q[5:0]] + w_q[0];
    s0    = rotr(v_q[0], 2) ^ rotr(v_q[0], 13) ^ rotr(v_q[0], 22);
    maj   = (v_q[0] & v_q[1]) ^ (v_q[0] & v_q[2]) ^ (v_q[1] & v_q[2]);
    t2    = s0 + maj;
    ws0   = rotr(w_q[1], 7) ^ rotr(w_q[1], 18) ^ (w_q[1] >> 3);
    ws1   = rotr(w_q[14], 17) ^ rotr(w_q[14], 19) ^ (w_q[14] >> 10);
    w_new = ws1 + w_q[9] + ws0 + w_q[0];
  end

  always_comb
    for (int i = 0; i < 8; i++) digest[255 - 32*i -: 32] = h_q[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
      t_q    <= '0;
      for (int i = 0; i < 8; i++)  begin h_q[i] <= H0[i]; v_q[i] <= '0; end
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy_q) begin
        if (blk_valid) begin
          busy_q <= 1'b1;
          t_q    <= '0;
          for (int i = 0; i < 16; i++) w_q[i] <= blk[511 - 32*i -: 32];
          for (int i = 0; i < 8; i++) begin
            v_q[i] <= first ? H0[i] : h_q[i];
            if (first) h_q[i] <= H0[i];
          end
        end
      end else if (t_q == 7'd64) begin
        for (int i = 0; i < 8; i++) h_q[i] <= h_q[i] + v_q[i];
        busy_q <= 1'b0;
        done   <= 1'b1;
      end else begin
        v_q[0] <= t1 + t2;
        v_q[1] <= v_q[0];
        v_q[2] <= v_q[1];
        v_q[3] <= v_q[2];
        v_q[4] <= v_q[3] + t1;
        v_q[5] <= v_q[4];
        v_q[6] <= v_q[5];
        v_q[7] <= v_q[6];
        for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
        w_q[15] <= w_new;
        t_q <= t_q + 7'd1;
      end
    end
  end

endmodule
