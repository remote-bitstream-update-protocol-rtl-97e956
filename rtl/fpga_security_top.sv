// fpga_security_top: the two hardware designs of the bitstream-protection work, side by side.
//
//  * secure_update: the replay-proof remote update subsystem. It keeps the accepted bitstream
//    version TAG_F in on-chip flash, stops the user design (`alarm`) when the running bitstream
//    carries another version, and authorises exactly one version step per authenticated update
//    command received on the RS232 line, acknowledging with 3-DES encrypted tags.
//  * sha256_core and rsa_verify: the hardware hash engine and the RSA-1024 signature check of
//    the secure-boot case study, in which the boot loader hashes the kernel image read from
//    flash and verifies its signature before starting it. The loader (software) moves the
//    digest into the encoded message it hands to rsa_verify, so the two engines are not wired
//    to each other.
// The designs share only the clock and reset; each has its own ports, prefixed su_, sha_, rsa_.
// Timing is that of the two blocks: a protocol power-up takes 278 cycles to reach the command
// wait at the default flash latencies, a 3-DES encryption 48 cycles, a SHA-256 block 66 cycles,
// an RSA-1024 verification with E = 65537 19 514 cycles. Placing the case study's engines next
// to the update subsystem, rather than inside a processor system, is this design's choice: the
// processor and the DMA around them are not built.
module fpga_security_top
  import su_pkg::*;
#(
  parameter int unsigned CLK_HZ = 60_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter block_t      TAG_UL = 64'h0000_0000_0000_0001
) (
  input  logic         clk,
  input  logic         rst_n,
  // secure update
  input  logic         su_rxd,
  output logic         su_txd,
  output logic         su_alarm,
  output su_state_e    su_state,
  input  logic         su_prog_we,
  input  faddr_t       su_prog_addr,
  input  word_t        su_prog_wdata,
  output word_t        su_prog_rdata,
  // kernel hash engine
  input  logic         sha_blk_valid,
  input  logic         sha_first,
  input  logic [511:0] sha_blk,
  output logic         sha_ready,
  output logic         sha_done,
  output logic [255:0] sha_digest,
  // kernel signature check
  input  logic          rsa_start,
  input  logic [1023:0] rsa_modulus,
  input  logic [1023:0] rsa_r2,
  input  logic [16:0]   rsa_exponent,
  input  logic [1023:0] rsa_sig,
  input  logic [1023:0] rsa_em,
  output logic          rsa_busy,
  output logic          rsa_done,
  output logic [1023:0] rsa_result,
  output logic          rsa_match
);

  secure_update #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .TAG_UL(TAG_UL)) u_update (
    .clk, .rst_n, .rxd(su_rxd), .txd(su_txd), .alarm(su_alarm), .state(su_state),
    .prog_we(su_prog_we), .prog_addr(su_prog_addr), .prog_wdata(su_prog_wdata),
    .prog_rdata(su_prog_rdata)
  );

  sha256_core u_sha (
    .clk, .rst_n, .blk_valid(sha_blk_valid), .first(sha_first), .blk(sha_blk),
    .ready(sha_ready), .done(sha_done), .digest(sha_digest)
  );

  rsa_verify #(.W(1024), .E_W(17)) u_rsa (
    .clk, .rst_n, .start(rsa_start), .modulus(rsa_modulus), .r2(rsa_r2), .exponent(rsa_exponent),
    .sig(rsa_sig), .em(rsa_em), .busy(rsa_busy), .done(rsa_done), .result(rsa_result),
    .match(rsa_match)
  );

endmodule
