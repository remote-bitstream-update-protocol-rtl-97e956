// tb_rsa_verify: self-checking test of the RSA verification engine.
//
// Full size (W = 1024, E = 65537): a signature made with an independent RSA implementation over
// a 1024-bit modulus (two 512-bit primes) must verify, and the same signature with one bit
// flipped must not; the time must be 19 * 1027 + 1 cycles. Reduced size (W = 64): random odd
// moduli, bases and exponents, checked against S^E mod N computed by the bench with 128-bit
// arithmetic (square and multiply), with R2 = 2^128 mod N also computed by the bench.
module tb_rsa_verify;
  localparam logic [1023:0] N1024 = 1024'hf2be6bc48b74691e99e7c79c03a2a6d936ca8de9ca1c3d90333f6da7e6e76955ade0923b7c9e85e974042d58c64a6d033c806d1dba9eab809625a5738635d5a442392758b9f2afa9203d906f714bc04ae116d5539a589c3ed5b79576aa7d6c508ef210f9af323d8c7002f47600990acc4380e6d704f72af0a07a99838c6d3c47;
  localparam logic [1023:0] R2_1024 = 1024'h1842dd0d408d13510f79a4f42e28743ad3116c71806c05565f4027ac20bd08b547ec97315bf11acfb4ce501a118428ec427d82219b1d81d82d3cb3bac1e2a01bd748899a7376635f8e67be986f7f2e2ba7b71eda10e0e708921dfa282f46a4cb6131dccb04ad0a005334c305c9ba47bdc6f7ad0d887eed67060bc2a989c34793;
  localparam logic [1023:0] SIG1024 = 1024'h58a2d9049aa313961cb2523b0803c54ab82c61e422c6344782360eb1ffbb2c845992e5bb4e6daf0d0befdbf4b2f72fda7eb7359d70743b07071968cee5b140211ad4cd82755bab8e65a507341b09163be8bdd6232321ae4bdc0b95be9c732eae6ca8dc9ceb792fff3f806fc071364ed4e42adaaaee9b3dd0908c7e30b46e8d82;
  localparam logic [1023:0] EM1024 = 1024'h000000dbba23cac3d2e5f14a69626116b45ba9dad70bbd96ed14b3e2ed1f9bd8b93b29a5ac2e9dbb4478d4a3daed4b3aef8d4187c710d576a12a44bdd5574af42ff9a7375964295030fe428f67fa3020f64a4a6f88696de06b9bebda01d8a36aa106b90e1fa9166f18a7af086995e1cad7a34d8d36de6aee11f16fa9a356f797;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // full-size instance
  logic          start_l = 1'b0;
  logic [1023:0] sig_l = '0;
  logic          busy_l, done_l, match_l;
  logic [1023:0] result_l;
  rsa_verify dut_l (
    .clk, .rst_n, .start(start_l), .modulus(N1024), .r2(R2_1024), .exponent(17'd65537),
    .sig(sig_l), .em(EM1024), .busy(busy_l), .done(done_l), .result(result_l), .match(match_l));

  // reduced instance
  logic          start_s = 1'b0;
  logic [63:0]   n_s = 64'hF, r2_s = '0, sig_s = '0, em_s = '0;
  logic [16:0]   e_s = 17'h10001;
  logic          busy_s, done_s, match_s;
  logic [63:0]   result_s;
  rsa_verify #(.W(64), .E_W(17)) dut_s (
    .clk, .rst_n, .start(start_s), .modulus(n_s), .r2(r2_s), .exponent(e_s),
    .sig(sig_s), .em(em_s), .busy(busy_s), .done(done_s), .result(result_s), .match(match_s));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] mulmod(input logic [63:0] a, input logic [63:0] b, input logic [63:0] n);
    logic [127:0] t;
    t = 128'(a) * 128'(b);
    return 64'(t % 128'(n));
  endfunction

  function automatic logic [63:0] powmod(input logic [63:0] s, input logic [16:0] e, input logic [63:0] n);
    logic [63:0] r;
    r = 64'(128'(1) % 128'(n));
    for (int i = 16; i >= 0; i--) begin
      r = mulmod(r, r, n);
      if (e[i]) r = mulmod(r, s, n);
    end
    return r;
  endfunction

  task automatic run_l(input logic [1023:0] s, input bit exp_match);
    int n;
    @(negedge clk);
    sig_l = s; start_l = 1'b1;
    @(negedge clk);
    start_l = 1'b0;
    n = 1;
    while (!done_l && n < 30000) begin @(negedge clk); n++; end
    check(n == 19 * 1027 + 1, $sformatf("1024-bit verification time %0d cycles", n));
    check(match_l == exp_match, "1024-bit match flag");
    if (exp_match) check(result_l == EM1024, "1024-bit S^E mod N");
  endtask

  initial begin
    logic [63:0] exp_r, p64;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_l(SIG1024, 1'b1);
    run_l(SIG1024 ^ 1024'h1, 1'b0);
    for (int k = 0; k < 40; k++) begin
      n_s   = {1'b1, 31'($urandom), $urandom} | 64'h1;
      sig_s = 64'({$urandom, $urandom} % 128'(n_s));
      e_s   = (k % 4 == 0) ? 17'h10001 : {1'b1, 16'($urandom)};
      p64   = 64'((128'(1) << 64) % 128'(n_s));
      r2_s  = mulmod(p64, p64, n_s);
      exp_r = powmod(sig_s, e_s, n_s);
      em_s  = (k % 3 == 0) ? exp_r ^ 64'h100 : exp_r;
      @(negedge clk);
      start_s = 1'b1;
      @(negedge clk);
      start_s = 1'b0;
      while (!done_s) @(negedge clk);
      check(result_s == exp_r, $sformatf("64-bit %h^%h mod %h = %h, expected %h", sig_s, e_s, n_s, result_s, exp_r));
      check(match_s == (k % 3 != 0), "64-bit match flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
