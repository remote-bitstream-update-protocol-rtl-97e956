// tb_nvm_ctrl: self-checking test of the flash controller.
//
// The controller is connected to the user flash model. The bench loads a known image through
// the factory port, reads each protocol field and compares it with the words of the image
// assembled by the bench (base word most significant), writes new field values and checks the
// flash words directly, and checks the access time of n*(RD_LAT+1)+1 or n*(WR_LAT+1)+1 cycles
// for a field of n words.
module tb_nvm_ctrl;
  import su_pkg::*;
  localparam int RD = 7, WR = 35;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, we = 1'b0;
  nvm_field_e field = F_TAG_F;
  logic [NVM_DATA_W-1:0] wdata = '0, rdata;
  logic busy, done;
  logic f_req, f_we, f_busy, f_ack;
  faddr_t f_addr;
  word_t f_wdata, f_rdata;
  logic prog_we = 1'b0;
  faddr_t prog_addr = '0;
  word_t prog_wdata = '0, prog_rdata;
  word_t img [32];
  int checks = 0, failures = 0;

  nvm_ctrl dut (.*);
  user_flash #(.DEPTH(32), .RD_LAT(RD), .WR_LAT(WR)) u_flash (
    .clk, .rst_n, .req(f_req), .we(f_we), .addr(f_addr), .wdata(f_wdata), .busy(f_busy),
    .ack(f_ack), .rdata(f_rdata), .prog_we, .prog_addr, .prog_wdata, .prog_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the bench's own copy of the memory map
  function automatic int base_of(nvm_field_e f);
    case (f) F_TAG_F: return 0; F_FLAG: return 2; F_KREQ: return 4; F_KACK1: return 10; default: return 16; endcase
  endfunction
  function automatic int len_of(nvm_field_e f);
    case (f) F_TAG_F: return 2; F_FLAG: return 1; default: return 6; endcase
  endfunction

  task automatic op(input bit w, input nvm_field_e f, input logic [NVM_DATA_W-1:0] d,
                    output logic [NVM_DATA_W-1:0] q);
    int n;
    @(negedge clk);
    req = 1'b1; we = w; field = f; wdata = d;
    @(negedge clk);
    req = 1'b0; wdata = '0;
    n = 1;
    while (!done) begin @(negedge clk); n++; if (n > 1000) break; end
    check(n == len_of(f) * ((w ? WR : RD) + 1) + 1, $sformatf("field %s time %0d", f.name(), n));
    q = rdata;
  endtask

  initial begin
    logic [NVM_DATA_W-1:0] q, e;
    nvm_field_e f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      img[i] = $urandom;
      prog_we = 1'b1; prog_addr = faddr_t'(i); prog_wdata = img[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    f = f.first();
    forever begin
      e = '0;
      for (int i = 0; i < len_of(f); i++) e = {e[NVM_DATA_W-33:0], img[base_of(f) + i]};
      op(1'b0, f, '0, q);
      check(q == e, $sformatf("read %s", f.name()));
      if (f == f.last()) break;
      f = f.next();
    end
    // writes
    op(1'b1, F_TAG_F, {128'h0, 64'h0000_0005_0000_0007}, q);
    op(1'b1, F_FLAG, 192'h1, q);
    e = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    op(1'b1, F_KACK1, e, q);
    prog_addr = 5'd0; #1 check(prog_rdata == 32'h5, "TAG_F high word");
    prog_addr = 5'd1; #1 check(prog_rdata == 32'h7, "TAG_F low word");
    prog_addr = 5'd2; #1 check(prog_rdata == 32'h1, "flag word");
    prog_addr = 5'd3; #1 check(prog_rdata == img[3], "word after flag untouched");
    for (int i = 0; i < 6; i++) begin
      prog_addr = faddr_t'(10 + i); #1;
      check(prog_rdata == e[191 - 32*i -: 32], $sformatf("K_ack1 word %0d", i));
    end
    prog_addr = 5'd16; #1 check(prog_rdata == img[16], "K_ack2 untouched");
    op(1'b0, F_KACK1, '0, q);
    check(q == e, "K_ack1 read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
