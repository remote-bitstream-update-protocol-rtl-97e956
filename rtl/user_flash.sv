// user_flash: behavioural model of the on-chip user flash of a flash-based FPGA.
//
// This is a model, not the vendor's flash macro: a 32-bit word array that keeps its contents
// through `rst_n` (only the access logic is reset), as non-volatile memory keeps them through a
// power cycle. Access port: raise `req` with `we`, `addr` and `wdata` while `busy` is low; the
// request is taken in that cycle and `ack` pulses RD_LAT cycles later (RD_LAT, WR_LAT >= 2) for a read (with `rdata`)
// or WR_LAT cycles later for a program. Programming replaces the word (page erase and program are
// folded into one operation). Factory port: `prog_we` writes `prog_wdata` at `prog_addr` at once
// and `prog_rdata` shows the word at `prog_addr`; it stands for the JTAG programming of keys,
// TAG_F and flag before deployment and lets a test bench inspect the memory. The word width,
// the latencies and the port layout are this design's choices; the defaults bring the times of
// the protocol steps close to the cycle counts reported for the flash FPGA implementation.
module user_flash
  import su_pkg::*;
#(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned RD_LAT = 7,
  parameter int unsigned WR_LAT = 35
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  input  logic   we,
  input  faddr_t addr,
  input  word_t  wdata,
  output logic   busy,
  output logic   ack,
  output word_t  rdata,
  input  logic   prog_we,
  input  faddr_t prog_addr,
  input  word_t  prog_wdata,
  output word_t  prog_rdata
);

  localparam int unsigned LW = $clog2((RD_LAT > WR_LAT ? RD_LAT : WR_LAT) + 1);

  word_t         mem [DEPTH];
  logic [LW-1:0] wait_q;
  logic          we_q;
  faddr_t        addr_q;
  word_t         wdata_q;

  assign prog_rdata = mem[prog_addr];

  always_ff @(posedge clk) begin
    if (prog_we) begin
      mem[prog_addr] <= prog_wdata;
    end else if (rst_n && busy && wait_q == LW'(1) && we_q) begin
      mem[addr_q] <= wdata_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      ack     <= 1'b0;
      wait_q  <= '0;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata   <= '0;
    end else begin
      ack <= 1'b0;
      if (!busy) begin
        if (req) begin
          busy    <= 1'b1;
          we_q    <= we;
          addr_q  <= addr;
          wdata_q <= wdata;
          wait_q  <= we ? LW'(WR_LAT - 1) : LW'(RD_LAT - 1);
        end
      end else if (wait_q == LW'(1)) begin
        busy <= 1'b0;
        ack  <= 1'b1;
        if (!we_q) rdata <= mem[addr_q];
      end else begin
        wait_q <= wait_q - 1'b1;
      end
    end
  end

endmodule
