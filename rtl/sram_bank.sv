// sram_bank: one 256 kB SRAM bank, 32000 words of 64 bits (four 16-bit
// samples), single port.
//
// An access is requested by holding en high at a rising clock edge with rw
// selecting read (0) or write (1), addr and, for a write, wdata. A write
// updates the array at that edge. A read captures the word at that edge and
// presents it on rdata from then on, so the data can be used at the
// following edge: every access takes two clock transitions, as the bank
// model of the design requires. rdata holds its value until the next read.
//
// From the document: size, word width, the R/W polarity and the two-edge
// access. This implementation's own choice: the per-bank SRAM clock of the
// design is expressed as a clock enable (en) on the system clock, and the
// array is a plain synthesizable memory standing in for the real macro.
module sram_bank
  import lidar_pkg::*;
#(
  parameter int unsigned DEPTH = BANK_DEPTH,
  parameter int unsigned AW    = 15
) (
  input  logic              clk,
  input  logic              en,
  input  logic              rw,     // 0 = read, 1 = write
  input  logic [AW-1:0]     addr,
  input  logic [BANK_W-1:0] wdata,
  output logic [BANK_W-1:0] rdata
);

  logic [BANK_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (rw) mem[addr]  <= wdata;
      else    rdata      <= mem[addr];
    end
  end

  // Accesses beyond the bank are a caller error.
  always_ff @(posedge clk) begin
    if (en) assert (int'(addr) < DEPTH) else $error("sram_bank: address %0d out of range", addr);
  end

endmodule
