// tb_sram_bank: self-checking test of the SRAM bank model.
// Writes random words to random addresses, reads them back and checks the
// two-edge read (data valid after the edge that takes the request) against a
// reference copy kept in the testbench; also checks rdata holds between reads.
module tb_sram_bank;
  import lidar_pkg::*;

  localparam int DEPTH = 1024;
  logic clk = 0;
  logic en, rw;
  logic [14:0] addr;
  logic [63:0] wdata, rdata;
  logic [63:0] ref_mem [DEPTH];
  bit          ref_ok  [DEPTH];
  int checks = 0, failures = 0;

  sram_bank #(.DEPTH(DEPTH), .AW(15)) dut (.clk, .en, .rw, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] held;
    en = 0; rw = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) ref_ok[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1) == 1 || !ref_ok[a]) begin
        en = 1; rw = 1; addr = 15'(a); wdata = {$urandom, $urandom};
        ref_mem[a] = wdata; ref_ok[a] = 1;
        @(negedge clk);
      end else begin
        en = 1; rw = 0; addr = 15'(a);
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== ref_mem[a]) begin
          failures++;
          if (failures < 10) $display("read %0d got %h exp %h", a, rdata, ref_mem[a]);
        end
        held = rdata;
        // a write elsewhere must not disturb the read register
        en = 1; rw = 1; addr = 15'((a + 1) % DEPTH); wdata = {$urandom, $urandom};
        ref_mem[(a + 1) % DEPTH] = wdata; ref_ok[(a + 1) % DEPTH] = 1;
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
