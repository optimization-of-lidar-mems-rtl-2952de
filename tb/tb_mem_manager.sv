// tb_mem_manager: self-checking test of the memory manager with four SRAM
// bank models.
// The testbench plays the assembler, AVG and controller: it streams words of
// two samples in the assembler's order (with random pauses), adds the value
// the memory manager returns on AVG Input 2 (divided on the last sweep), and
// keeps its own reference of every running sum. Checked: the clear after
// reset takes DEPTH clocks and leaves zeros, AVG Input 2 equals the
// reference every word, sweep_end comes with the last word of each sweep,
// each used bank gets exactly one read and one write per group (unused banks
// none), and after each run the banks hold the averages at the documented
// addresses (address = column*N/2 + p, ADC 2b in bits 31:0, 2b+1 in 63:32).
module tb_mem_manager;
  import lidar_pkg::*;
  import tb_pkg::*;

  localparam int DEPTH = 64;
  localparam int COLS  = 3;

  logic clk = 0, rst = 1;
  mode_t mode;
  logic first_sweep, in_valid = 0;
  logic [31:0] avg_result, avg_prev;
  bank_req_t   bank_req  [NUM_BANKS];
  logic [63:0] bank_rdata[NUM_BANKS];
  logic ready, sweep_end;
  int checks = 0, failures = 0;

  mem_manager #(.DEPTH(DEPTH), .COLS(COLS)) dut (.*);

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH), .AW(15)) u (.clk, .en(bank_req[b].en), .rw(bank_req[b].rw),
      .addr(bank_req[b].addr), .wdata(bank_req[b].wdata), .rdata(bank_rdata[b]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  // bank access counters per group
  int rd_cnt[NUM_BANKS], wr_cnt[NUM_BANKS];
  always @(posedge clk) begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      if (bank_req[b].en && ready) begin
        if (bank_req[b].rw) wr_cnt[b]++; else rd_cnt[b]++;
      end
    end
  end

  function automatic logic [63:0] bank_word(input int b, input int a);
    case (b)
      0: return g_bank[0].u.mem[a];
      1: return g_bank[1].u.mem[a];
      2: return g_bank[2].u.mem[a];
      default: return g_bank[3].u.mem[a];
    endcase
  endfunction

  int unsigned ref_sum [COLS][8][16];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input scm_e scm, input int unsigned spp, input int unsigned shift,
                     input int unsigned runs, input int unsigned seed);
    int unsigned nadc, nb, sweeps, clr;
    nadc = (scm == SCM_2) ? 8 : 4;
    nb = nadc / 2;
    sweeps = 1 << shift;
    mode = '0; mode.scm = scm; mode.dtm = (scm == SCM_2) ? DTM_2_1 : DTM_1;
    mode.spp = 12'(spp); mode.avg = avg_e'(shift); mode.valid = 1;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    clr = 0;
    while (!ready) begin @(negedge clk); clr++; end
    check(clr == DEPTH, $sformatf("clear took %0d clocks", clr));
    for (int b = 0; b < NUM_BANKS; b++)
      for (int a = 0; a < DEPTH; a++)
        if (bank_word(b, a) != 0) begin check(0, "bank not cleared"); break; end
    for (int r = 0; r < runs; r++) begin
      for (int s = 0; s < sweeps; s++) begin
        first_sweep = (s == 0);
        for (int c = 0; c < COLS; c++) begin
          for (int p = 0; p < spp / 2; p++) begin
            for (int b = 0; b < NUM_BANKS; b++) begin rd_cnt[b] = 0; wr_cnt[b] = 0; end
            for (int n = 0; n < nadc; n++) begin
              logic [15:0] x0, x1;
              int unsigned p0, p1, s0, s1;
              while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
              x0 = sample(seed + r, s, c, n, 2 * p, 12);
              x1 = sample(seed + r, s, c, n, 2 * p + 1, 12);
              p0 = (s == 0) ? 0 : ref_sum[c][n][2 * p];
              p1 = (s == 0) ? 0 : ref_sum[c][n][2 * p + 1];
              in_valid = 1;
              #1;
              check(avg_prev == {16'(p1), 16'(p0)},
                    $sformatf("AVG Input 2 run %0d sweep %0d col %0d p %0d adc %0d: %h exp %h",
                              r, s, c, p, n, avg_prev, {16'(p1), 16'(p0)}));
              s0 = x0 + p0; s1 = x1 + p1;
              if (s == sweeps - 1) begin s0 = s0 >> shift; s1 = s1 >> shift; end
              ref_sum[c][n][2 * p] = s0; ref_sum[c][n][2 * p + 1] = s1;
              avg_result = {16'(s1), 16'(s0)};
              #1;
              check(sweep_end == (c == COLS - 1 && p == spp / 2 - 1 && n == nadc - 1), "sweep_end");
              @(negedge clk);
            end
            in_valid = 0;
            @(negedge clk);
            for (int b = 0; b < NUM_BANKS; b++) begin
              // bank 0's read for the next group lands in this group
              check(wr_cnt[b] == ((b < nb) ? 1 : 0) && rd_cnt[b] == ((b < nb) ? 1 : 0),
                    $sformatf("bank %0d accesses rd %0d wr %0d", b, rd_cnt[b], wr_cnt[b]));
            end
          end
        end
      end
      // banks hold the averages
      for (int c = 0; c < COLS; c++)
        for (int p = 0; p < spp / 2; p++)
          for (int b = 0; b < nb; b++) begin
            logic [63:0] e;
            e = {16'(ref_sum[c][2*b+1][2*p+1]), 16'(ref_sum[c][2*b+1][2*p]),
                 16'(ref_sum[c][2*b][2*p+1]),   16'(ref_sum[c][2*b][2*p])};
            check(bank_word(b, c * spp / 2 + p) == e,
                  $sformatf("bank %0d addr %0d = %h exp %h", b, c * spp / 2 + p,
                            bank_word(b, c * spp / 2 + p), e));
          end
    end
  endtask

  initial begin
    mode = '0; first_sweep = 1; avg_result = 0;
    run(SCM_1, 4, 1, 2, 10);
    run(SCM_1, 6, 2, 2, 20);
    run(SCM_2, 4, 3, 2, 30);
    run(SCM_2, 2, 1, 3, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
