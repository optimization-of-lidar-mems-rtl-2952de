// tb_averager: one averager with its four SRAM banks, at the default sizes,
// in the slowest-starting configuration: connection mode 2, transfer mode 2.2,
// 2000 samples per pixel, 10-bit samples, averaging by 2, 20 columns.
//
// Checked: the bank clear after reset (32000 clocks), the start-up lag of
// the assembler (first word reaches the AVG 4004 interface words after the
// stream starts, 16.016 us at 250 MHz), one sweep over the set taking
// 160000 words at one word per clock, and after the run every used address
// of the four banks holding the averages of the two sweeps (computed from the
// sample model) with the last 37.5 % of every bank (addresses 20000-31999)
// untouched.
module tb_averager;
  import lidar_pkg::*;
  import tb_pkg::*;

  localparam int SPP = 2000, COLS = 20, SHIFT = 1, BITS = 10;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge before the first clock resets the synchroniser
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_SCM;
  logic [15:0] cfg_wdata = 0;
  logic laser_sync = 0, mirror_sync = 0, rif_valid = 0, drain = 0;
  logic [31:0] rif_data = 0;
  bank_req_t   bank_req  [NUM_BANKS];
  logic [63:0] bank_rdata[NUM_BANKS];
  mode_t mode;
  logic ready, running, last_sweep, avg_valid;
  logic [31:0] avg_data;
  logic [2:0] data_sweep, sensor_sweep;
  logic [4:0] sensor_column;
  int checks = 0, failures = 0;

  averager dut (.*);

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    sram_bank u (.clk, .en(bank_req[b].en), .rw(bank_req[b].rw), .addr(bank_req[b].addr),
                 .wdata(bank_req[b].wdata), .rdata(bank_rdata[b]));
  end

  function automatic logic [63:0] bank_word(input int b, input int a);
    case (b)
      0: return g_bank[0].u.mem[a];
      1: return g_bank[1].u.mem[a];
      2: return g_bank[2].u.mem[a];
      default: return g_bank[3].u.mem[a];
    endcase
  endfunction

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  // count interface words accepted before the first word reaches the AVG,
  // and words reaching the AVG per sweep
  int unsigned in_words, first_out_at, avg_words, sweep_words[4], sweep_idx;
  bit first_out;
  int unsigned clear_clocks = 0;
  logic [2:0] prev_sweep = 0;
  // the reset synchroniser adds two clocks between rst_n rising and the
  // start of the clear
  always @(posedge clk) begin
    if (rst_n && !ready) clear_clocks++;
    if (rif_valid) in_words++;
    // data_sweep advances at the edge that accepted the last word of a sweep
    if (rst_n && ready && data_sweep != prev_sweep) sweep_idx++;
    prev_sweep = data_sweep;
    if (rst_n && avg_valid && ready) begin
      // in_words now includes this clock's word and the word that produced
      // the output; the words buffered without output are two fewer
      if (!first_out) begin first_out = 1; first_out_at = in_words - 2; end
      avg_words++;
      if (sweep_idx < 4) sweep_words[sweep_idx]++;
    end
  end

  initial begin
    int unsigned clr, words;
    in_words = 0; avg_words = 0; first_out = 0; sweep_idx = 0;
    for (int i = 0; i < 4; i++) sweep_words[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    wr(CFG_SCM, 1); wr(CFG_DTM, DTM_2_2); wr(CFG_BPS, BPS_10); wr(CFG_SPP, SPP); wr(CFG_AVG, SHIFT);
    check(mode.valid, "configuration accepted");
    clr = 0;
    while (!ready) begin @(negedge clk); clr++; end
    check(clear_clocks >= 32002 && clear_clocks <= 32003, $sformatf("clear took %0d clocks", clear_clocks));
    words = 8 * SPP / 2;
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < COLS; c++)
        for (int w = 0; w < words; w++) begin
          rif_valid = 1;
          rif_data = rif_word(DTM_2_2, SPP, BITS, 7, s, c, w);
          @(negedge clk);
        end
    rif_valid = 0;
    drain = 1;
    repeat (5000) @(negedge clk);
    drain = 0;
    check(first_out_at == 4004, $sformatf("start-up lag %0d words, expected 4004", first_out_at));
    check(sweep_words[0] == 160000 && sweep_words[1] == 160000,
          $sformatf("words per sweep %0d %0d, expected 160000", sweep_words[0], sweep_words[1]));
    check(avg_words == 320000, "all words averaged");
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 32000; a++) begin
        logic [63:0] e;
        e = '0;
        if (a < COLS * SPP / 2) begin
          int unsigned c, p;
          c = a / (SPP / 2); p = a % (SPP / 2);
          e = {expected(7, 2, SHIFT, c, 2 * b + 1, 2 * p + 1, BITS, 0),
               expected(7, 2, SHIFT, c, 2 * b + 1, 2 * p, BITS, 0),
               expected(7, 2, SHIFT, c, 2 * b, 2 * p + 1, BITS, 0),
               expected(7, 2, SHIFT, c, 2 * b, 2 * p, BITS, 0)};
        end
        check(bank_word(b, a) == e, $sformatf("bank %0d addr %0d: %h exp %h", b, a, bank_word(b, a), e));
      end
    $display("lag %0d words, %0d words per sweep", first_out_at, sweep_words[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
