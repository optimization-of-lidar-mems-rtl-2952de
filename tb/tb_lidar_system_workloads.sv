// tb_lidar_system_workloads: the complete system at its default sizes running
// the grid sizes quoted as operating limits, one 20-column set each, on all
// four interfaces at one word per clock:
//   1. 16 lines x 1500 samples/pixel, 8-bit, averaging by 8: connection mode 1,
//      transfer mode 1, only two banks per averager in use (quoted: 86 frames/s
//      at 250 MHz).
//   2. 32 lines x 2500 samples/pixel, 12-bit, averaging by 8: connection mode 2,
//      transfer mode 2.1 (quoted: 17 frames/s; 12-bit samples at 1 Gbps per lane
//      give a 166.67 MHz clock).
//   3. 32 lines x 3200 samples/pixel (the maximum), 10-bit, averaging by 2:
//      transfer mode 2.2, which needs the deepest assembler buffer (4N = 12800
//      words), and every one of the 32000 addresses of every bank.
//
// Each workload starts from a reset and the bank clear, then writes the
// configuration registers. Checked per workload: the configuration is
// accepted, the number of clocks from the first averaged word to the end of
// each sweep (one word per clock, no stall), the assemblers drain, and all
// 16 x 32000 bank words (averages where used, zero elsewhere). The frame rate
// for a 120-column grid (six sets) is computed from the measured clocks at
// the clock frequency of that operating point; workloads 1 and 2 must land
// on the quoted integer rate.
//
// The clock runs at 250 MHz in all three; only the frame-rate arithmetic
// uses the lower clock of the 12-bit and 10-bit operating points.
module tb_lidar_system_workloads;
  import lidar_pkg::*;
  import tb_pkg::*;

  localparam int COLS = 20;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge before the first clock resets the synchroniser
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_SCM;
  logic [15:0] cfg_wdata = 0;
  logic laser_sync = 0, mirror_sync = 0, drain = 0;
  logic rif_valid [4];
  logic [31:0] rif_data [4];
  mode_t mode [4];
  logic ready [4], running [4], last_sweep [4], avg_valid [4];
  logic [31:0] avg_data [4];
  logic [2:0] data_sweep [4], sensor_sweep [4];
  logic [4:0] sensor_column [4];
  logic cfar_valid [4];
  logic [2:0] cfar_adc [4];
  logic [11:0] cfar_cut [4];
  logic [1:0] cfar_mask [4], cfar_peak [4];
  int checks = 0, failures = 0;

  lidar_system dut (.*);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic logic [63:0] bank_word(input int kb, input int a);
    case (kb)
      0: return dut.g_avg[0].g_bank[0].u_bank.mem[a];
      1: return dut.g_avg[0].g_bank[1].u_bank.mem[a];
      2: return dut.g_avg[0].g_bank[2].u_bank.mem[a];
      3: return dut.g_avg[0].g_bank[3].u_bank.mem[a];
      4: return dut.g_avg[1].g_bank[0].u_bank.mem[a];
      5: return dut.g_avg[1].g_bank[1].u_bank.mem[a];
      6: return dut.g_avg[1].g_bank[2].u_bank.mem[a];
      7: return dut.g_avg[1].g_bank[3].u_bank.mem[a];
      8: return dut.g_avg[2].g_bank[0].u_bank.mem[a];
      9: return dut.g_avg[2].g_bank[1].u_bank.mem[a];
      10: return dut.g_avg[2].g_bank[2].u_bank.mem[a];
      11: return dut.g_avg[2].g_bank[3].u_bank.mem[a];
      12: return dut.g_avg[3].g_bank[0].u_bank.mem[a];
      13: return dut.g_avg[3].g_bank[1].u_bank.mem[a];
      14: return dut.g_avg[3].g_bank[2].u_bank.mem[a];
      15: return dut.g_avg[3].g_bank[3].u_bank.mem[a];
      default: return '0;
    endcase
  endfunction

  // clocks from the first averaged word to the end of each sweep
  longint unsigned clk_count, sweep_end_at[8];
  int unsigned     n_sweep_end;
  bit              counting;
  always @(posedge clk) begin
    if (rst_n && avg_valid[0] && ready[0]) counting = 1;
    if (counting) clk_count++;
    if (rst_n && dut.g_avg[0].u_averager.sweep_end) begin
      if (n_sweep_end < 8) sweep_end_at[n_sweep_end] = clk_count;
      n_sweep_end++;
    end
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic workload(input int id, input string name, input scm_e scm, input dtm_e dtm,
                          input bps_e bps, input int unsigned spp, input int unsigned shift,
                          input real fclk_mhz, input int fps_quoted);
    int unsigned n_adc, bits, sweeps, words, aid0, used;
    longint unsigned per_sweep;
    real frame_ms, fps;
    n_adc  = (scm == SCM_2) ? 8 : 4;
    bits   = bits_of(bps);
    sweeps = 1 << shift;
    words  = n_adc * spp / 2;          // interface words per column
    per_sweep = longint'(COLS) * words;
    aid0   = 100 * id;
    used   = COLS * spp / 2;           // bank addresses in use

    // reset, clear, configure
    @(negedge clk); rst_n = 0; repeat (2) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    wr(CFG_SCM, scm); wr(CFG_DTM, dtm); wr(CFG_BPS, bps); wr(CFG_SPP, spp); wr(CFG_AVG, shift);
    for (int k = 0; k < 4; k++) check(mode[k].valid, $sformatf("%s: configuration accepted", name));
    while (!ready[0]) @(negedge clk);
    clk_count = 0; n_sweep_end = 0; counting = 0;

    for (int s = 0; s < sweeps; s++) begin
      mirror_sync = 1;
      for (int c = 0; c < COLS; c++) begin
        laser_sync = 1;
        for (int w = 0; w < words; w++) begin
          for (int k = 0; k < 4; k++) begin
            rif_valid[k] = 1;
            rif_data[k] = rif_word(dtm, spp, bits, aid0 + k, s, c, w);
          end
          @(negedge clk);
          laser_sync = 0; mirror_sync = 0;
        end
      end
    end
    for (int k = 0; k < 4; k++) rif_valid[k] = 0;
    drain = 1;
    while (running[0] || running[1] || running[2] || running[3]) @(negedge clk);
    repeat (2) @(negedge clk);
    drain = 0;

    check(n_sweep_end == sweeps, $sformatf("%s: %0d sweeps completed", name, n_sweep_end));
    for (int s = 0; s < sweeps; s++)
      check(sweep_end_at[s] == per_sweep * longint'(s + 1),
            $sformatf("%s: sweep %0d ended after %0d clocks, expected %0d", name, s,
                      sweep_end_at[s], per_sweep * longint'(s + 1)));
    frame_ms = real'(sweep_end_at[sweeps - 1]) * 6.0 / (fclk_mhz * 1000.0);
    fps = 1000.0 / frame_ms;
    $display("%s: %0d clocks per set; 120 columns at %0.2f MHz: %0.3f ms, %0.2f frames/s",
             name, sweep_end_at[sweeps - 1], fclk_mhz, frame_ms, fps);
    if (fps_quoted > 0)
      check(int'($floor(fps)) == fps_quoted, $sformatf("%s: %0d frames/s quoted", name, fps_quoted));

    for (int k = 0; k < 4; k++)
      for (int b = 0; b < 4; b++)
        for (int a = 0; a < BANK_DEPTH; a++) begin
          logic [63:0] e;
          e = '0;
          if (2 * b < n_adc && a < used) begin
            int unsigned c, p;
            c = a / (spp / 2); p = a % (spp / 2);
            e = {expected(aid0 + k, sweeps, shift, c, 2 * b + 1, 2 * p + 1, bits, 0),
                 expected(aid0 + k, sweeps, shift, c, 2 * b + 1, 2 * p, bits, 0),
                 expected(aid0 + k, sweeps, shift, c, 2 * b, 2 * p + 1, bits, 0),
                 expected(aid0 + k, sweeps, shift, c, 2 * b, 2 * p, bits, 0)};
          end
          check(bank_word(4 * k + b, a) == e,
                $sformatf("%s: bank %0d.%0d addr %0d: %h exp %h", name, k, b, a,
                          bank_word(4 * k + b, a), e));
        end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin rif_valid[k] = 0; rif_data[k] = 0; end
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    workload(1, "16x120x1500 8-bit x8",  SCM_1, DTM_1,   BPS_8,  1500, 3, 250.0,   86);
    workload(2, "32x120x2500 12-bit x8", SCM_2, DTM_2_1, BPS_12, 2500, 3, 166.667, 17);
    workload(3, "32x120x3200 10-bit x2", SCM_2, DTM_2_2, BPS_10, 3200, 1, 200.0,   0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
