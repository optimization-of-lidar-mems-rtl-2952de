// tb_lidar_system_full: the complete system at its default sizes running the
// operating point of the reference simulation: 32-line grid (connection
// mode 2, transfer mode 2.1), 8-bit samples at 2000 samples per pixel,
// averaging by 8, one set of 20 columns swept 8 times, on all four
// interfaces at full rate (one interface word per clock).
//
// The configuration registers keep their reset values, which are this
// operating point. Checked: every one of the 16 x 32000 bank addresses after
// the run (averages where used, zero in the unused 37.5 %), the number of
// completed averages leaving the AVG unit, 160000 clocks
// per sweep and 1.28 million for the set, and the resulting frame rate for a
// 32 x 120 grid at 250 MHz (six sets: 7.68 million clocks, 30.72 ms,
// 32.55 frames per second). The peak-detection stream of the first averager
// during the last sweep is compared, result by result, with a CA-CFAR
// computed from the averages stored in its banks.
module tb_lidar_system_full;
  import lidar_pkg::*;
  import tb_pkg::*;

  localparam int SPP = 2000, COLS = 20, SHIFT = 3, BITS = 8, SWEEPS = 8;

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

  always #2 clk = ~clk;   // 250 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
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
  longint unsigned clk_count, sweep_end_at[SWEEPS];
  int unsigned     n_sweep_end, n_final;
  bit              counting;
  always @(posedge clk) begin
    if (rst_n && avg_valid[0] && ready[0]) counting = 1;
    if (counting) clk_count++;
    if (rst_n && dut.g_avg[0].u_averager.sweep_end) begin
      if (n_sweep_end < SWEEPS) sweep_end_at[n_sweep_end] = clk_count;
      n_sweep_end++;
    end
    if (rst_n && avg_valid[0] && ready[0] && last_sweep[0]) n_final++;
  end

  // peak-detection results of averager 0, in arrival order
  typedef struct packed { logic [2:0] adc; logic [11:0] cut; logic [1:0] mask, peak; } cfar_res_t;
  cfar_res_t cfar_q[$];
  always @(posedge clk)
    if (rst_n && cfar_valid[0]) cfar_q.push_back('{cfar_adc[0], cfar_cut[0], cfar_mask[0], cfar_peak[0]});

  // final average of sample k of ADC n, column c, averager 0, read from its banks
  function automatic longint stored(input int c, input int n, input int k);
    logic [63:0] w;
    w = bank_word(n / 2, c * SPP / 2 + k / 2);
    return longint'(w[16 * (2 * (n % 2) + k % 2) +: 16]);
  endfunction

  // compare the result stream with a CA-CFAR (10 guard, 50 training cells,
  // 1.5 x training average, above every guard cell) on the stored averages
  task automatic check_cfar();
    localparam int HALF = 30;
    int unsigned idx, n_peaks, mism;
    idx = 0; n_peaks = 0; mism = 0;
    for (int c = 0; c < COLS; c++)
      for (int p = 0; p < SPP / 2; p++)
        for (int n = 0; n < 8; n++) begin
          bit [1:0] m, pk;
          for (int b = 0; b < 2; b++) begin
            int k;
            longint sum, gmax, cut;
            k = 2 * p + b - HALF;
            m[b] = (k >= HALF) && (k <= SPP - HALF - 2);
            pk[b] = 0;
            if (m[b]) begin
              sum = 0; gmax = 0; cut = stored(c, n, k);
              for (int i = k - HALF; i <= k + HALF; i++) begin
                int d;
                longint v;
                d = (i > k) ? i - k : k - i;
                v = stored(c, n, i);
                if (d > 5) sum += v;
                else if (d != 0 && v > gmax) gmax = v;
              end
              pk[b] = (100 * cut > 3 * sum) && (cut > gmax);
            end
          end
          if (m != 0) begin
            if (idx >= cfar_q.size()) mism++;
            else if (cfar_q[idx] != {3'(n), 12'(2 * p - HALF), m, pk}) mism++;
            idx++;
            n_peaks += int'(pk[0]) + int'(pk[1]);
          end
        end
    check(idx == cfar_q.size(), $sformatf("%0d peak-detection results, expected %0d", cfar_q.size(), idx));
    check(mism == 0, $sformatf("%0d peak-detection results differ", mism));
    $display("peak detection: %0d results checked, %0d peaks", idx, n_peaks);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned words;
    real frame_ms;
    clk_count = 0; n_sweep_end = 0; n_final = 0; counting = 0;
    for (int k = 0; k < 4; k++) begin rif_valid[k] = 0; rif_data[k] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    while (!ready[0]) @(negedge clk);
    for (int k = 0; k < 4; k++)
      check(mode[k].valid && mode[k].scm == SCM_2 && mode[k].spp == 12'(SPP) && mode[k].avg == AVG_8,
            "reset configuration is the reference operating point");
    words = 8 * SPP / 2;
    for (int s = 0; s < SWEEPS; s++) begin
      mirror_sync = 1;
      for (int c = 0; c < COLS; c++) begin
        laser_sync = 1;
        for (int w = 0; w < words; w++) begin
          for (int k = 0; k < 4; k++) begin
            rif_valid[k] = 1;
            rif_data[k] = rif_word(DTM_2_1, SPP, BITS, 1000 + k, s, c, w);
          end
          @(negedge clk);
          laser_sync = 0; mirror_sync = 0;
        end
      end
    end
    for (int k = 0; k < 4; k++) rif_valid[k] = 0;
    drain = 1;
    repeat (20) @(negedge clk);
    drain = 0;

    check(n_sweep_end == SWEEPS, $sformatf("%0d sweeps completed", n_sweep_end));
    for (int s = 0; s < SWEEPS; s++)
      check(sweep_end_at[s] == longint'(160000) * (s + 1),
            $sformatf("sweep %0d ended after %0d clocks, expected %0d", s, sweep_end_at[s], 160000 * (s + 1)));
    check(n_final == 160000, "final averages leave the AVG unit");
    frame_ms = real'(sweep_end_at[SWEEPS - 1]) * 6.0 * 4.0e-6;
    $display("set: %0d clocks; frame of 6 sets at 250 MHz: %0.3f ms, %0.3f FPS",
             sweep_end_at[SWEEPS - 1], frame_ms, 1000.0 / frame_ms);
    check(sweep_end_at[SWEEPS - 1] * 6 == 64'd7680000, "7.68 million clocks per frame");

    for (int k = 0; k < 4; k++)
      for (int b = 0; b < 4; b++)
        for (int a = 0; a < BANK_DEPTH; a++) begin
          logic [63:0] e;
          e = '0;
          if (a < COLS * SPP / 2) begin
            int unsigned c, p;
            c = a / (SPP / 2); p = a % (SPP / 2);
            e = {expected(1000 + k, SWEEPS, SHIFT, c, 2 * b + 1, 2 * p + 1, BITS, 0),
                 expected(1000 + k, SWEEPS, SHIFT, c, 2 * b + 1, 2 * p, BITS, 0),
                 expected(1000 + k, SWEEPS, SHIFT, c, 2 * b, 2 * p + 1, BITS, 0),
                 expected(1000 + k, SWEEPS, SHIFT, c, 2 * b, 2 * p, BITS, 0)};
          end
          check(bank_word(4 * k + b, a) == e,
                $sformatf("bank %0d.%0d addr %0d: %h exp %h", k, b, a, bank_word(4 * k + b, a), e));
        end
    check_cfar();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
