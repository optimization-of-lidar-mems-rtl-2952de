// tb_lidar_system: end-to-end test of the four-averager system at reduced
// sizes (3 columns per set, 8-16 samples per pixel, 128-word banks).
//
// A model of the sensor and interfaces (tb_pkg) feeds all four interfaces in
// lockstep, column after column and sweep after sweep, with laser and mirror
// sync pulses and random pauses in the interface ready strobe. Each scenario
// picks a data transfer mode, bits per sample, pixel length and averaging
// factor, runs one or two complete averaging runs back to back and then
// drains the assemblers. After every run all used bank addresses of all
// sixteen banks are compared with averages computed directly from the
// sample model, and the unused banks must still hold zeros.
//
// Mechanisms counted (each must occur): transfer modes 1, 2.1 and 2.2, the
// bank clear after reset, a division on the last sweep, a new run starting
// from zero (first sweep after a completed run), averaging by 2, 4 and 8,
// interface pauses and the final drain.
module tb_lidar_system;
  import lidar_pkg::*;
  import tb_pkg::*;

  localparam int DEPTH = 128;
  localparam int COLS  = 3;

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

  lidar_system #(.NUM_AVG(4), .BUF_WORDS(256), .BANK_DEPTH_P(DEPTH), .COLS(COLS)) dut (.*);

  always #2 clk = ~clk;

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

  // mechanism counters
  int n_dtm[3], n_clear, n_divide, n_restart, n_avg[4], n_pause, n_drain;

  always @(posedge clk) if (last_sweep[0] && dut.g_avg[0].u_averager.asm_valid) n_divide++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic pulse_mirror();
    for (int k = 0; k < 4; k++) rif_valid[k] = 0;
    mirror_sync = 1; @(negedge clk); mirror_sync = 0;
  endtask

  task automatic scenario(input dtm_e dtm, input bps_e bps, input int unsigned spp,
                          input int unsigned shift, input int unsigned runs, input int unsigned seed);
    int unsigned nadc, words, bits, sweeps, clr, f0;
    f0 = failures;
    nadc = (dtm == DTM_1) ? 4 : 8;
    words = nadc * spp / 2;
    bits = bits_of(bps);
    sweeps = 1 << shift;
    n_dtm[dtm]++; n_avg[shift]++;
    // reset, configure, wait for the clear
    @(negedge clk); rst_n = 0; repeat (2) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    wr(CFG_SCM, (dtm == DTM_1) ? 0 : 1); wr(CFG_DTM, dtm); wr(CFG_BPS, bps);
    wr(CFG_SPP, spp); wr(CFG_AVG, shift);
    for (int k = 0; k < 4; k++) check(mode[k].valid, "configuration accepted");
    clr = 0;
    while (!ready[0]) begin @(negedge clk); clr++; end
    check(clr <= DEPTH, "clear finished");
    n_clear++;
    for (int r = 0; r < runs; r++) begin
      if (r > 0) n_restart++;
      for (int s = 0; s < sweeps; s++) begin
        pulse_mirror();
        for (int c = 0; c < COLS; c++) begin
          laser_sync = 1;
          for (int w = 0; w < words; w++) begin
            if ($urandom_range(0, 7) == 0) begin
              for (int k = 0; k < 4; k++) rif_valid[k] = 0;
              n_pause++;
              @(negedge clk);
            end
            for (int k = 0; k < 4; k++) begin
              rif_valid[k] = 1;
              rif_data[k] = rif_word(dtm, spp, bits, seed + 16 * r + k, s, c, w);
            end
            @(negedge clk);
            laser_sync = 0;
          end
        end
        for (int k = 0; k < 4; k++) check(sensor_sweep[k] == 3'(s), "sensor sweep index");
      end
      if (r == runs - 1) begin
        for (int k = 0; k < 4; k++) rif_valid[k] = 0;
        drain = 1; n_drain++;
        repeat (2 * spp + 16) @(negedge clk);
        drain = 0;
        for (int k = 0; k < 4; k++) check(!running[k], "assembler drained");
      end else begin
        // the next run follows without a gap; check it after this run's data has left
        // the assembler, which happens during the next run's first column
      end
      if (r == runs - 1) begin
        for (int k = 0; k < 4; k++)
          for (int b = 0; b < 4; b++)
            for (int a = 0; a < DEPTH; a++) begin
              logic [63:0] e;
              e = '0;
              if (b < nadc / 2 && a < COLS * spp / 2) begin
                int unsigned c, p;
                c = a / (spp / 2); p = a % (spp / 2);
                e = {expected(seed + 16 * r + k, sweeps, shift, c, 2 * b + 1, 2 * p + 1, bits, 0),
                     expected(seed + 16 * r + k, sweeps, shift, c, 2 * b + 1, 2 * p, bits, 0),
                     expected(seed + 16 * r + k, sweeps, shift, c, 2 * b, 2 * p + 1, bits, 0),
                     expected(seed + 16 * r + k, sweeps, shift, c, 2 * b, 2 * p, bits, 0)};
              end
              check(bank_word(4 * k + b, a) == e,
                    $sformatf("dtm %0d avg %0d bank %0d.%0d addr %0d: %h exp %h", dtm, shift, k, b, a,
                              bank_word(4 * k + b, a), e));
            end
      end
    end
    if (failures != f0) $display("scenario dtm %0d spp %0d avg %0d: %0d failures", dtm, spp, shift, failures - f0);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin rif_valid[k] = 0; rif_data[k] = 0; end
    scenario(DTM_1,   BPS_8,  8,  1, 1, 100);
    scenario(DTM_2_1, BPS_10, 8,  2, 1, 200);
    scenario(DTM_2_2, BPS_12, 12, 3, 1, 300);
    scenario(DTM_1,   BPS_12, 16, 3, 2, 400);
    scenario(DTM_2_2, BPS_8,  8,  2, 2, 500);
    scenario(DTM_2_1, BPS_8,  4,  1, 2, 600);
    $display("mechanisms: dtm1=%0d dtm2.1=%0d dtm2.2=%0d clear=%0d divide=%0d restart=%0d avg2=%0d avg4=%0d avg8=%0d pause=%0d drain=%0d",
             n_dtm[0], n_dtm[1], n_dtm[2], n_clear, n_divide, n_restart, n_avg[1], n_avg[2], n_avg[3], n_pause, n_drain);
    check(n_dtm[0] > 0 && n_dtm[1] > 0 && n_dtm[2] > 0, "all transfer modes exercised");
    check(n_clear > 0 && n_divide > 0 && n_restart > 0 && n_pause > 0 && n_drain > 0, "mechanisms exercised");
    check(n_avg[1] > 0 && n_avg[2] > 0 && n_avg[3] > 0, "all averaging factors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
