// tb_cfar: the CFAR peak detector with its default window (10 guard and 50
// training cells) on a synthetic averaged stream.
//
// Signals are low random noise with a few pulses of random width and height
// placed at random positions (some near the ends of the evaluated range,
// some in two ADCs at once). The stream is sent in the order the AVG unit
// produces it (pairs of one ADC, ADCs in turn, pixel after pixel) with random
// gaps in avg_valid, for connection mode 2 (8 ADCs, 200 samples per pixel)
// and mode 1 (4 ADCs, 128 samples). Every result is compared, one clock after
// its pair, with both thresholds computed directly from the stored signal:
// the ADC, the CUT index, which CUTs are in range and which are peaks.
// Outside the last sweep no result may appear. The number of peaks found is
// printed and must be non-zero.
module tb_cfar;
  import lidar_pkg::*;

  localparam int G = 10, T = 50, HALF = (T + G) / 2, COLS = 3;

  logic clk = 0, rst = 1;
  mode_t mode;
  logic last_sweep = 0, avg_valid = 0;
  logic [31:0] avg_data = 0;
  logic cfar_valid;
  logic [2:0] cfar_adc;
  logic [11:0] cfar_cut;
  logic [1:0] cfar_mask, cfar_peak;
  int checks = 0, failures = 0, peaks = 0, evaluated = 0;

  cfar dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  logic [15:0] sig [COLS][8][200];

  function automatic bit ref_peak(input int c, input int n, input int k);
    longint sum, gmax;
    sum = 0; gmax = 0;
    for (int i = k - HALF; i <= k + HALF; i++) begin
      int d;
      d = (i > k) ? i - k : k - i;
      if (d > G / 2) sum += sig[c][n][i];
      else if (d != 0 && sig[c][n][i] > gmax) gmax = sig[c][n][i];
    end
    return (2 * T * longint'(sig[c][n][k]) > 3 * sum) && (longint'(sig[c][n][k]) > gmax);
  endfunction

  task automatic make_signals(input int n_adc, input int spp);
    for (int c = 0; c < COLS; c++)
      for (int n = 0; n < n_adc; n++) begin
        for (int k = 0; k < spp; k++) sig[c][n][k] = 16'($urandom_range(40, 10));
        for (int q = 0; q < 3; q++) begin
          int at, w, h;
          at = (q == 0) ? HALF + $urandom_range(3, 0) : (q == 1) ? spp - HALF - 2 - $urandom_range(3, 0)
                                                       : $urandom_range(spp - 1, 0);
          w = $urandom_range(12, 1); h = $urandom_range(3000, 60);
          for (int i = 0; i < w && at + i < spp; i++) sig[c][n][at + i] = 16'(h - 7 * i);
        end
      end
  endtask

  task automatic run(input scm_e scm, input int spp, input bit last);
    int n_adc;
    n_adc = (scm == SCM_2) ? 8 : 4;
    @(negedge clk); rst = 1;
    mode = '0; mode.scm = scm; mode.dtm = (scm == SCM_2) ? DTM_2_1 : DTM_1; mode.spp = 12'(spp);
    mode.avg = AVG_4; mode.valid = 1;
    @(negedge clk); rst = 0;
    make_signals(n_adc, spp);
    last_sweep = last;
    for (int c = 0; c < COLS; c++)
      for (int p = 0; p < spp / 2; p++)
        for (int n = 0; n < n_adc; n++) begin
          while ($urandom_range(3, 0) == 0) begin
            avg_valid = 0;
            @(negedge clk);
            check(!cfar_valid, "no result without a pair");
          end
          avg_valid = 1;
          avg_data = {sig[c][n][2 * p + 1], sig[c][n][2 * p]};
          @(negedge clk);
          avg_valid = 0;
          begin
            bit [1:0] m, pk;
            for (int b = 0; b < 2; b++) begin
              int k;
              k = 2 * p + b - HALF;
              m[b] = (k >= HALF) && (k <= spp - HALF - 2);
              pk[b] = m[b] && ref_peak(c, n, k);
            end
            if (!last) check(!cfar_valid, "no result outside the last sweep");
            else if (m == 2'b00) check(!cfar_valid, $sformatf("no result for pair %0d", p));
            else begin
              check(cfar_valid && cfar_adc == 3'(n) && cfar_cut == 12'(2 * p - HALF) && cfar_mask == m,
                    $sformatf("col %0d adc %0d pair %0d: valid %b adc %0d cut %0d mask %b", c, n, p,
                              cfar_valid, cfar_adc, cfar_cut, cfar_mask));
              check(cfar_peak == pk, $sformatf("col %0d adc %0d pair %0d: peak %b expected %b",
                                               c, n, p, cfar_peak, pk));
              evaluated += m[0] + m[1];
              peaks += pk[0] + pk[1];
            end
          end
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run(SCM_2, 200, 1);
    run(SCM_1, 128, 1);
    run(SCM_2, 200, 0);
    $display("%0d CUTs evaluated, %0d peaks", evaluated, peaks);
    check(peaks > 0, "peaks were detected");
    check(evaluated == COLS * 8 * (200 - 2 * HALF - 1) + COLS * 4 * (128 - 2 * HALF - 1),
          "every CUT of the evaluated range was evaluated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
