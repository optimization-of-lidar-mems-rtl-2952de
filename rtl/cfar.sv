// cfar: cell-averaging CFAR peak detector on the averaged stream of one
// averager.
//
// It watches the pairs leaving the AVG unit (avg_valid/avg_data, two
// consecutive samples x[2p], x[2p+1] of one ADC, ADCs in turn, column after
// column) and, while last_sweep marks them as finished averages, decides
// for every sample whether it is a peak. For each ADC it keeps the last
// 2*HALF+2 samples (HALF = (T+G)/2) in a shift window that advances by two
// samples whenever a pair of that ADC arrives. A pair completes the window of
// two cells under test (CUTs), x[2p-HALF] and x[2p+1-HALF]. A CUT x[k] is a
// peak when
//   x[k] > 1.5 * (sum of the T training cells) / T   (T/2 on each side,
//                                                     beyond the guard cells)
//   x[k] > max(G guard cells)                        (G/2 on each side)
// evaluated exactly as 2*T*x[k] > 3*sum. Only CUTs whose window lies inside
// the pixel are evaluated: sample positions HALF .. N-HALF-2 (0-based), so
// the window never mixes two pixels and needs no clearing between them.
//
// Interface and timing: one result per accepted AVG pair during the last
// sweep, registered (one clock after the pair). cfar_adc is the ADC,
// cfar_cut the sample index of the first CUT (2p-HALF) within the pixel,
// cfar_mask which of the two CUTs (bit 0 first, bit 1 second) lie in the
// evaluated range and cfar_peak which of those are peaks. rst must be held
// while the stream is not running (the top uses "banks not ready", which
// covers every reset), so the pair and ADC counters start at the first word.
//
// From the document: the place of the detector (on the AVG output, active in
// the last sweep), one result bit per CUT, evaluation of every ADC's signal
// in a pipeline as the samples pass, the two thresholds, the evaluated sample
// range and G = 10, T = 50. This implementation's own choices: the per-ADC
// shift windows, two CUTs per clock, and the result stream with position
// information; packing the results into the spare SRAM banks is left to the
// user of the stream.
module cfar
  import lidar_pkg::*;
#(
  parameter int unsigned G = 10,   // guard cells (even)
  parameter int unsigned T = 50    // training cells (even)
) (
  input  logic              clk,
  input  logic              rst,
  input  mode_t             mode,
  input  logic              last_sweep,
  input  logic              avg_valid,
  input  logic [WORD_W-1:0] avg_data,
  output logic              cfar_valid,
  output logic [2:0]        cfar_adc,
  output logic [SPP_W-1:0]  cfar_cut,
  output logic [1:0]        cfar_mask,
  output logic [1:0]        cfar_peak
);

  localparam int unsigned HALF = (T + G) / 2;
  localparam int unsigned GH   = G / 2;
  localparam int unsigned WIN  = 2 * HALF + 2;

  logic [SAMPLE_W-1:0] win [8][WIN];   // win[n][0] is the newest sample of ADC n
  logic [SAMPLE_W-1:0] cur [WIN];      // window of the current ADC including the new pair
  logic [2:0]          adc_idx, last_adc;
  logic [SPP_W-2:0]    pair_idx, last_pair;

  always_comb begin
    last_adc  = (mode.scm == SCM_2) ? 3'd7 : 3'd3;
    last_pair = mode.spp[SPP_W-1:1] - 1'b1;
    cur[0] = avg_data[WORD_W-1:SAMPLE_W];   // x[2p+1]
    cur[1] = avg_data[SAMPLE_W-1:0];        // x[2p]
    for (int j = 2; j < WIN; j++) cur[j] = win[adc_idx][j-2];
  end

  // c = 0: CUT at cur[HALF+1] = x[2p-HALF]; c = 1: CUT at cur[HALF] = x[2p+1-HALF]
  logic [1:0] hit, in_range;
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      logic [31:0] sum, cut_pos;
      logic [SAMPLE_W-1:0] gmax, cut;
      int unsigned base;
      base = (c == 0) ? 1 : 0;
      sum  = '0;
      gmax = '0;
      for (int j = 0; j <= 2 * HALF; j++) begin
        int unsigned d;
        d = (j > HALF) ? j - HALF : HALF - j;
        if (d > GH)                                   sum += 32'(cur[base + j]);
        else if (d != 0 && cur[base + j] > gmax)      gmax = cur[base + j];
      end
      cut = cur[base + HALF];
      hit[c] = (32'(2 * T) * 32'(cut) > 32'd3 * sum) && (cut > gmax);
      cut_pos = 32'({pair_idx, 1'b0}) + 32'(c);
      in_range[c] = (cut_pos >= 32'(2 * HALF)) && (cut_pos <= 32'(mode.spp) - 32'd2);
    end
  end

  always_ff @(posedge clk) begin
    if (avg_valid) begin
      for (int j = 0; j < WIN; j++) win[adc_idx][j] <= cur[j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      adc_idx    <= '0;
      pair_idx   <= '0;
      cfar_valid <= 1'b0;
      cfar_adc   <= '0;
      cfar_cut   <= '0;
      cfar_mask  <= '0;
      cfar_peak  <= '0;
    end else begin
      cfar_valid <= avg_valid && last_sweep && (in_range != 2'b00);
      cfar_adc   <= adc_idx;
      cfar_cut   <= SPP_W'({pair_idx, 1'b0}) - SPP_W'(HALF);
      cfar_mask  <= in_range;
      cfar_peak  <= hit & in_range;
      if (avg_valid) begin
        if (adc_idx == last_adc) begin
          adc_idx  <= '0;
          pair_idx <= (pair_idx == last_pair) ? '0 : pair_idx + 1'b1;
        end else begin
          adc_idx <= adc_idx + 3'd1;
        end
      end
    end
  end

endmodule
