// tb_assembler: self-checking test of the assembler.
// For each data transfer mode and a few pixel lengths the testbench sends
// several columns of interface words in that mode's order (from tb_pkg),
// with random pauses, then drains. Every output word is compared with the
// expected (x[2p], x[2p+1]) pair of the expected ADC, and the number of input
// words accepted before the first output is checked against the start-up lag
// (4, 8 and 2N+4 words).
module tb_assembler;
  import lidar_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst = 1;
  mode_t mode;
  logic in_valid = 0, drain = 0;
  logic [31:0] in_data = 0;
  logic out_valid, running;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  assembler #(.BUF_WORDS(256)) dut (.clk, .rst, .mode, .in_valid, .in_data, .drain,
                                    .out_valid, .out_data, .running);

  always #5 clk = ~clk;

  // expected output stream position
  int unsigned exp_col, exp_pair, exp_adc, n_adc_cur, spp_cur, out_count, in_count;
  int unsigned lag_seen;
  bit          first_seen;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [31:0] e;
      e = {sample(0, 0, exp_col, exp_adc, 2 * exp_pair + 1, 12),
           sample(0, 0, exp_col, exp_adc, 2 * exp_pair, 12)};
      checks++;
      if (out_data !== e) begin
        failures++;
        if (failures < 10) $display("dtm=%0d col %0d pair %0d adc %0d: got %h exp %h",
                                    mode.dtm, exp_col, exp_pair, exp_adc, out_data, e);
      end
      out_count++;
      if (exp_adc == n_adc_cur - 1) begin
        exp_adc = 0;
        if (exp_pair == spp_cur / 2 - 1) begin exp_pair = 0; exp_col++; end
        else exp_pair++;
      end else exp_adc++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input dtm_e dtm, input int unsigned spp, input int unsigned cols);
    int unsigned lag, words;
    mode = '0;
    mode.scm = (dtm == DTM_1) ? SCM_1 : SCM_2;
    mode.dtm = dtm; mode.bps = BPS_12; mode.spp = 12'(spp); mode.avg = AVG_8; mode.valid = 1;
    n_adc_cur = (dtm == DTM_1) ? 4 : 8;
    spp_cur = spp;
    lag = (dtm == DTM_1) ? 4 : (dtm == DTM_2_1) ? 8 : 2 * spp + 4;
    words = n_adc_cur * spp / 2;
    exp_col = 0; exp_pair = 0; exp_adc = 0; out_count = 0; in_count = 0; first_seen = 0;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int unsigned c = 0; c < cols; c++) begin
      for (int unsigned w = 0; w < words; w++) begin
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_data = rif_word(dtm, spp, 12, 0, 0, c, w);
        @(posedge clk);
        if (!first_seen && out_valid) begin first_seen = 1; lag_seen = in_count; end
        in_count++;
        @(negedge clk);
        if (!first_seen && out_valid) begin first_seen = 1; lag_seen = in_count; end
      end
    end
    in_valid = 0;
    drain = 1;
    repeat (lag + 5) @(negedge clk);
    drain = 0;
    checks++;
    if (!(first_seen && lag_seen == lag + 1)) begin
      failures++;
      $display("dtm=%0d lag: first output after %0d words, expected %0d", dtm, lag_seen, lag + 1);
    end
    checks++;
    if (out_count != cols * words) begin
      failures++;
      $display("dtm=%0d: %0d outputs, expected %0d", dtm, out_count, cols * words);
    end
  endtask

  initial begin
    mode = '0;
    run(DTM_1, 8, 3);
    run(DTM_1, 2, 5);
    run(DTM_2_1, 8, 3);
    run(DTM_2_1, 6, 4);
    run(DTM_2_2, 8, 3);
    run(DTM_2_2, 12, 4);
    run(DTM_2_2, 2, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
