// tb_avg: self-checking test of the AVG adder/divider.
// Random sample pairs and stored sums are applied with last_sweep low and
// high for every averaging factor; the result is compared with an
// independently computed sum (and shifted sum).
module tb_avg;
  import lidar_pkg::*;

  logic [31:0] new_pair, prev_pair, result;
  logic        last_sweep;
  avg_e        avg_shift;
  int checks = 0, failures = 0;

  avg dut (.new_pair, .prev_pair, .last_sweep, .avg_shift, .result);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a0, a1, p0, p1, e0, e1, sh;
    for (int i = 0; i < 3000; i++) begin
      sh = 1 + (i % 3);
      a0 = $urandom_range(0, 4095);  a1 = $urandom_range(0, 4095);
      p0 = $urandom_range(0, 7 * 4095); p1 = $urandom_range(0, 7 * 4095);
      if (i % 50 == 0) begin a0 = 4095; p0 = 7 * 4095; end
      new_pair   = {16'(a1), 16'(a0)};
      prev_pair  = {16'(p1), 16'(p0)};
      last_sweep = (i % 2 == 1);
      avg_shift  = avg_e'(sh);
      e0 = a0 + p0;  e1 = a1 + p1;
      if (last_sweep) begin e0 = e0 >> sh; e1 = e1 >> sh; end
      #1;
      checks++;
      if (result !== {16'(e1), 16'(e0)}) begin
        failures++;
        if (failures < 10) $display("mismatch %h+%h ls=%0d sh=%0d -> %h exp %h", new_pair, prev_pair,
                                    last_sweep, sh, result, {16'(e1), 16'(e0)});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
