// tb_controller: self-checking test of the controller.
// Checks the reset values, register writes and the Mode record including its
// validity check, the two-clock reset release, sensor-side column and sweep
// counting from laser and mirror sync pulses, and the data-side
// first_sweep/last_sweep sequence for averaging by 2, 4 and 8.
module tb_controller;
  import lidar_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge before the first clock resets the synchroniser
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = CFG_SCM;
  logic [15:0] cfg_wdata = 0;
  logic laser_sync = 0, mirror_sync = 0, sweep_end = 0;
  logic rst_sync, last_sweep, first_sweep;
  mode_t mode;
  logic [4:0] sensor_column;
  logic [2:0] sensor_sweep, data_sweep;
  int checks = 0, failures = 0;

  controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    check(rst_sync == 1, "reset asserted while rst_n low");
    rst_n = 1;
    @(posedge clk); #1 check(rst_sync == 1, "reset held one edge");
    @(posedge clk); #1 check(rst_sync == 0, "reset released after two edges");
    // reset values: simulated operating point
    check(mode.scm == SCM_2 && mode.dtm == DTM_2_1 && mode.bps == BPS_8 &&
          mode.spp == 12'd2000 && mode.avg == AVG_8 && mode.valid, "reset values");
    // register writes
    wr(CFG_SCM, 0); wr(CFG_DTM, 0); wr(CFG_BPS, 2); wr(CFG_SPP, 1500); wr(CFG_AVG, 2);
    check(mode.scm == SCM_1 && mode.dtm == DTM_1 && mode.bps == BPS_12 &&
          mode.spp == 12'd1500 && mode.avg == AVG_4 && mode.valid, "written values");
    wr(CFG_DTM, 2); check(!mode.valid, "mode 1 with transfer mode 2.2 rejected");
    wr(CFG_SCM, 1); check(mode.valid, "mode 2 with transfer mode 2.2 accepted");
    wr(CFG_SPP, 3201); check(!mode.valid, "3201 samples rejected");
    wr(CFG_SPP, 3200); check(mode.valid, "3200 samples accepted");
    wr(CFG_SPP, 7); check(!mode.valid, "odd samples rejected");
    wr(CFG_SPP, 2000);

    // sensor-side counting: 3 sweeps of 20 laser pulses (averaging by 4)
    for (int s = 0; s < 5; s++) begin
      @(negedge clk); mirror_sync = 1; @(negedge clk); mirror_sync = 0;
      @(negedge clk);
      check(sensor_sweep == 3'(s % 4), $sformatf("sensor sweep %0d", s));
      check(sensor_column == 0, "column reset at sweep start");
      for (int c = 0; c < 20; c++) begin
        laser_sync = 1; @(negedge clk); @(negedge clk); laser_sync = 0; @(negedge clk);
      end
      check(sensor_column == 5'd20, $sformatf("20 columns counted in sweep %0d", s));
    end

    // data-side sweep tracking for each averaging factor
    for (int a = 1; a <= 3; a++) begin
      wr(CFG_AVG, a);
      // return to sweep 0 (counter is reset only by reset)
      rst_n = 0; @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
      wr(CFG_AVG, a);
      for (int s = 0; s < 2 * (1 << a); s++) begin
        check(first_sweep == ((s % (1 << a)) == 0), $sformatf("first_sweep a=%0d s=%0d", a, s));
        check(last_sweep == ((s % (1 << a)) == (1 << a) - 1), $sformatf("last_sweep a=%0d s=%0d", a, s));
        check(data_sweep == 3'(s % (1 << a)), "data_sweep index");
        repeat (2) @(negedge clk);
        sweep_end = 1; @(negedge clk); sweep_end = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
