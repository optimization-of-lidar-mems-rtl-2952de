// controller: configuration registers, reset distribution and sweep
// tracking for one averager.
//
// Configuration registers hold the sensor connection mode, data transfer
// mode, bits per sample, samples per pixel and averaging factor; they are
// written one at a time through cfg_we/cfg_addr/cfg_wdata (register map in
// lidar_pkg::cfg_addr_e) and must be loaded before processing starts. The
// controller packs them into the Mode record and flags whether the
// combination is supported (connection mode 1 only with transfer mode 1,
// connection mode 2 only with transfer modes 2.1/2.2, an even number of
// samples per pixel from 2 to 3200).
//
// The external asynchronous reset is synchronised to the clock with a
// two-stage synchroniser and handed to the other blocks as rst_sync
// (asserted immediately, released two clock edges after rst_n rises).
//
// Laser sync pulses (one per fired light pulse, i.e. per grid column) and
// MEMS mirror sync pulses (one at the start of each sweep over the column
// set) are edge-detected and counted into sensor-side column and sweep
// indices. The signals that steer the averaging, last_sweep and first_sweep,
// are taken from a data-side sweep counter that advances on sweep_end, a
// pulse from the memory manager when the last word of a sweep over the column
// set is written; this keeps them aligned with the data that reaches the AVG
// unit, which lags the sensor by the assembler's buffering. last_sweep is
// high during the final sweep of an averaging run, first_sweep during the
// first one.
//
// From the document: the register list, the Mode, Last_sweep and Reset
// outputs, the Laser sync and MEMS mirror sync inputs. This implementation's
// own choices: the register bus, the encodings, the reset values (the
// operating point of the document's simulated system: connection mode 2,
// transfer mode 2.1, 8-bit samples, 2000 samples per pixel, averaging by 8),
// the first_sweep output and deriving the sweep count from the data stream.
module controller
  import lidar_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,        // external asynchronous reset, active low
  // configuration register port
  input  logic             cfg_we,
  input  cfg_addr_e        cfg_addr,
  input  logic [15:0]      cfg_wdata,
  // sensor timing
  input  logic             laser_sync,
  input  logic             mirror_sync,
  // data-side sweep boundary from the memory manager
  input  logic             sweep_end,
  // outputs
  output logic             rst_sync,     // synchronised reset, active high
  output mode_t            mode,
  output logic             last_sweep,
  output logic             first_sweep,
  output logic [4:0]       sensor_column, // column of the current set at the sensor
  output logic [2:0]       sensor_sweep,  // sweep index at the sensor
  output logic [2:0]       data_sweep     // sweep index of the data being averaged
);

  // ---------------- reset synchroniser ----------------
  logic [1:0] rst_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_pipe <= 2'b11;
    else        rst_pipe <= {rst_pipe[0], 1'b0};
  end
  assign rst_sync = rst_pipe[1];

  // ---------------- configuration registers ----------------
  scm_e             scm_q;
  dtm_e             dtm_q;
  bps_e             bps_q;
  logic [SPP_W-1:0] spp_q;
  avg_e             avg_q;

  always_ff @(posedge clk) begin
    if (rst_sync) begin
      scm_q <= SCM_2;
      dtm_q <= DTM_2_1;
      bps_q <= BPS_8;
      spp_q <= SPP_W'(2000);
      avg_q <= AVG_8;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        CFG_SCM: scm_q <= scm_e'(cfg_wdata[0]);
        CFG_DTM: dtm_q <= dtm_e'(cfg_wdata[1:0]);
        CFG_BPS: bps_q <= bps_e'(cfg_wdata[1:0]);
        CFG_SPP: spp_q <= cfg_wdata[SPP_W-1:0];
        CFG_AVG: avg_q <= avg_e'(cfg_wdata[1:0]);
        default: ;
      endcase
    end
  end

  logic combo_ok;
  always_comb begin
    combo_ok = (scm_q == SCM_1) ? (dtm_q == DTM_1)
                                : (dtm_q == DTM_2_1 || dtm_q == DTM_2_2);
    mode.scm   = scm_q;
    mode.dtm   = dtm_q;
    mode.bps   = bps_q;
    mode.spp   = spp_q;
    mode.avg   = avg_q;
    mode.valid = combo_ok && (bps_q != 2'd3) && (avg_q != 2'd0) &&
                 (spp_q[0] == 1'b0) && (spp_q >= SPP_W'(2)) &&
                 (spp_q <= SPP_W'(MAX_SPP));
  end

  // number of sweeps in one averaging run, minus one
  logic [2:0] last_idx;
  always_comb last_idx = 3'((4'd1 << avg_q) - 4'd1);

  // ---------------- sensor-side timing ----------------
  logic laser_q, mirror_q;
  logic laser_rise, mirror_rise;
  always_ff @(posedge clk) begin
    if (rst_sync) begin
      laser_q  <= 1'b0;
      mirror_q <= 1'b0;
    end else begin
      laser_q  <= laser_sync;
      mirror_q <= mirror_sync;
    end
  end
  assign laser_rise  = laser_sync  && !laser_q;
  assign mirror_rise = mirror_sync && !mirror_q;

  // The first mirror pulse after reset opens sweep 0; laser pulses before it
  // are not counted.
  logic started;
  always_ff @(posedge clk) begin
    if (rst_sync) begin
      started       <= 1'b0;
      sensor_sweep  <= '0;
      sensor_column <= '0;
    end else if (mirror_rise) begin
      sensor_column <= '0;
      if (started) sensor_sweep <= (sensor_sweep == last_idx) ? 3'd0 : sensor_sweep + 3'd1;
      started <= 1'b1;
    end else if (laser_rise && started && sensor_column != 5'(COLS_PER_SET)) begin
      sensor_column <= sensor_column + 5'd1;
    end
  end

  // ---------------- data-side sweep tracking ----------------
  always_ff @(posedge clk) begin
    if (rst_sync)       data_sweep <= '0;
    else if (sweep_end) data_sweep <= (data_sweep == last_idx) ? 3'd0 : data_sweep + 3'd1;
  end

  assign last_sweep  = (data_sweep == last_idx);
  assign first_sweep = (data_sweep == 3'd0);

endmodule
