// lidar_system: LiDAR signal-averaging system for four interfaces and
// sixteen SRAM banks.
//
// A 16- or 32-line LiDAR grid is delivered over four radar-style interfaces,
// each carrying the samples of 4 lines (sensor connection mode 1) or 8 lines
// (mode 2). Each interface feeds its own averager, which accumulates the
// repeated sweeps of the MEMS mirror over a set of 20 columns and writes the
// averaged pixel signals to its four SRAM banks (averager k owns banks
// 4k..4k+3; mode 1 uses the first two of them). The four averagers run the
// same configuration in lockstep; configuration writes, reset and the laser
// and mirror sync signals are broadcast to all of them.
//
// Interface: rif_valid[k]/rif_data[k] is the 32-bit word stream of interface
// k (two 16-bit samples, earlier lane in bits 15:0). Status outputs are per
// averager; avg_valid/avg_data[k] is averager k's AVG output stream, which a
// following stage can use directly (the completed averages are the words
// with last_sweep high). cfar_*[k] is the peak-detection result stream of
// averager k (see cfar). The banks are instantiated here; a reader of the
// averaged frame is outside this design and accesses them directly.
//
// From the document: four interfaces, four averagers, four banks per
// averager, and a peak detector fed by each AVG output (proposed there as an
// extension). This implementation's own choices: which physical banks belong
// to which averager, and that peak results leave as a stream instead of being
// written to the spare banks.
module lidar_system
  import lidar_pkg::*;
#(
  parameter int unsigned NUM_AVG      = 4,
  parameter int unsigned BUF_WORDS    = 16384,
  parameter int unsigned BANK_DEPTH_P = BANK_DEPTH,
  parameter int unsigned COLS         = COLS_PER_SET
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  cfg_addr_e         cfg_addr,
  input  logic [15:0]       cfg_wdata,
  input  logic              laser_sync,
  input  logic              mirror_sync,
  input  logic              rif_valid [NUM_AVG],
  input  logic [WORD_W-1:0] rif_data  [NUM_AVG],
  input  logic              drain,
  output mode_t             mode      [NUM_AVG],
  output logic              ready     [NUM_AVG],
  output logic              running   [NUM_AVG],
  output logic              last_sweep[NUM_AVG],
  output logic              avg_valid [NUM_AVG],
  output logic [WORD_W-1:0] avg_data  [NUM_AVG],
  output logic [2:0]        data_sweep[NUM_AVG],
  output logic [4:0]        sensor_column[NUM_AVG],
  output logic [2:0]        sensor_sweep [NUM_AVG],
  output logic              cfar_valid   [NUM_AVG],
  output logic [2:0]        cfar_adc     [NUM_AVG],
  output logic [SPP_W-1:0]  cfar_cut     [NUM_AVG],
  output logic [1:0]        cfar_mask    [NUM_AVG],
  output logic [1:0]        cfar_peak    [NUM_AVG]
);

  for (genvar k = 0; k < NUM_AVG; k++) begin : g_avg
    bank_req_t         req  [NUM_BANKS];
    logic [BANK_W-1:0] rdata[NUM_BANKS];

    averager #(.BUF_WORDS(BUF_WORDS), .BANK_DEPTH_P(BANK_DEPTH_P), .COLS(COLS)) u_averager (
      .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .laser_sync, .mirror_sync,
      .rif_valid(rif_valid[k]), .rif_data(rif_data[k]), .drain,
      .bank_req(req), .bank_rdata(rdata),
      .mode(mode[k]), .ready(ready[k]), .running(running[k]),
      .last_sweep(last_sweep[k]), .avg_valid(avg_valid[k]), .avg_data(avg_data[k]),
      .data_sweep(data_sweep[k]),
      .sensor_column(sensor_column[k]), .sensor_sweep(sensor_sweep[k])
    );

    // peak detection on the averaged stream; held in reset while the
    // averager is not ready (reset and bank clear)
    cfar u_cfar (
      .clk, .rst(!ready[k]), .mode(mode[k]), .last_sweep(last_sweep[k]),
      .avg_valid(avg_valid[k]), .avg_data(avg_data[k]),
      .cfar_valid(cfar_valid[k]), .cfar_adc(cfar_adc[k]), .cfar_cut(cfar_cut[k]),
      .cfar_mask(cfar_mask[k]), .cfar_peak(cfar_peak[k])
    );

    for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
      sram_bank #(.DEPTH(BANK_DEPTH_P), .AW(BANK_AW)) u_bank (
        .clk, .en(req[b].en), .rw(req[b].rw), .addr(req[b].addr),
        .wdata(req[b].wdata), .rdata(rdata[b])
      );
    end
  end

endmodule
