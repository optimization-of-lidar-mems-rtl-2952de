// averager: one complete averaging channel, serving one interface (4 or 8
// grid lines) and four SRAM banks.
//
// Data path: interface words -> assembler (reorder to per-ADC sample pairs)
// -> AVG (add the stored pair of the previous sweep, divide on the last
// sweep) -> memory manager (write back, and fetch the pairs the AVG needs
// next). The controller holds the configuration, synchronises the reset for
// the other blocks and tells the AVG and memory manager which sweep of the
// averaging run the data belongs to.
//
// Usage: release rst_n, write the configuration registers, wait for ready
// (the banks are being zeroed for BANK_DEPTH clocks), then stream interface
// words with rif_valid, column after column and sweep after sweep over a set
// of 20 columns. After the last sweep of a run, each bank holds the averaged
// samples of its two lines for the whole set. At the end of the stream hold
// drain high until the assembler has emptied (running low and no out_valid).
// avg_valid/avg_data carry every pair leaving the AVG unit (with last_sweep
// marking the completed averages), the point where a following stage such as
// a peak detector can take the averaged signal without reading the SRAM.
//
// From the document: the four subsystems and their connections (Mode,
// Last_sweep, Reset, AVG Input 2 / AVG Output). The first_sweep and
// sweep_end connections between controller and memory manager are this
// implementation's own.
module averager
  import lidar_pkg::*;
#(
  parameter int unsigned BUF_WORDS  = 16384,
  parameter int unsigned BANK_DEPTH_P = BANK_DEPTH,
  parameter int unsigned COLS       = COLS_PER_SET
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  cfg_addr_e         cfg_addr,
  input  logic [15:0]       cfg_wdata,
  input  logic              laser_sync,
  input  logic              mirror_sync,
  input  logic              rif_valid,
  input  logic [WORD_W-1:0] rif_data,
  input  logic              drain,
  output bank_req_t         bank_req  [NUM_BANKS],
  input  logic [BANK_W-1:0] bank_rdata[NUM_BANKS],
  output mode_t             mode,
  output logic              ready,
  output logic              running,
  output logic              last_sweep,
  output logic              avg_valid,     // an averaged pair is on avg_data
  output logic [WORD_W-1:0] avg_data,      // AVG output, as written to SRAM
  output logic [2:0]        data_sweep,
  output logic [4:0]        sensor_column,
  output logic [2:0]        sensor_sweep
);

  logic              rst_sync;
  logic              first_sweep;
  logic              sweep_end;
  logic              asm_valid;
  logic [WORD_W-1:0] asm_data;
  logic [WORD_W-1:0] avg_prev;
  logic [WORD_W-1:0] avg_result;

  controller u_controller (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .laser_sync, .mirror_sync, .sweep_end,
    .rst_sync, .mode, .last_sweep, .first_sweep,
    .sensor_column, .sensor_sweep, .data_sweep
  );

  assembler #(.BUF_WORDS(BUF_WORDS)) u_assembler (
    .clk, .rst(rst_sync), .mode,
    .in_valid(rif_valid), .in_data(rif_data), .drain,
    .out_valid(asm_valid), .out_data(asm_data), .running
  );

  avg u_avg (
    .new_pair(asm_data), .prev_pair(avg_prev),
    .last_sweep, .avg_shift(mode.avg), .result(avg_result)
  );

  mem_manager #(.DEPTH(BANK_DEPTH_P), .COLS(COLS)) u_mem_manager (
    .clk, .rst(rst_sync), .mode, .first_sweep,
    .in_valid(asm_valid), .avg_result, .avg_prev,
    .bank_req, .bank_rdata, .ready, .sweep_end
  );

  assign avg_valid = asm_valid;
  assign avg_data  = avg_result;

endmodule
