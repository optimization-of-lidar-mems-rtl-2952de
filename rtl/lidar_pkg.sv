// lidar_pkg: types and constants shared by the LiDAR averaging system.
//
// The averager works on 16-bit samples carried two to a 32-bit word and four
// to a 64-bit SRAM word. The operating point of one averager is described by
// the Mode record that the controller builds from its configuration
// registers: sensor connection mode (4 or 8 ADCs per interface), data
// transfer mode (the sample order on the interface), bits per ADC sample,
// samples per pixel and averaging factor. The field list follows the
// configuration register list of the design; the encodings are this
// implementation's own.
package lidar_pkg;

  localparam int unsigned SAMPLE_W     = 16;    // every sample is carried as 16 bits
  localparam int unsigned WORD_W       = 32;    // interface / AVG word: two samples
  localparam int unsigned BANK_W       = 64;    // SRAM word: four samples
  localparam int unsigned MAX_SPP      = 3200;  // maximum samples per pixel
  localparam int unsigned COLS_PER_SET = 20;    // grid columns averaged together
  localparam int unsigned NUM_BANKS    = 4;     // SRAM banks per averager
  localparam int unsigned BANK_DEPTH   = 32000; // 64-bit addresses per 256 kB bank
  localparam int unsigned SPP_W        = 12;    // width of the samples-per-pixel field

  // Sensor connection mode: 1 = one ADC per LVDS lane (16-line grid),
  // 2 = two multiplexed ADCs per lane (32-line grid).
  typedef enum logic {
    SCM_1 = 1'b0,
    SCM_2 = 1'b1
  } scm_e;

  // Data transfer mode: order of the samples delivered by the interface.
  typedef enum logic [1:0] {
    DTM_1   = 2'd0,  // one ADC per lane
    DTM_2_1 = 2'd1,  // two ADCs per lane, interleaved sample by sample
    DTM_2_2 = 2'd2   // two ADCs per lane, one ADC's whole column after the other's
  } dtm_e;

  typedef enum logic [1:0] {
    BPS_8  = 2'd0,
    BPS_10 = 2'd1,
    BPS_12 = 2'd2
  } bps_e;

  // Averaging factor, encoded as the right shift that completes the average.
  typedef enum logic [1:0] {
    AVG_2 = 2'd1,
    AVG_4 = 2'd2,
    AVG_8 = 2'd3
  } avg_e;

  typedef struct packed {
    scm_e             scm;
    dtm_e             dtm;
    bps_e             bps;
    logic [SPP_W-1:0] spp;    // samples per pixel (even, 2..3200)
    avg_e             avg;
    logic             valid;  // the combination above is supported
  } mode_t;

  // Configuration register addresses of the controller.
  typedef enum logic [2:0] {
    CFG_SCM = 3'd0,
    CFG_DTM = 3'd1,
    CFG_BPS = 3'd2,
    CFG_SPP = 3'd3,
    CFG_AVG = 3'd4
  } cfg_addr_e;

  localparam int unsigned BANK_AW = 15;  // address width of a bank

  // Request from the memory manager to one SRAM bank ("SRAM clock" as an
  // access strobe, R/W, address, write data).
  typedef struct packed {
    logic               en;
    logic               rw;     // 0 = read, 1 = write
    logic [BANK_AW-1:0] addr;
    logic [BANK_W-1:0]  wdata;
  } bank_req_t;


endpackage
