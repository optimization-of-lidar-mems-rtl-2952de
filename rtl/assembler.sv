// assembler: reorders the interface stream so that every output word holds
// two consecutive samples of one ADC.
//
// The interface delivers one 32-bit word (two 16-bit samples) per in_valid.
// Its order depends on the data transfer mode (N = samples per pixel, lanes
// carry ADCs a..d, or a/b, c/d, e/f, g/h when two ADCs share a lane; the
// earlier sample of a word sits in bits 15:0):
//   mode 1   : (a0,b0) (c0,d0) (a1,b1) (c1,d1) ...
//   mode 2.1 : (a0,c0) (e0,g0) (b0,d0) (f0,h0) (a1,c1) ...
//   mode 2.2 : (a0,c0) (e0,g0) (a1,c1) ... (e[N-1],g[N-1]) (b0,d0) (f0,h0) ...
// and then the next column follows without a gap. The output order is the
// same in every mode: (a0,a1) (b0,b1) ... (last ADC 0,1) (a2,a3) ... per
// column, column after column.
//
// How it works: every incoming word is written into a circular buffer at the
// next write position. An output word is formed from two buffer words read
// at addresses computed from the output position (sample pair p, ADC n) and
// the transfer mode, relative to the start of the current column in the
// buffer. After the first L words have been buffered (L = 4, 8 and 2N+4 for
// modes 1, 2.1 and 2.2) the assembler emits one output word for every input
// word, so it keeps the input rate with a fixed lag of L words; every word an
// output needs has been written by then. When no more input comes (end of the
// run), holding drain high pushes out the L words still in the buffer, one per
// clock.
//
// Timing: out_valid/out_data are registered; the output word j of a run
// appears one clock after the input word j+L is accepted.
//
// From the document: the interface word orders, the fixed output order, the
// start-up lag of 4, 8 and 4004 words (2000 samples per pixel) and the idea of
// buffering at the input rate. This implementation's own choices: the buffer
// is addressed in arrival order, which is simple but needs up to 4N words in
// transfer mode 2.2 (12800 words for N = 3200), rounded up to the power of
// two BUF_WORDS; the document sizes the buffer at 4004 words (16.016 kB), the
// peak number of words that are held at once for N = 2000. The drain input is
// this implementation's addition.
module assembler
  import lidar_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 16384  // circular buffer depth, power of two, >= 4 * max N
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  mode_t             mode,
  input  logic              in_valid,     // interface ready strobe
  input  logic [WORD_W-1:0] in_data,
  input  logic              drain,        // flush buffered words without new input
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  output logic              running       // words are buffered that have not been emitted yet
);

  localparam int unsigned AW = $clog2(BUF_WORDS);

  logic [WORD_W-1:0] buffer [BUF_WORDS];

  logic [AW-1:0] wr_ptr;     // next write position
  logic [AW-1:0] col_base;   // buffer position of the current output column
  logic [15:0]   pending;    // words buffered and not yet emitted
  logic [10:0]   pair_idx;   // output sample pair p within the column
  logic [2:0]    adc_idx;    // output ADC n within the pair

  // ---------------- mode-derived constants ----------------
  logic [2:0]  last_adc;
  logic [10:0] last_pair;
  logic [AW-1:0] col_words;  // words per column
  logic [15:0] lag;          // start-up lag L
  always_comb begin
    last_adc  = (mode.scm == SCM_2) ? 3'd7 : 3'd3;
    last_pair = 11'(mode.spp >> 1) - 11'd1;
    col_words = (mode.scm == SCM_2) ? AW'({mode.spp, 2'b00}) : AW'({mode.spp, 1'b0});
    unique case (mode.dtm)
      DTM_1:   lag = 16'd4;
      DTM_2_1: lag = 16'd8;
      default: lag = 16'({mode.spp, 1'b0}) + 16'd4;
    endcase
  end

  // ---------------- read address generation ----------------
  // word offset (within the column) and half of sample k of ADC n
  function automatic logic [AW:0] word_of(input dtm_e dtm, input logic [11:0] spp,
                                          input logic [11:0] k, input logic [2:0] n);
    logic       lane_hi;  // lane 3 or 4 (second word of the lane pair)
    logic       slot;     // second ADC of a shared lane
    logic [AW:0] w;
    lane_hi = n[2];
    slot    = n[0];
    unique case (dtm)
      DTM_1:   w = (AW+1)'({k, 1'b0}) + (AW+1)'(n[1]);                       // lanes a..d
      DTM_2_1: w = (AW+1)'({k, 2'b00}) + (AW+1)'({slot, 1'b0}) + (AW+1)'(lane_hi);
      default: w = (slot ? (AW+1)'({spp, 1'b0}) : '0) + (AW+1)'({k, 1'b0}) + (AW+1)'(lane_hi);
    endcase
    return w;
  endfunction

  logic        half_sel;
  logic [11:0] k_even, k_odd;
  logic [AW-1:0] addr_even, addr_odd;
  logic [WORD_W-1:0] word_even, word_odd;
  always_comb begin
    // which half of the word holds ADC n: mode 1 uses n[0] (a|b, c|d pairs),
    // the two-ADC-per-lane modes use the lane's parity
    half_sel  = (mode.dtm == DTM_1) ? adc_idx[0] : adc_idx[1];
    k_even    = {pair_idx, 1'b0};
    k_odd     = {pair_idx, 1'b1};
    addr_even = col_base + AW'(word_of(mode.dtm, mode.spp, k_even, adc_idx));
    addr_odd  = col_base + AW'(word_of(mode.dtm, mode.spp, k_odd,  adc_idx));
    word_even = buffer[addr_even];
    word_odd  = buffer[addr_odd];
  end

  // ---------------- flow control ----------------
  logic emit;
  always_comb begin
    if (in_valid) emit = (pending == lag);
    else          emit = drain && (pending != 16'd0);
  end

  always_ff @(posedge clk) begin
    if (in_valid) buffer[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      col_base  <= '0;
      pending   <= '0;
      pair_idx  <= '0;
      adc_idx   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid) wr_ptr <= wr_ptr + AW'(1);
      if (in_valid && !emit)      pending <= pending + 16'd1;
      else if (!in_valid && emit) pending <= pending - 16'd1;

      out_valid <= emit;
      if (emit) begin
        out_data <= half_sel ? {word_odd[WORD_W-1:SAMPLE_W], word_even[WORD_W-1:SAMPLE_W]}
                             : {word_odd[SAMPLE_W-1:0],      word_even[SAMPLE_W-1:0]};
        if (adc_idx == last_adc) begin
          adc_idx <= '0;
          if (pair_idx == last_pair) begin
            pair_idx <= '0;
            col_base <= col_base + col_words;
          end else begin
            pair_idx <= pair_idx + 11'd1;
          end
        end else begin
          adc_idx <= adc_idx + 3'd1;
        end
      end
    end
  end

  assign running = (pending != 16'd0);

endmodule
