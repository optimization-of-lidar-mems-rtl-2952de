// mem_manager: schedules all SRAM traffic of one averager.
//
// For every word leaving the assembler (two consecutive samples of one ADC)
// the memory manager supplies, in the same clock, the running sums of the
// same two samples from the previous sweep ("AVG Input 2"), and it stores the
// AVG result back in place. Bank b holds ADCs 2b and 2b+1 (lines a,b in bank
// 0, c,d in bank 1, ...); connection mode 1 uses banks 0-1, mode 2 banks
// 0-3. One 64-bit address holds {y[2p+1], y[2p], x[2p+1], x[2p]} for the ADC
// pair x,y of the bank, and the address is column * N/2 + p (N = samples per
// pixel), so a sweep over the 20-column set fills addresses 0 .. 10N-1.
//
// The stream is handled in groups: one group is one sample pair p across all
// ADCs (4 or 8 words). Within a group, for bank b:
//   - the result for ADC 2b is parked in a 32-bit write buffer; the word of
//     ADC 2b+1 completes the 64-bit word, which is written at that event;
//   - the read of the bank's next address is issued two words before the
//     bank's first word is needed, into a 64-bit read buffer; for bank 0 this
//     falls in the previous group.
// Each bank thus sees one read and one write per group, i.e. an access every
// second clock in connection mode 1 and every fourth in mode 2 at full input
// rate, and no two banks are driven by the same event. The stream may pause
// (in_valid low) at any point. A read takes two edges: requested at one edge,
// captured into the read buffer at the next.
//
// After reset the manager first writes zeros to every address of all four
// banks (DEPTH clocks) and only then raises ready; the stream must not start
// before. While first_sweep is high AVG Input 2 is forced to zero, so a new
// averaging run starts from zero even though the banks still hold the
// previous run's averages. sweep_end pulses (combinationally) with the last
// word of every sweep over the column set.
//
// From the document: bank count per mode, a 64-bit read buffer per bank, the
// bank-to-line assignment, the address map within a bank, the
// read-then-write loop per address, the zero-clear on reset and the access
// rates. This implementation's own choices: the exact slots of the reads and
// writes, a 32-bit instead of a 64-bit write buffer (the second half is
// written straight from the AVG output), the first_sweep zero forcing and
// the sweep_end output.
module mem_manager
  import lidar_pkg::*;
#(
  parameter int unsigned DEPTH        = BANK_DEPTH,   // addresses cleared after reset
  parameter int unsigned COLS         = COLS_PER_SET  // columns per averaging set
) (
  input  logic              clk,
  input  logic              rst,           // synchronous, active high
  input  mode_t             mode,
  input  logic              first_sweep,
  // stream from the assembler / AVG
  input  logic              in_valid,      // a word is at the AVG this clock
  input  logic [WORD_W-1:0] avg_result,    // "AVG Output"
  output logic [WORD_W-1:0] avg_prev,      // "AVG Input 2"
  // SRAM banks
  output bank_req_t         bank_req  [NUM_BANKS],
  input  logic [BANK_W-1:0] bank_rdata[NUM_BANKS],
  // status
  output logic              ready,
  output logic              sweep_end
);

  localparam int unsigned AW = BANK_AW;

  logic [2:0]     adc_idx;                 // ADC of the current word within the group
  logic [AW-1:0]  grp_addr;                // bank address of the current group
  logic [AW-1:0]  next_addr;
  logic [AW-1:0]  last_addr;               // COLS * N/2 - 1
  logic [2:0]     last_adc;
  logic [1:0]     bank_sel;

  logic [BANK_W-1:0] rbuf [NUM_BANKS];
  logic [WORD_W-1:0] wbuf [NUM_BANKS];
  logic [NUM_BANKS-1:0] rd_pend;

  logic          clearing;
  logic [AW-1:0] clr_addr;

  always_comb begin
    last_adc  = (mode.scm == SCM_2) ? 3'd7 : 3'd3;
    last_addr = AW'(COLS * (int'(mode.spp) >> 1) - 1);
    next_addr = (grp_addr == last_addr) ? '0 : grp_addr + AW'(1);
    bank_sel  = adc_idx[2:1];
  end

  // ---------------- AVG Input 2 ----------------
  always_comb begin
    if (first_sweep) avg_prev = '0;
    else if (adc_idx[0]) avg_prev = rbuf[bank_sel][BANK_W-1:WORD_W];
    else                 avg_prev = rbuf[bank_sel][WORD_W-1:0];
  end

  // ---------------- bank requests ----------------
  // even word of bank b: read for bank b+1 (current group) or, for the
  // second-to-last ADC of the group, bank 0 (next group); odd word of bank b:
  // write bank b.
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_req[b].en    = 1'b0;
      bank_req[b].rw    = 1'b0;
      bank_req[b].addr  = grp_addr;
      bank_req[b].wdata = {avg_result, wbuf[b]};
    end
    if (clearing) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        bank_req[b].en    = 1'b1;
        bank_req[b].rw    = 1'b1;
        bank_req[b].addr  = clr_addr;
        bank_req[b].wdata = '0;
      end
    end else if (in_valid) begin
      if (adc_idx[0]) begin
        bank_req[bank_sel].en = 1'b1;
        bank_req[bank_sel].rw = 1'b1;
      end else if (adc_idx == last_adc - 3'd1) begin
        bank_req[0].en   = 1'b1;
        bank_req[0].addr = next_addr;
      end else begin
        bank_req[bank_sel + 2'd1].en = 1'b1;
      end
    end
    // no bank access while reset is held (the state is not yet defined)
    if (rst) begin
      for (int b = 0; b < NUM_BANKS; b++) bank_req[b].en = 1'b0;
    end
  end

  assign sweep_end = ready && in_valid && (adc_idx == last_adc) && (grp_addr == last_addr);

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      clearing <= 1'b1;
      clr_addr <= '0;
      ready    <= 1'b0;
      adc_idx  <= '0;
      grp_addr <= '0;
      rd_pend  <= '0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        rbuf[b] <= '0;
        wbuf[b] <= '0;
      end
    end else begin
      if (clearing) begin
        if (clr_addr == AW'(DEPTH - 1)) begin
          clearing <= 1'b0;
          ready    <= 1'b1;
        end
        clr_addr <= clr_addr + AW'(1);
      end

      // capture read data one edge after the request
      for (int b = 0; b < NUM_BANKS; b++) begin
        rd_pend[b] <= bank_req[b].en && !bank_req[b].rw && !clearing;
        if (rd_pend[b]) rbuf[b] <= bank_rdata[b];
      end

      if (in_valid && !clearing) begin
        if (!adc_idx[0]) wbuf[bank_sel] <= avg_result;
        if (adc_idx == last_adc) begin
          adc_idx  <= '0;
          grp_addr <= next_addr;
        end else begin
          adc_idx <= adc_idx + 3'd1;
        end
      end
    end
  end

  // The stream may only run once the banks are cleared.
  always_ff @(posedge clk) begin
    if (!rst && in_valid) assert (ready) else $error("mem_manager: data before clear finished");
  end

endmodule
