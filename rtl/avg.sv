// avg: sample-pair accumulator of the averager.
//
// Adds the two 16-bit samples of the new interface word (lower half is the
// earlier sample) to the two running sums of the same positions from the
// previous sweep, read back from SRAM. While last_sweep is high the sums are
// shifted right by the averaging shift (1, 2 or 3 for averaging by 2, 4 or 8),
// which completes the average as an integer division. The unit is purely
// combinational and has no control over which samples reach it: the memory
// manager lines the stored pair up with the incoming pair.
//
// Follows the document: combinational two-lane adder with a shift selected by
// the last-sweep signal. This implementation's choice: the 17-bit sum is
// truncated to 16 bits; with 8 to 12-bit samples and at most 8 sweeps the
// sum never exceeds 15 bits, so nothing is lost.
module avg
  import lidar_pkg::*;
(
  input  logic [WORD_W-1:0] new_pair,    // from the assembler
  input  logic [WORD_W-1:0] prev_pair,   // from the memory manager ("AVG Input 2")
  input  logic              last_sweep,  // divide after this addition
  input  avg_e              avg_shift,   // 1, 2 or 3
  output logic [WORD_W-1:0] result
);

  logic [SAMPLE_W:0] sum_lo, sum_hi;

  always_comb begin
    sum_lo = {1'b0, new_pair[SAMPLE_W-1:0]}        + {1'b0, prev_pair[SAMPLE_W-1:0]};
    sum_hi = {1'b0, new_pair[WORD_W-1:SAMPLE_W]}   + {1'b0, prev_pair[WORD_W-1:SAMPLE_W]};
    if (last_sweep) begin
      sum_lo = sum_lo >> avg_shift;
      sum_hi = sum_hi >> avg_shift;
    end
    result = {sum_hi[SAMPLE_W-1:0], sum_lo[SAMPLE_W-1:0]};
  end

endmodule
