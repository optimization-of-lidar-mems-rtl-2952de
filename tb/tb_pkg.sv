// tb_pkg: stimulus model shared by the testbenches.
//
// It stands in for the LiDAR sensor and the interface in front of the
// averager: sample(...) gives a reproducible ADC sample for any averager,
// sweep, column, ADC and sample index (a hash masked to the configured bits
// per sample), and rif_word(...) gives the 32-bit word the interface
// delivers at a given position of a column in each data transfer mode.
// The expected averages are computed from sample() directly, independently of
// the design.
package tb_pkg;
  import lidar_pkg::*;

  function automatic int unsigned bits_of(input bps_e b);
    return (b == BPS_8) ? 8 : (b == BPS_10) ? 10 : 12;
  endfunction

  function automatic logic [15:0] sample(input int unsigned aid, input int unsigned sweep,
                                         input int unsigned col, input int unsigned adc,
                                         input int unsigned k, input int unsigned bits);
    logic [31:0] h;
    h = aid * 32'h9E3779B1 ^ sweep * 32'h85EBCA77 ^ col * 32'hC2B2AE3D ^
        adc * 32'h27D4EB2F ^ k * 32'h165667B1;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return 16'(h & ((32'd1 << bits) - 1));
  endfunction

  // ADC numbers (0 = a) of the lower and upper half of word w of a column.
  function automatic void word_adcs(input dtm_e dtm, input int unsigned spp, input int unsigned w,
                                    output int unsigned k, output int unsigned adc_lo,
                                    output int unsigned adc_hi);
    int unsigned slot, lh, rem;
    case (dtm)
      DTM_1: begin
        k = w / 2;  adc_lo = 2 * (w % 2);  adc_hi = adc_lo + 1;
      end
      DTM_2_1: begin
        k = w / 4;  slot = (w % 4) / 2;  lh = w % 2;
        adc_lo = (2 * lh) * 2 + slot;  adc_hi = (2 * lh + 1) * 2 + slot;
      end
      default: begin
        slot = w / (2 * spp);  rem = w % (2 * spp);  k = rem / 2;  lh = rem % 2;
        adc_lo = (2 * lh) * 2 + slot;  adc_hi = (2 * lh + 1) * 2 + slot;
      end
    endcase
  endfunction

  function automatic logic [31:0] rif_word(input dtm_e dtm, input int unsigned spp,
                                           input int unsigned bits, input int unsigned aid,
                                           input int unsigned sweep, input int unsigned col,
                                           input int unsigned w);
    int unsigned k, lo, hi;
    word_adcs(dtm, spp, w, k, lo, hi);
    return {sample(aid, sweep, col, hi, k, bits), sample(aid, sweep, col, lo, k, bits)};
  endfunction

  // Expected stored value after `sweeps` sweeps of an averaging run by
  // 2**shift (divided only once the run is complete).
  function automatic logic [15:0] expected(input int unsigned aid, input int unsigned sweeps,
                                           input int unsigned shift, input int unsigned col,
                                           input int unsigned adc, input int unsigned k,
                                           input int unsigned bits, input int unsigned first_sweep);
    int unsigned acc;
    acc = 0;
    for (int unsigned s = 0; s < sweeps; s++)
      acc += sample(aid, first_sweep + s, col, adc, k, bits);
    if (sweeps == (1 << shift)) acc = acc >> shift;
    return 16'(acc);
  endfunction
endpackage
