// dds_pkg - constants, types and the wave-table formula shared by the
// parallel direct digital synthesizer (DDS).
//
// The default sizes are those of the reference implementation: a 10-bit
// phase/address path (one wave period stored as 2^10 samples), 10-bit
// signed samples and a parallelism of 4 lanes, i.e. four consecutive
// output samples per clock.  The table formula (full-scale amplitude
// 2^(AMP_W-1)-1, round to nearest, two's complement) is this design's
// choice; the reference only states that the period is sampled with
// 2^10 points in 10-bit fixed point.
package dds_pkg;

  // Default sizes.
  localparam int unsigned PHASE_W_DEF = 10;  // phase accumulator / LUT address bits
  localparam int unsigned AMP_W_DEF   = 10;  // sample width
  localparam int unsigned LANES_DEF   = 4;   // samples produced per clock

  // Which wave a lookup table holds.
  typedef enum logic {
    WAVE_SINE   = 1'b0,
    WAVE_COSINE = 1'b1
  } wave_e;

  localparam real PI = 3.14159265358979323846;

  // Table entry `idx` of a 2^phase_w-entry table:
  //   round((2^(amp_w-1)-1) * sin(2*pi*idx/2^phase_w)), or cos for WAVE_COSINE.
  // Used at elaboration to fill the lookup tables and by testbenches as
  // an independent reference.
  function automatic int wave_sample(int unsigned idx, int unsigned phase_w,
                                     int unsigned amp_w, wave_e wave);
    real angle;
    real amp;
    angle = 2.0 * PI * real'(idx) / real'(2.0 ** phase_w);
    amp   = real'((2 ** (amp_w - 1)) - 1);
    if (wave == WAVE_COSINE) return int'(amp * $cos(angle));
    else                     return int'(amp * $sin(angle));
  endfunction

endpackage
