// sine_lut - read-only table holding one period of a sine or cosine wave.
//
// 2^PHASE_W entries of AMP_W-bit two's-complement samples,
// entry n = round((2^(AMP_W-1)-1) * sin(2*pi*n/2^PHASE_W)) (cos when
// WAVE = WAVE_COSINE).  The table is computed at elaboration from that
// formula, so no data file is needed.  The read is synchronous, as in an
// FPGA block RAM: data_o shows the entry of addr_i one clock later.
//
// The size (2^10 x 10 bit) follows the reference implementation; the
// amplitude scaling, rounding and the one-clock read latency are this
// design's choices.
module sine_lut #(
  parameter int unsigned   PHASE_W = dds_pkg::PHASE_W_DEF,
  parameter int unsigned   AMP_W   = dds_pkg::AMP_W_DEF,
  parameter dds_pkg::wave_e WAVE   = dds_pkg::WAVE_SINE
) (
  input  logic                    clk_i,
  input  logic [PHASE_W-1:0]      addr_i,
  output logic signed [AMP_W-1:0] data_o
);

  localparam int unsigned DEPTH = 2 ** PHASE_W;

  typedef logic signed [AMP_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned n = 0; n < DEPTH; n++)
      r[n] = AMP_W'(dds_pkg::wave_sample(n, PHASE_W, AMP_W, WAVE));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk_i) data_o <= ROM[addr_i];

endmodule
