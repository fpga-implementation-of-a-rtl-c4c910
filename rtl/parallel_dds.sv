// parallel_dds - frame-based direct digital synthesizer producing LANES
// consecutive samples of a sine (or cosine) wave every clock.
//
// A phase generator accumulates the tuning word k; a frame address
// generator turns the phase into LANES table addresses
// A_i = LANES*Ph + i*k; LANES identical lookup tables (one per lane,
// since one table cannot be read at LANES addresses at once) convert the
// addresses to samples.  sample_o[0] is the oldest sample of the frame and
// sample_o[LANES-1] the newest, so serialising the lanes in index order
// gives the sample stream of a classic DDS running LANES times faster:
// output frequency F = k * LANES * f_clk / 2^PHASE_W.
//
// Interface: clk_i, synchronous active-high rst_i, unsigned tuning word
// k_i, sample_o[LANES], wrap_o (the phase accumulator wrapped this clock).
// Timing: the frame whose lane-0 phase is the accumulator value after
// reset (zero) appears on sample_o two clocks after the first clock with
// rst_i low.  A new k_i is taken in every clock and the phase stays
// continuous across a change.
//
// The block structure, the 4 lanes and the 10-bit path follow the
// reference architecture; reset, the wrap flag, the pipeline registers
// and the multiplier gain LANES are this design's choices.
module parallel_dds #(
  parameter int unsigned    LANES   = dds_pkg::LANES_DEF,
  parameter int unsigned    PHASE_W = dds_pkg::PHASE_W_DEF,
  parameter int unsigned    AMP_W   = dds_pkg::AMP_W_DEF,
  parameter dds_pkg::wave_e WAVE    = dds_pkg::WAVE_SINE
) (
  input  logic                    clk_i,
  input  logic                    rst_i,
  input  logic [PHASE_W-1:0]      k_i,
  output logic signed [AMP_W-1:0] sample_o [LANES],
  output logic                    wrap_o
);

  logic [PHASE_W-1:0] ph;
  logic [PHASE_W-1:0] addr [LANES];

  phase_generator #(.PHASE_W(PHASE_W)) u_phase (
    .clk_i (clk_i),
    .rst_i (rst_i),
    .k_i   (k_i),
    .ph_o  (ph),
    .wrap_o(wrap_o)
  );

  frame_address_generator #(.LANES(LANES), .PHASE_W(PHASE_W)) u_fag (
    .clk_i (clk_i),
    .ph_i  (ph),
    .k_i   (k_i),
    .addr_o(addr)
  );

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    sine_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W), .WAVE(WAVE)) u_lut (
      .clk_i (clk_i),
      .addr_i(addr[i]),
      .data_o(sample_o[i])
    );
  end

endmodule
