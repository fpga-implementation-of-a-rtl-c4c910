// frame_address_generator - computes the LANES lookup-table addresses of
// one output frame.
//
// A frame is LANES consecutive samples of the wave.  If the phase
// accumulator holds Ph = (sum of k over past clocks), the phase of sample
// i of the current frame in an equivalent one-sample-per-clock DDS is
//   A_i = LANES*Ph + i*k   (mod 2^PHASE_W),  i = 0 .. LANES-1.
// The block therefore scales Ph by the parallelism (one multiplier) and
// adds the constant offsets 0, k, 2k, ... (one adder per lane, lane 0
// needs none), exactly the multiplier/adder tree of the reference
// architecture.  The multiplier's gain is LANES here; see the design notes
// for why.  The offsets i*k are formed from the same k_i that the phase
// accumulator adds in this clock, which keeps the phase continuous when k
// changes.
//
// Timing: addr_o is registered, valid one clock after ph_i/k_i.  All
// arithmetic is PHASE_W bits wide and wraps; nothing is truncated other
// than the modulo-2^PHASE_W wrap of the phase itself.
module frame_address_generator #(
  parameter int unsigned LANES   = dds_pkg::LANES_DEF,
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W_DEF
) (
  input  logic               clk_i,
  input  logic [PHASE_W-1:0] ph_i,
  input  logic [PHASE_W-1:0] k_i,
  output logic [PHASE_W-1:0] addr_o [LANES]
);

  localparam logic [PHASE_W-1:0] GAIN = PHASE_W'(LANES);

  logic [PHASE_W-1:0] base;            // LANES * Ph
  logic [PHASE_W-1:0] offset [LANES];  // i * k
  logic [PHASE_W-1:0] addr_d [LANES];

  always_comb begin
    base = ph_i * GAIN;
    for (int unsigned i = 0; i < LANES; i++) begin
      offset[i] = PHASE_W'(i) * k_i;
      addr_d[i] = base + offset[i];
    end
  end

  always_ff @(posedge clk_i) begin
    for (int unsigned i = 0; i < LANES; i++) addr_o[i] <= addr_d[i];
  end

endmodule
