// phase_generator - phase accumulator of the DDS.
//
// Every clock the unsigned tuning word k is added to a PHASE_W-bit phase
// register (the adder and Z^-1 loop of a classic DDS); the sum wraps
// modulo 2^PHASE_W.  ph_o is the register, so a change of k_i shows in
// ph_o one clock later.  wrap_o is the carry out of the adder in the
// current cycle: it is high in the cycle whose update makes the phase
// wrap past 2^PHASE_W.
//
// Interface: clk_i, synchronous active-high rst_i (clears the phase to
// zero), k_i, ph_o, wrap_o.  The structure follows the reference
// architecture; the reset and the wrap flag are this design's additions.
module phase_generator #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W_DEF
) (
  input  logic               clk_i,
  input  logic               rst_i,
  input  logic [PHASE_W-1:0] k_i,
  output logic [PHASE_W-1:0] ph_o,
  output logic               wrap_o
);

  logic [PHASE_W-1:0] ph_q;
  logic [PHASE_W:0]   sum;

  assign sum = {1'b0, ph_q} + {1'b0, k_i};

  always_ff @(posedge clk_i) begin
    if (rst_i) ph_q <= '0;
    else       ph_q <= sum[PHASE_W-1:0];
  end

  assign ph_o   = ph_q;
  assign wrap_o = sum[PHASE_W] & ~rst_i;

endmodule
