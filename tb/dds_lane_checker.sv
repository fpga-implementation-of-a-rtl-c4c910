// dds_lane_checker - testbench helper: one parallel_dds instance with its
// own reference model.
//
// Instantiates parallel_dds with the given LANES and WAVE, feeds it the
// shared clock, reset and tuning word, and compares every output frame
// (two clocks after its tuning word) with a classic one-sample-per-clock
// DDS modelled in real arithmetic: sample m has phase sum of k over the
// samples before it, value round(511*sin(2*pi*phase/1024)) (or cos).
// The counts of checks and failures are outputs so that the calling
// testbench can add them up.
module dds_lane_checker #(
  parameter int unsigned    LANES = 4,
  parameter dds_pkg::wave_e WAVE  = dds_pkg::WAVE_SINE
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] k,
  output int         checks,
  output int         failures
);
  localparam int unsigned MOD = 1024;
  localparam real TWO_PI = 6.28318530717958647692;

  logic signed [9:0] sample [LANES];
  logic              wrap;

  parallel_dds #(.LANES(LANES), .WAVE(WAVE)) dut (
    .clk_i(clk), .rst_i(rst), .k_i(k), .sample_o(sample), .wrap_o(wrap)
  );

  function automatic int ref_sample(int unsigned phase);
    real a;
    a = TWO_PI * (phase % MOD) / MOD;
    if (WAVE == dds_pkg::WAVE_COSINE) return $rtoi($floor(511.0 * $cos(a) + 0.5));
    else                              return $rtoi($floor(511.0 * $sin(a) + 0.5));
  endfunction

  int unsigned ref_phase = 0;
  int exp_d1 [LANES];   // frame of the previous clock
  int exp_d2 [LANES];   // frame of two clocks ago: on the outputs now
  int age = 0;          // clocks since reset was released

  initial begin
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) begin
    if (rst) begin
      ref_phase = 0;
      age = 0;
    end else begin
      exp_d2 = exp_d1;
      for (int i = 0; i < LANES; i++) exp_d1[i] = ref_sample(ref_phase + i * k);
      ref_phase = (ref_phase + LANES * k) % MOD;
      age++;
    end
  end

  // Sample the outputs mid-cycle.
  always @(negedge clk) begin
    if (!rst && age >= 2) begin
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (int'(sample[i]) != exp_d2[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL lanes=%0d wave=%0d lane %0d got %0d want %0d", LANES, WAVE, i,
                     int'(sample[i]), exp_d2[i]);
        end
      end
    end
  end
endmodule
