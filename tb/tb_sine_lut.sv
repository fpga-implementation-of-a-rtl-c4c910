// tb_sine_lut - self-checking test of the wave table.
//
// Reads every address of a sine table and a cosine table (default size,
// 2^10 x 10 bit) and compares each word, one clock after the address,
// with round(511 * sin(2*pi*n/1024)) (cos for the second table),
// computed here with the simulator's own real arithmetic.  Also checks a
// few known values (0, +511, -511 at the quarter points).
module tb_sine_lut;
  localparam int unsigned PHASE_W = 10;
  localparam int unsigned AMP_W = 10;
  localparam int unsigned DEPTH = 2 ** PHASE_W;
  localparam real TWO_PI = 6.28318530717958647692;

  logic                    clk = 1'b0;
  logic [PHASE_W-1:0]      addr;
  logic signed [AMP_W-1:0] s_data, c_data;

  int checks = 0;
  int failures = 0;

  sine_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W), .WAVE(dds_pkg::WAVE_SINE)) u_sin (
    .clk_i(clk), .addr_i(addr), .data_o(s_data)
  );
  sine_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W), .WAVE(dds_pkg::WAVE_COSINE)) u_cos (
    .clk_i(clk), .addr_i(addr), .data_o(c_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what, int n, int got, int want);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s addr=%0d got %0d want %0d", what, n, got, want);
    end
  endtask

  initial begin
    int want_s, want_c;
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      addr = PHASE_W'(n);
      @(posedge clk);
      #1;
      want_s = $rtoi($floor(511.0 * $sin(TWO_PI * n / DEPTH) + 0.5));
      want_c = $rtoi($floor(511.0 * $cos(TWO_PI * n / DEPTH) + 0.5));
      check(int'(s_data) == want_s, "sine", n, int'(s_data), want_s);
      check(int'(c_data) == want_c, "cosine", n, int'(c_data), want_c);
      if (n == 0)   check(s_data == 0 && c_data == 511, "quarter points", n, int'(s_data), 0);
      if (n == 256) check(s_data == 511 && c_data == 0, "quarter points", n, int'(s_data), 511);
      if (n == 768) check(s_data == -511, "quarter points", n, int'(s_data), -511);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
