// tb_phase_generator - self-checking test of the phase accumulator.
//
// Drives a sequence of tuning words (constant stretches, random changes,
// zero and the largest word) and compares ph_o and wrap_o every clock
// with an integer model: ph(n+1) = (ph(n) + k(n)) mod 2^PHASE_W, wrap
// when ph(n) + k(n) >= 2^PHASE_W.  Also checks that reset clears the
// phase within one clock.
module tb_phase_generator;
  localparam int unsigned PHASE_W = 10;
  localparam int unsigned MOD = 2 ** PHASE_W;

  logic               clk = 1'b0;
  logic               rst;
  logic [PHASE_W-1:0] k;
  logic [PHASE_W-1:0] ph;
  logic               wrap;

  int checks = 0;
  int failures = 0;
  int wraps = 0;

  phase_generator #(.PHASE_W(PHASE_W)) dut (
    .clk_i(clk), .rst_i(rst), .k_i(k), .ph_o(ph), .wrap_o(wrap)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned model;

  initial begin
    rst = 1'b1;
    k   = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(ph == 0, "reset clears phase");
    rst   = 1'b0;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      if (n < 100)       k = PHASE_W'(37);
      else if (n < 110)  k = '0;
      else if (n < 200)  k = PHASE_W'(MOD - 1);
      else if (n % 7 == 0) k = PHASE_W'($urandom_range(MOD - 1));
      #1;
      check(wrap == ((model + k) >= MOD), "wrap flag");
      if (wrap) wraps++;
      @(posedge clk);
      model = (model + k) % MOD;
      @(negedge clk);
      check(ph == PHASE_W'(model), "phase value");
    end
    // Reset in the middle of a run.
    rst = 1'b1;
    #1 check(wrap == 1'b0, "no wrap flag in reset");
    @(posedge clk);
    @(negedge clk);
    check(ph == 0, "mid-run reset clears phase");
    check(wraps > 100, "wraps observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
