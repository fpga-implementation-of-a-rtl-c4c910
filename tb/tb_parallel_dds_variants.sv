// tb_parallel_dds_variants - the parallel DDS at other levels of
// parallelism and with the cosine table.
//
// Runs four instances side by side on the same tuning-word sequence:
// 2 lanes (a two-channel time-interleaved converter), 3 lanes (a
// multiplier gain that is not a power of two), 8 lanes, and the default
// 4 lanes with a cosine table.  Each instance is compared frame by frame
// with its own classic-DDS reference (see dds_lane_checker).  The tuning
// word changes every few clocks, including 0 and the largest values, and
// one reset is applied in mid-run.
module tb_parallel_dds_variants;
  logic       clk = 1'b0;
  logic       rst;
  logic [9:0] k;

  int c [4];
  int f [4];
  int checks;
  int failures;
  int resets = 0;
  int kchanges = 0;

  dds_lane_checker #(.LANES(2)) u2 (.clk(clk), .rst(rst), .k(k), .checks(c[0]), .failures(f[0]));
  dds_lane_checker #(.LANES(3)) u3 (.clk(clk), .rst(rst), .k(k), .checks(c[1]), .failures(f[1]));
  dds_lane_checker #(.LANES(8)) u8 (.clk(clk), .rst(rst), .k(k), .checks(c[2]), .failures(f[2]));
  dds_lane_checker #(.LANES(4), .WAVE(dds_pkg::WAVE_COSINE)) u4c (
    .clk(clk), .rst(rst), .k(k), .checks(c[3]), .failures(f[3]));

  always #5 clk = ~clk;

  function automatic void report(int extra);
    checks = c[0] + c[1] + c[2] + c[3] + 1;
    failures = f[0] + f[1] + f[2] + f[3] + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    rst = 1'b1;
    k = '0;
    repeat (3) @(posedge clk);
    resets++;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n == 2000) begin
        rst = 1'b1;
        resets++;
      end else begin
        rst = 1'b0;
      end
      if (n % 9 == 0) begin
        case ((n / 9) % 6)
          0: k = 10'd0;
          1: k = 10'd1023;
          2: k = 10'd512;
          default: k = 10'($urandom_range(1023));
        endcase
        kchanges++;
      end
    end
    @(negedge clk);
    $display("k_changes=%0d resets=%0d checks per instance: %0d %0d %0d %0d",
             kchanges, resets, c[0], c[1], c[2], c[3]);
    report((resets > 1 && kchanges > 0 && c[2] > 0) ? 0 : 1);
    $finish;
  end
endmodule
