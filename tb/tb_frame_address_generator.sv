// tb_frame_address_generator - self-checking test of the frame address
// generator.
//
// Applies random (Ph, k) pairs, one per clock, plus the corner values 0
// and 2^PHASE_W-1, and checks one clock later that every lane address
// equals (LANES*Ph + i*k) mod 2^PHASE_W.  Runs the default 4-lane
// configuration and a 3-lane one (a gain that is not a power of two).
module tb_frame_address_generator;
  localparam int unsigned PHASE_W = 10;
  localparam int unsigned MOD = 2 ** PHASE_W;

  logic               clk = 1'b0;
  logic [PHASE_W-1:0] ph;
  logic [PHASE_W-1:0] k;
  logic [PHASE_W-1:0] addr4 [4];
  logic [PHASE_W-1:0] addr3 [3];

  int checks = 0;
  int failures = 0;

  frame_address_generator #(.LANES(4), .PHASE_W(PHASE_W)) dut4 (
    .clk_i(clk), .ph_i(ph), .k_i(k), .addr_o(addr4)
  );
  frame_address_generator #(.LANES(3), .PHASE_W(PHASE_W)) dut3 (
    .clk_i(clk), .ph_i(ph), .k_i(k), .addr_o(addr3)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p, kk;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      case (n)
        0: begin p = 0;       kk = 0;       end
        1: begin p = MOD - 1; kk = MOD - 1; end
        2: begin p = 256;     kk = 1;       end
        default: begin p = $urandom_range(MOD - 1); kk = $urandom_range(MOD - 1); end
      endcase
      ph = PHASE_W'(p);
      k  = PHASE_W'(kk);
      @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (addr4[i] != PHASE_W'((4 * p + i * kk) % MOD)) begin
          failures++;
          $display("FAIL lanes=4 i=%0d ph=%0d k=%0d got %0d", i, p, kk, addr4[i]);
        end
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (addr3[i] != PHASE_W'((3 * p + i * kk) % MOD)) begin
          failures++;
          $display("FAIL lanes=3 i=%0d ph=%0d k=%0d got %0d", i, p, kk, addr3[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
