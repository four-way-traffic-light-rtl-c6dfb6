// tb_violation_detector: random stop-line traffic against random signal colours.
//
// The stop-line sensors and centre lamps are driven with random values for
// 2000 cycles. A reference model in the testbench flags a road whenever its
// sensor rises while the road's own centre signal (W = C1, N = C3, E = C2,
// S = C4) is red, and the pulses and counts of the block are compared with it
// cycle by cycle. A small counter width exercises saturation. Vehicles that
// stand on a sensor through reset must not count.
module tb_violation_detector;
  import tlc_pkg::*;

  localparam int unsigned CW = 4;

  logic                            clk = 1'b0;
  logic                            rst_n;
  logic  [NUM_ROADS-1:0]           stop_ir;
  lamp_t [NUM_CENTER-1:0]          center;
  logic  [NUM_ROADS-1:0]           violation;
  logic  [NUM_ROADS-1:0][CW-1:0]   count;
  int checks = 0;
  int failures = 0;

  violation_detector #(.CNT_W(CW)) dut (.clk, .rst_n, .stop_ir, .center, .violation, .count);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lamp_t rand_lamp();
    case ($urandom_range(2))
      0:       return LAMP_R;
      1:       return LAMP_Y;
      default: return LAMP_G;
    endcase
  endfunction

  initial begin
    logic [NUM_ROADS-1:0] prev;
    logic [NUM_ROADS-1:0] exp_v;
    int                   exp_c [NUM_ROADS];
    int                   sig   [NUM_ROADS] = '{0, 2, 1, 3};
    int                   seen = 0;
    rst_n = 1'b0;
    stop_ir = 4'b1010;  // vehicles already on two sensors during reset
    center = {NUM_CENTER{LAMP_R}};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev = stop_ir;
    foreach (exp_c[r]) exp_c[r] = 0;
    repeat (2000) begin
      stop_ir = NUM_ROADS'($urandom());
      for (int i = 0; i < NUM_CENTER; i++) center[i] = rand_lamp();
      for (int r = 0; r < NUM_ROADS; r++) begin
        exp_v[r] = stop_ir[r] && !prev[r] && center[sig[r]] == LAMP_R;
        if (exp_v[r] && exp_c[r] < 2**CW - 1) exp_c[r]++;
      end
      prev = stop_ir;
      @(negedge clk);
      checks++;
      if (violation !== exp_v) begin
        failures++;
        $display("FAIL: violation=%b expected %b", violation, exp_v);
      end
      for (int r = 0; r < NUM_ROADS; r++) begin
        checks++;
        if (int'(count[r]) != exp_c[r]) begin
          failures++;
          $display("FAIL: road %0d count=%0d expected %0d", r, count[r], exp_c[r]);
        end
      end
      seen += $countones(exp_v);
    end
    checks++;
    if (seen == 0) begin
      failures++;
      $display("FAIL: no violation was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
