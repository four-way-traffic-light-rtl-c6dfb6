// tb_congestion_sweep: congestion on each road in turn, at a divided clock.
//
// The junction is run for five light cycles with CLK_HZ = 4 (four clock
// cycles per second), all other parameters at their defaults. In cycle k
// (k = 1..4) road k-1 (West, North, East, South) has all four IR sensors
// occupied and the other roads have two; cycle 5 has every road empty. For
// each green the testbench measures how long the road's head stays green and
// checks that every other head, the pedestrian heads included, is red the
// whole time. Expected greens: congested road base + 10 s, others the base
// time (W 20, N 20, E 10, S 25), empty roads 5 s.
module tb_congestion_sweep;
  import tlc_pkg::*;

  localparam int unsigned T = 4;

  logic                                   clk = 1'b0;
  logic                                   rst_n;
  logic  [NUM_ROADS-1:0][IR_PER_ROAD-1:0] ir;
  logic  [NUM_ROADS-1:0]                  rf;
  lamp_t [NUM_CENTER-1:0]                 center;
  lamp_t [NUM_SIDE-1:0]                   side;
  state_t                                 state;
  secs_t                                  remain;
  logic  [NUM_ROADS-1:0]                  violation;
  logic  [NUM_ROADS-1:0][7:0]             viol_count;
  int checks = 0;
  int failures = 0;

  traffic_light_top #(.CLK_HZ(T), .TICK_HZ(1)) dut (
    .clk, .rst_n, .ir, .rf, .center, .side, .state, .remain, .violation, .viol_count
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int head_of [NUM_ROADS] = '{0, 2, 1, 3};   // W N E S -> C1 C3 C2 C4
  int base    [NUM_ROADS] = '{20, 20, 10, 25};

  // measure the next green of road r in cycles, checking all other heads red
  task automatic measure_green(input int r, output int cycles);
    int h;
    h = head_of[r];
    do @(negedge clk); while (center[h] != LAMP_G);
    cycles = 0;
    while (center[h] == LAMP_G) begin
      cycles++;
      for (int i = 0; i < NUM_CENTER; i++) begin
        if (i != h && center[i] != LAMP_R) begin
          failures++;
          $display("FAIL: head C%0d not red during road %0d green", i + 1, r);
        end
      end
      if (side != {NUM_SIDE{LAMP_R}}) begin
        failures++;
        $display("FAIL: pedestrian heads not red during road %0d green", r);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int c;
    int exp_s;
    rst_n = 1'b0;
    rf = '0;
    ir = {NUM_ROADS{4'b0011}};
    ir[0] = 4'b1111;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k <= NUM_ROADS; k++) begin
      for (int r = 0; r < NUM_ROADS; r++) begin
        measure_green(r, c);
        exp_s = (k == NUM_ROADS) ? 5 : (r == k) ? base[r] + 10 : base[r];
        checks++;
        if (c != exp_s * int'(T)) begin
          failures++;
          $display("FAIL: cycle %0d road %0d green %0d cycles, expected %0d", k, r, c,
                   exp_s * int'(T));
        end
        // set up the next cycle's occupancy once South's green has been taken
        if (r == NUM_ROADS - 1) begin
          ir = (k + 1 >= NUM_ROADS) ? '0 : {NUM_ROADS{4'b0011}};
          if (k + 1 < NUM_ROADS) ir[k + 1] = 4'b1111;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
