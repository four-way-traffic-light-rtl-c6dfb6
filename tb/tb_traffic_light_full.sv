// tb_traffic_light_full: the controller at its real 50 MHz time base.
//
// Every parameter keeps its default, so one second is 50,000,000 clock
// cycles. The run covers the start-up of the junction: from reset all
// signals show red for 5 s, then C1 (West) shows yellow for 5 s, then C1
// turns green with every other signal red. The testbench measures the time
// between lamp changes in clock cycles and compares it with those times. At
// about 500 million cycles (some six minutes of simulation) this is as much
// of the 120 s light cycle as is practical to simulate; the full cycle is covered at a
// divided clock by tb_traffic_light_top.
module tb_traffic_light_full;
  import tlc_pkg::*;

  localparam longint unsigned SEC = 50_000_000;

  logic                                  clk = 1'b0;
  logic                                  rst_n;
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

  traffic_light_top dut (
    .clk, .rst_n, .ir, .rf, .center, .side, .state, .remain, .violation, .viol_count
  );

  always #1 clk = ~clk;

  initial begin
    // 10 s of controller time plus margin, in half-periods
    #(2 * 11 * SEC);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for the C1 lamp to change and return how many clock cycles that
  // took (the clock period is 2 time units; waiting on the lamp rather than
  // on every clock edge keeps the long run fast)
  longint unsigned t_last;
  task automatic time_c1(output longint unsigned cycles, output lamp_t now);
    lamp_t was;
    was = center[0];
    wait (center[0] != was);
    cycles = ($time - t_last) / 2;
    t_last = $time;
    now = center[0];
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint unsigned c;
    lamp_t l;
    rst_n = 1'b0;
    rf = '0;
    ir = {4'b0011, 4'b0011, 4'b0011, 4'b0011};
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    t_last = $time;
    check(center == {NUM_CENTER{LAMP_R}} && side == {NUM_SIDE{LAMP_R}}, "all red after reset");
    time_c1(c, l);
    check(l == LAMP_Y && (c == 5 * SEC || c == 5 * SEC + 1),
          $sformatf("all red for %0d cycles, then C1 %s", c, l.name()));
    time_c1(c, l);
    check(l == LAMP_G && c == 5 * SEC, $sformatf("C1 yellow for %0d cycles, then %s", c, l.name()));
    check(center[1] == LAMP_R && center[2] == LAMP_R && center[3] == LAMP_R &&
          side == {NUM_SIDE{LAMP_R}}, "only C1 green");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
