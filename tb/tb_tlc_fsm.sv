// tb_tlc_fsm: state sequence and durations of the light sequencer.
//
// The testbench supplies a tick every third clock cycle and records, for each
// state the sequencer leaves, how many ticks it stayed. The recorded list is
// compared with the expected one for:
//   1. the normal cycle INIT, WEST1 .. PED, WEST1 with the state-table times;
//   2. an emergency on North during West's green: WEST2 is cut short on the
//      next tick, EMG_CLR lasts 5 ticks, NORTH1 is held while the request
//      stays up and then runs its full time;
//   3. an emergency on South during the NORTH2 yellow: East is skipped;
//   4. an emergency on West during the pedestrian phase (clr_src = PED);
//   5. an emergency that disappears during EMG_CLR: the cleared-for road
//      still gets its green, with a changed green time sampled on entry.
module tb_tlc_fsm;
  import tlc_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  tick;
  secs_t [NUM_ROADS-1:0] green;
  logic  [NUM_ROADS-1:0] emg_req;
  logic                  emg_any;
  road_t                 emg_road;
  state_t                state;
  clr_src_t              clr_src;
  secs_t                 remain;
  int checks = 0;
  int failures = 0;

  tlc_fsm dut (.clk, .rst_n, .tick, .green, .emg_req, .emg_any, .emg_road,
               .state, .clr_src, .remain);

  always #5 clk = ~clk;

  // tick on every third cycle, driven away from the sampling edge
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    tick <= (cyc % 3 == 0);
  end

  // the testbench's own arbiter: lowest road index wins
  always_comb begin
    emg_any  = |emg_req;
    emg_road = emg_req[0] ? ROAD_W : emg_req[1] ? ROAD_N : emg_req[2] ? ROAD_E : ROAD_S;
  end

  // record (state, ticks spent in it) each time the state changes
  state_t rec_s [$];
  int     rec_d [$];
  state_t last_s;
  int     in_ticks;
  clr_src_t clr_seen;
  always @(posedge clk) begin
    if (!rst_n) begin
      last_s   <= ST_INIT;
      in_ticks <= 0;
    end else begin
      if (state != last_s) begin
        rec_s.push_back(last_s);
        rec_d.push_back(in_ticks);
        if (state == ST_EMG_CLR) clr_seen <= clr_src;
      end
      last_s   <= state;
      in_ticks <= (state != last_s) ? int'(tick) : in_ticks + int'(tick);
    end
  end

  int next_rec = 0;
  task automatic expect_rec(input state_t s, input int d);
    wait (rec_s.size() > next_rec);
    checks++;
    if (rec_s[next_rec] != s || rec_d[next_rec] != d) begin
      failures++;
      $display("FAIL: record %0d is %s for %0d ticks, expected %s for %0d",
               next_rec, rec_s[next_rec].name(), rec_d[next_rec], s.name(), d);
    end
    next_rec++;
  endtask

  // wait until the sequencer has spent n ticks in state s
  task automatic wait_in(input state_t s, input int n);
    do @(negedge clk); while (!(last_s == s && state == s && in_ticks == n));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n   = 1'b0;
    emg_req = '0;
    green   = {secs_t'(25), secs_t'(10), secs_t'(20), secs_t'(20)};  // S E N W
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. normal cycle
    expect_rec(ST_INIT, 5);
    expect_rec(ST_WEST1, 5);
    expect_rec(ST_WEST2, 20);
    expect_rec(ST_WEST3, 5);
    expect_rec(ST_NORTH1, 20);
    expect_rec(ST_NORTH2, 5);
    expect_rec(ST_EAST1, 10);
    expect_rec(ST_EAST2, 5);
    expect_rec(ST_SOUTH1, 25);
    expect_rec(ST_SOUTH2, 5);
    expect_rec(ST_PED, 20);
    expect_rec(ST_WEST1, 5);

    // 2. North emergency during West green, held 7 ticks into North green
    wait_in(ST_WEST2, 3);
    emg_req[ROAD_N] = 1'b1;
    expect_rec(ST_WEST2, 4);
    expect_rec(ST_EMG_CLR, 5);
    checks++;
    if (clr_seen != SRC_W) begin
      failures++;
      $display("FAIL: clearance source %0d, expected West", clr_seen);
    end
    wait_in(ST_NORTH1, 7);
    emg_req[ROAD_N] = 1'b0;
    expect_rec(ST_NORTH1, 27);
    expect_rec(ST_NORTH2, 5);
    expect_rec(ST_EAST1, 10);
    expect_rec(ST_EAST2, 5);
    expect_rec(ST_SOUTH1, 25);
    expect_rec(ST_SOUTH2, 5);
    expect_rec(ST_PED, 20);
    expect_rec(ST_WEST1, 5);
    expect_rec(ST_WEST2, 20);
    expect_rec(ST_WEST3, 5);
    expect_rec(ST_NORTH1, 20);

    // 3. South emergency during the North/East yellow: East is skipped
    wait_in(ST_NORTH2, 1);
    emg_req[ROAD_S] = 1'b1;
    wait_in(ST_SOUTH1, 0);
    emg_req[ROAD_S] = 1'b0;
    expect_rec(ST_NORTH2, 5);
    expect_rec(ST_SOUTH1, 25);
    expect_rec(ST_SOUTH2, 5);

    // 4. West emergency during the pedestrian phase
    wait_in(ST_PED, 2);
    emg_req[ROAD_W] = 1'b1;
    wait_in(ST_WEST2, 0);
    emg_req[ROAD_W] = 1'b0;
    expect_rec(ST_PED, 3);
    expect_rec(ST_EMG_CLR, 5);
    checks++;
    if (clr_seen != SRC_PED) begin
      failures++;
      $display("FAIL: clearance source %0d, expected pedestrians", clr_seen);
    end
    expect_rec(ST_WEST2, 20);
    expect_rec(ST_WEST3, 5);

    // 5. East emergency during North green that is gone before the clearance ends
    wait_in(ST_NORTH1, 4);
    emg_req[ROAD_E] = 1'b1;
    green[ROAD_E] = secs_t'(7);
    wait_in(ST_EMG_CLR, 1);
    emg_req[ROAD_E] = 1'b0;
    expect_rec(ST_NORTH1, 5);
    expect_rec(ST_EMG_CLR, 5);
    checks++;
    if (clr_seen != SRC_N) begin
      failures++;
      $display("FAIL: clearance source %0d, expected North", clr_seen);
    end
    expect_rec(ST_EAST1, 7);
    expect_rec(ST_EAST2, 5);
    expect_rec(ST_SOUTH1, 25);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
