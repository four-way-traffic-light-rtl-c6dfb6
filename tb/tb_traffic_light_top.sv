// tb_traffic_light_top: end-to-end run of the junction controller.
//
// The clock is divided by 4 instead of 50,000,000 (CLK_HZ = 4), so one
// second of controller time is four clock cycles; every other parameter keeps
// its default. The testbench watches only the twelve lamps and writes down
// each lamp pattern with how many cycles it lasted, then compares that list
// with the expected one. Road occupancy is set so that West gets the short
// green (no car), North the table time and East and South the extended time.
// The script then makes every mechanism of the design happen and counts it:
//   density_short / density_normal / density_extended  green time from IR sensors
//   full_cycle        all eleven states of the normal sequence
//   priority          two simultaneous emergencies, the lower-numbered road first
//   preempt_green     a road's green cleared for another road's emergency
//   emergency_hold    an emergency road's green held past its normal time
//   preempt_ped       the pedestrian phase cleared for an emergency
//   emergency_yellow  a request during a yellow jumps to the emergency road
//   violation         a car crossing the stop line on red
// A mechanism that never happened counts as a failure. Every cycle the lamps
// are checked for conflicting greens.
module tb_traffic_light_top;
  import tlc_pkg::*;

  localparam int unsigned T = 4;  // cycles per second

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

  traffic_light_top #(.CLK_HZ(T), .TICK_HZ(1)) dut (
    .clk, .rst_n, .ir, .rf, .center, .side, .state, .remain, .violation, .viol_count
  );

  always #5 clk = ~clk;

  localparam int W = 0, N = 1, E = 2, S = 3;

  typedef enum int {
    M_SHORT, M_NORMAL, M_EXTENDED, M_CYCLE, M_PRIORITY, M_PREEMPT_GREEN,
    M_HOLD, M_PREEMPT_PED, M_EMG_YELLOW, M_VIOLATION, M_NONE
  } mech_t;
  int    mech_cnt [M_NONE];
  string mech_name [M_NONE] = '{"density_short", "density_normal", "density_extended",
                                 "full_cycle", "priority", "preempt_green", "emergency_hold",
                                 "preempt_ped", "emergency_yellow", "violation"};

  function automatic byte letter(lamp_t l);
    case (l)
      LAMP_R:  return "R";
      LAMP_Y:  return "Y";
      LAMP_G:  return "G";
      default: return "?";
    endcase
  endfunction

  function automatic string pattern();
    string p = "";
    for (int i = 0; i < NUM_CENTER; i++) p = {p, string'(letter(center[i]))};
    for (int i = 0; i < NUM_SIDE; i++) p = {p, string'(letter(side[i]))};
    return p;
  endfunction

  // lamp pattern log, sampled on falling edges
  string rec_p [$];
  int    rec_c [$];
  string cur_p;
  int    cur_c = 0;
  int    viol_seen [NUM_ROADS];
  always @(negedge clk) begin
    if (!rst_n) begin
      cur_p = "RRRRRRRRRRRR";
      cur_c = 0;
    end else begin
      string p;
      int greens;
      p = pattern();
      if (p != cur_p) begin
        rec_p.push_back(cur_p);
        rec_c.push_back(cur_c);
        cur_p = p;
        cur_c = 1;
      end else begin
        cur_c++;
      end
      greens = 0;
      for (int i = 0; i < NUM_CENTER; i++) greens += int'(center[i] == LAMP_G);
      for (int i = 0; i < NUM_SIDE; i++) if (side[i] != side[0]) greens += 10;
      greens += int'(side[0] == LAMP_G);
      if (greens > 1) begin
        failures++;
        $display("FAIL: conflicting lamps %s", p);
      end
      for (int r = 0; r < NUM_ROADS; r++) viol_seen[r] += int'(violation[r]);
    end
  end

  int next_rec = 0;
  // the next recorded pattern must be p, lasting secs seconds (INIT may be
  // one cycle longer as the first tick follows reset)
  task automatic expect_rec(input string p, input int secs, input mech_t m = M_NONE);
    bit ok;
    wait (rec_p.size() > next_rec);
    checks++;
    ok = rec_p[next_rec] == p &&
         (rec_c[next_rec] == secs * T || (next_rec == 0 && rec_c[next_rec] == secs * T + 1));
    if (!ok) begin
      failures++;
      $display("FAIL: pattern %0d is %s for %0d cycles, expected %s for %0d",
               next_rec, rec_p[next_rec], rec_c[next_rec], p, secs * T);
    end else if (m != M_NONE) begin
      mech_cnt[m]++;
    end
    next_rec++;
  endtask

  // wait until pattern p has been showing for n cycles, then act just after the edge
  task automatic wait_in(input string p, input int n);
    do begin
      @(negedge clk);
      #1;
    end while (!(cur_p == p && cur_c == n));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string ALLR  = "RRRRRRRRRRRR";
  localparam string W1    = "YRRRRRRRRRRR";
  localparam string W2    = "GRRRRRRRRRRR";
  localparam string W3    = "YRYRRRRRRRRR";
  localparam string N1    = "RRGRRRRRRRRR";
  localparam string N2    = "RYYRRRRRRRRR";
  localparam string E1    = "RGRRRRRRRRRR";
  localparam string E2    = "RYRYRRRRRRRR";
  localparam string S1    = "RRRGRRRRRRRR";
  localparam string S2    = "RRRYYYYYYYYY";
  localparam string PED   = "RRRRGGGGGGGG";
  localparam string CLR_E = "RYRRRRRRRRRR";  // East's C2 yellow alone
  localparam string CLR_P = "RRRRYYYYYYYY";  // pedestrian yellow alone

  initial begin
    rst_n = 1'b0;
    rf = '0;
    ir[W] = 4'b0000;   // empty: short green, 5 s
    ir[N] = 4'b0011;   // light: table time, 20 s
    ir[E] = 4'b1111;   // congested: 10 + 10 s
    ir[S] = 4'b0111;   // congested: 25 + 10 s
    foreach (viol_seen[r]) viol_seen[r] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // a car runs West's red while North has green; a North car arrives on green
    fork
      begin
        wait_in(N1, 2 * T + 1);
        ir[W] = 4'b0011;
        wait_in(N1, 4 * T + 1);
        ir[N] = 4'b0010;
        wait_in(N1, 5 * T + 1);
        ir[N] = 4'b0011;
      end
    join_none

    // normal cycle
    expect_rec(ALLR, 5);
    expect_rec(W1, 5);
    expect_rec(W2, 5, M_SHORT);
    expect_rec(W3, 5);
    expect_rec(N1, 20, M_NORMAL);
    expect_rec(N2, 5);
    expect_rec(E1, 20, M_EXTENDED);
    expect_rec(E2, 5);
    expect_rec(S1, 35, M_EXTENDED);
    expect_rec(S2, 5);
    expect_rec(PED, 20, M_CYCLE);
    expect_rec(W1, 5);

    // East and South emergencies at once, 2 s into West's green
    wait_in(W2, 2 * T + 1);
    rf[E] = 1'b1;
    rf[S] = 1'b1;
    expect_rec(W2, 3, M_PREEMPT_GREEN);
    expect_rec(W1, 5);                   // West's C1 yellow while clearing
    // East served first and held for 22 s (its own green is 20 s)
    wait_in(E1, 22 * T + 1);
    rf[E] = 1'b0;
    wait_in(S1, 1);
    rf[S] = 1'b0;
    expect_rec(E1, 23, M_PRIORITY);
    if (rec_c[next_rec - 1] > 20 * T) mech_cnt[M_HOLD]++;
    expect_rec(CLR_E, 5, M_PREEMPT_GREEN);
    expect_rec(S1, 35);
    expect_rec(S2, 5);

    // North emergency 1 s into the pedestrian phase
    wait_in(PED, 1 * T + 1);
    rf[N] = 1'b1;
    wait_in(N1, 1);
    rf[N] = 1'b0;
    expect_rec(PED, 2);
    expect_rec(CLR_P, 5, M_PREEMPT_PED);
    expect_rec(N1, 20);
    expect_rec(N2, 5);
    expect_rec(E1, 20);

    // West emergency during East/South yellow: South is skipped
    wait_in(E2, 1 * T + 1);
    rf[W] = 1'b1;
    wait_in(W2, 1);
    rf[W] = 1'b0;
    expect_rec(E2, 5);
    expect_rec(W2, 20, M_EMG_YELLOW);
    expect_rec(W3, 5);

    // violations: one on West, none elsewhere
    checks++;
    if (viol_seen[W] != 1 || viol_seen[N] != 0 || viol_seen[E] != 0 || viol_seen[S] != 0) begin
      failures++;
      $display("FAIL: violation pulses W%0d N%0d E%0d S%0d, expected 1 0 0 0",
               viol_seen[W], viol_seen[N], viol_seen[E], viol_seen[S]);
    end else begin
      mech_cnt[M_VIOLATION]++;
    end
    checks++;
    if (viol_count[W] != 8'd1 || viol_count[N] != 8'd0) begin
      failures++;
      $display("FAIL: violation counts W%0d N%0d", viol_count[W], viol_count[N]);
    end

    for (int m = 0; m < M_NONE; m++) begin
      checks++;
      $display("mechanism %-17s happened %0d time(s)", mech_name[m], mech_cnt[m]);
      if (mech_cnt[m] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
