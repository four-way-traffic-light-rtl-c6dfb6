// traffic_light_top: density- and emergency-aware four-way traffic light controller.
//
// The junction has four roads (West, North, East, South), each with four IR
// vehicle sensors along its approach and an RF receiver that spots emergency
// vehicles. Twelve signal heads are driven: C1..C4 for the vehicle flows and
// S1..S8 for the pedestrian crossings. The datapath:
//   ir, rf --sync2--> density_timer --green times--> tlc_fsm --state--> light_decoder --> lamps
//                 \--> emergency_arbiter --------------^                      |
//                  \-> violation_detector <-----------------------------------/
// tick_gen divides the board clock down to the one-second tick that times the
// states. Sensor inputs are asynchronous and pass a two-flop synchroniser,
// so the controller sees them two clock cycles late (hold rst_n low for at
// least three cycles so the synchroniser has settled when reset ends); lamps are combinational
// from registered state. The eleven-state sequence, its lamp table and its
// durations follow the source design; density levels, emergency preemption
// rules, violation counting and the synchroniser are this design's choices
// where the source describes only the intent.
module traffic_light_top
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,  // DE0 board oscillator
  parameter int unsigned TICK_HZ   = 1,           // durations are in seconds
  parameter int unsigned INIT_S    = 5,
  parameter int unsigned YELLOW_S  = 5,
  parameter int unsigned PED_S     = 20,
  parameter int unsigned GREEN_W   = 20,
  parameter int unsigned GREEN_N   = 20,
  parameter int unsigned GREEN_E   = 10,
  parameter int unsigned GREEN_S   = 25,
  parameter int unsigned GREEN_MIN = 5,
  parameter int unsigned GREEN_EXT = 10,
  parameter int unsigned VIOL_CNT_W = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,      // active-low synchronous reset, at least 3 cycles
  input  logic  [NUM_ROADS-1:0][IR_PER_ROAD-1:0] ir,         // IR occupancy, road W N E S; bit 0 at the stop line
  input  logic  [NUM_ROADS-1:0]                  rf,         // RF emergency detect, road W N E S
  output lamp_t [NUM_CENTER-1:0]                 center,     // C1..C4
  output lamp_t [NUM_SIDE-1:0]                   side,       // S1..S8
  output state_t                                 state,      // current controller state
  output secs_t                                  remain,     // seconds left in the state, minus one
  output logic  [NUM_ROADS-1:0]                  violation,  // red-light violation pulse per road
  output logic  [NUM_ROADS-1:0][VIOL_CNT_W-1:0]  viol_count  // violations per road, saturating
);
  localparam int unsigned NS = NUM_ROADS * IR_PER_ROAD + NUM_ROADS;

  logic                                  tick;
  logic [NUM_ROADS-1:0][IR_PER_ROAD-1:0] ir_s;
  logic [NUM_ROADS-1:0]                  rf_s;
  logic [NUM_ROADS-1:0]                  stop_ir;
  secs_t [NUM_ROADS-1:0]                 green;
  logic                                  emg_any;
  road_t                                 emg_road;
  clr_src_t                              clr_src;

  tick_gen #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) u_tick (
    .clk, .rst_n, .tick
  );

  sync2 #(.W(NS)) u_sync (
    .clk, .d({ir, rf}), .q({ir_s, rf_s})
  );

  density_timer #(
    .GREEN_W(GREEN_W), .GREEN_N(GREEN_N), .GREEN_E(GREEN_E), .GREEN_S(GREEN_S),
    .GREEN_MIN(GREEN_MIN), .GREEN_EXT(GREEN_EXT)
  ) u_density (
    .ir(ir_s), .green
  );

  emergency_arbiter u_emg (
    .req(rf_s), .any(emg_any), .road(emg_road)
  );

  tlc_fsm #(.INIT_S(INIT_S), .YELLOW_S(YELLOW_S), .PED_S(PED_S)) u_fsm (
    .clk, .rst_n, .tick, .green, .emg_req(rf_s), .emg_any, .emg_road,
    .state, .clr_src, .remain
  );

  light_decoder u_lights (
    .state, .clr_src, .center, .side
  );

  always_comb begin
    for (int r = 0; r < NUM_ROADS; r++) stop_ir[r] = ir_s[r][0];
  end

  violation_detector #(.CNT_W(VIOL_CNT_W)) u_viol (
    .clk, .rst_n, .stop_ir, .center, .violation, .count(viol_count)
  );

  // Safety rule of the junction: at most one centre signal is green, and never
  // a centre signal together with the pedestrian crossings.
  a_one_green: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({center[0] == LAMP_G, center[1] == LAMP_G, center[2] == LAMP_G,
                center[3] == LAMP_G, side[0] == LAMP_G}) <= 1);

endmodule
