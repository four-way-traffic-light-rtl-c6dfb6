// tlc_fsm: light sequencer of the four-way traffic light controller.
//
// A Moore machine steps through the eleven states of the junction's cycle:
//   INIT (all red) -> WEST1 (C1 yellow) -> WEST2 (C1 green)
//   -> WEST3 (C1, C3 yellow) -> NORTH1 (C3 green) -> NORTH2 (C2, C3 yellow)
//   -> EAST1 (C2 green) -> EAST2 (C2, C4 yellow) -> SOUTH1 (C4 green)
//   -> SOUTH2 (C4 and pedestrian yellow) -> PED (pedestrian green) -> WEST1 ...
// Each state lasts a whole number of one-second ticks: INIT_S for INIT,
// YELLOW_S for every yellow state, PED_S for the pedestrian phase, and for a
// road's green the duration `green[road]` offered by the density timer on
// the cycle the state is entered. A down-counter is loaded with duration-1 on
// entry and the state changes on the tick that finds it at zero, so a state
// entered on a tick lasts exactly its duration in ticks. All state changes
// happen on a tick.
//
// Emergency handling (the source design asks that an emergency vehicle be
// served; how is this design's own choice):
//  * in a road's green, while that road's own RF request is up, the counter
//    is frozen so the green is held as long as the vehicle is there;
//  * in a road's green or in PED, a request from any other road (and none from
//    the served road) moves to EMG_CLR on the next tick: whatever was green
//    turns yellow for YELLOW_S seconds, then the requesting road gets green;
//  * at the end of INIT, EMG_CLR or any yellow state, a pending request sends
//    the machine straight to the requesting road's green instead of the
//    next state of the cycle (everything that was yellow turns red).
// After an emergency green the normal cycle continues from that road.
// The state table's durations (5 s yellow, 20 s pedestrians, 5 s all-red
// start) are the defaults.
module tlc_fsm
  import tlc_pkg::*;
#(
  parameter int unsigned INIT_S   = 5,
  parameter int unsigned YELLOW_S = 5,
  parameter int unsigned PED_S    = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,     // active-low synchronous reset
  input  logic                  tick,      // one-second pulse
  input  secs_t [NUM_ROADS-1:0] green,     // green time of each road, W N E S
  input  logic  [NUM_ROADS-1:0] emg_req,   // RF emergency request per road
  input  logic                  emg_any,   // from the emergency arbiter
  input  road_t                 emg_road,  // winning road from the arbiter
  output state_t                state,
  output clr_src_t              clr_src,   // what EMG_CLR is clearing
  output secs_t                 remain     // seconds left in the state, minus one
);

  function automatic secs_t dur_m1(state_t s, secs_t [NUM_ROADS-1:0] g);
    secs_t d;
    case (s)
      ST_INIT:   d = secs_t'(INIT_S);
      ST_PED:    d = secs_t'(PED_S);
      ST_WEST2:  d = g[ROAD_W];
      ST_NORTH1: d = g[ROAD_N];
      ST_EAST1:  d = g[ROAD_E];
      ST_SOUTH1: d = g[ROAD_S];
      default:   d = secs_t'(YELLOW_S);
    endcase
    return (d == '0) ? '0 : d - 1'b1;
  endfunction

  function automatic state_t cycle_next(state_t s);
    case (s)
      ST_INIT:   return ST_WEST1;
      ST_WEST1:  return ST_WEST2;
      ST_WEST2:  return ST_WEST3;
      ST_WEST3:  return ST_NORTH1;
      ST_NORTH1: return ST_NORTH2;
      ST_NORTH2: return ST_EAST1;
      ST_EAST1:  return ST_EAST2;
      ST_EAST2:  return ST_SOUTH1;
      ST_SOUTH1: return ST_SOUTH2;
      ST_SOUTH2: return ST_PED;
      default:   return ST_WEST1;   // PED
    endcase
  endfunction

  state_t   state_n;
  clr_src_t clr_src_n;
  secs_t    remain_n;
  road_t    clr_road;   // road whose green EMG_CLR leads to
  road_t    clr_road_n;

  // Road served by the current state, if it is a road's green.
  logic  in_green;
  road_t served;
  always_comb begin
    in_green = 1'b1;
    served   = ROAD_W;
    case (state)
      ST_WEST2:  served = ROAD_W;
      ST_NORTH1: served = ROAD_N;
      ST_EAST1:  served = ROAD_E;
      ST_SOUTH1: served = ROAD_S;
      default:   in_green = 1'b0;
    endcase
  end

  always_comb begin
    state_n    = state;
    clr_src_n  = clr_src;
    remain_n   = remain;
    clr_road_n = clr_road;
    if (tick) begin
      if (in_green && emg_any && !emg_req[served]) begin
        // another road has an emergency vehicle: clear this green
        state_n    = ST_EMG_CLR;
        clr_src_n  = clr_src_t'({1'b0, served});
        clr_road_n = emg_road;
        remain_n   = dur_m1(ST_EMG_CLR, green);
      end else if (state == ST_PED && emg_any) begin
        state_n    = ST_EMG_CLR;
        clr_src_n  = SRC_PED;
        clr_road_n = emg_road;
        remain_n   = dur_m1(ST_EMG_CLR, green);
      end else if (in_green && emg_req[served]) begin
        // emergency vehicle on the served road: hold the green
        remain_n = remain;
      end else if (remain != '0) begin
        remain_n = remain - 1'b1;
      end else begin
        if (in_green || state == ST_PED || (!emg_any && state != ST_EMG_CLR))
          state_n = cycle_next(state);
        else if (emg_any)
          state_n = green_state_of(emg_road);
        else
          state_n = green_state_of(clr_road);  // EMG_CLR, request already gone
        remain_n = dur_m1(state_n, green);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_INIT;
      clr_src  <= SRC_W;
      clr_road <= ROAD_W;
      remain   <= dur_m1(ST_INIT, '0);
    end else begin
      state    <= state_n;
      clr_src  <= clr_src_n;
      clr_road <= clr_road_n;
      remain   <= remain_n;
    end
  end

  // The state register only ever holds one of the twelve defined states.
  a_state_legal: assert property (@(posedge clk) disable iff (!rst_n)
    state inside {[ST_INIT:ST_EMG_CLR]});
  // The state changes only on a tick.
  a_change_on_tick: assert property (@(posedge clk) disable iff (!rst_n)
    !tick |=> $stable(state));

endmodule
