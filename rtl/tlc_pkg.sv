// tlc_pkg: types and constants shared by the four-way traffic light controller.
//
// Roads are numbered in the order the controller serves them: West, North,
// East, South. Each road is governed by one centre signal; the centre signals
// carry the names C1..C4 with West = C1, North = C3, East = C2, South = C4,
// which is how the state table of the original design assigns them. Eight
// side signals S1..S8 control the pedestrian crossings and always show the
// same colour. A lamp is one-hot red/yellow/green so each bit can drive one
// bulb directly. The state list is the original eleven-state sequence; the
// extra EMG_CLR state (yellow clearance before an emergency green) is this
// design's own addition.
package tlc_pkg;

  localparam int unsigned NUM_ROADS   = 4;  // four-way junction
  localparam int unsigned NUM_CENTER  = 4;  // C1..C4
  localparam int unsigned NUM_SIDE    = 8;  // S1..S8
  localparam int unsigned IR_PER_ROAD = 4;  // four IR sensors on every road

  // Width of every duration and down-counter, in one-second ticks.
  localparam int unsigned TW = 8;
  typedef logic [TW-1:0] secs_t;

  typedef enum logic [1:0] {
    ROAD_W = 2'd0,
    ROAD_N = 2'd1,
    ROAD_E = 2'd2,
    ROAD_S = 2'd3
  } road_t;

  // One-hot lamp: bit 2 red, bit 1 yellow, bit 0 green.
  typedef enum logic [2:0] {
    LAMP_R = 3'b100,
    LAMP_Y = 3'b010,
    LAMP_G = 3'b001
  } lamp_t;

  typedef enum logic [3:0] {
    ST_INIT   = 4'd0,   // all red
    ST_WEST1  = 4'd1,   // C1 yellow (get ready)
    ST_WEST2  = 4'd2,   // C1 green
    ST_WEST3  = 4'd3,   // C1, C3 yellow
    ST_NORTH1 = 4'd4,   // C3 green
    ST_NORTH2 = 4'd5,   // C2, C3 yellow
    ST_EAST1  = 4'd6,   // C2 green
    ST_EAST2  = 4'd7,   // C2, C4 yellow
    ST_SOUTH1 = 4'd8,   // C4 green
    ST_SOUTH2 = 4'd9,   // C4 and S1..S8 yellow
    ST_PED    = 4'd10,  // S1..S8 green
    ST_EMG_CLR = 4'd11  // yellow on whatever was green, before an emergency green
  } state_t;

  // What was showing green when an emergency clearance began.
  typedef enum logic [2:0] {
    SRC_W   = 3'd0,
    SRC_N   = 3'd1,
    SRC_E   = 3'd2,
    SRC_S   = 3'd3,
    SRC_PED = 3'd4
  } clr_src_t;

  // Index (0-based, C1 = 0) of the centre signal that governs a road.
  function automatic logic [1:0] center_of(road_t r);
    case (r)
      ROAD_W:  return 2'd0;  // C1
      ROAD_N:  return 2'd2;  // C3
      ROAD_E:  return 2'd1;  // C2
      default: return 2'd3;  // C4
    endcase
  endfunction

  // Green state that serves a road.
  function automatic state_t green_state_of(road_t r);
    case (r)
      ROAD_W:  return ST_WEST2;
      ROAD_N:  return ST_NORTH1;
      ROAD_E:  return ST_EAST1;
      default: return ST_SOUTH1;
    endcase
  endfunction

endpackage
