// light_decoder: lamp pattern of every signal head for each controller state.
//
// The junction has twelve signal heads: four centre signals C1..C4 that
// control the vehicle flows (West = C1, East = C2, North = C3, South = C4) and
// eight side signals S1..S8 at the pedestrian crossings, which always show the
// same colour. This combinational block is the state table of the design:
//   state    C1 C2 C3 C4  S1..S8        state    C1 C2 C3 C4  S1..S8
//   INIT     R  R  R  R   R             EAST1    R  G  R  R   R
//   WEST1    Y  R  R  R   R             EAST2    R  Y  R  Y   R
//   WEST2    G  R  R  R   R             SOUTH1   R  R  R  G   R
//   WEST3    Y  R  Y  R   R             SOUTH2   R  R  R  Y   Y
//   NORTH1   R  R  G  R   R             PED      R  R  R  R   G
//   NORTH2   R  Y  Y  R   R
// In the emergency clearance state EMG_CLR (this design's addition) the
// signal that was green, named by clr_src, shows yellow and all others red.
// Each lamp is one-hot red/yellow/green (tlc_pkg::lamp_t).
module light_decoder
  import tlc_pkg::*;
(
  input  state_t                   state,
  input  clr_src_t                 clr_src,
  output lamp_t [NUM_CENTER-1:0]   center,   // index 0 = C1
  output lamp_t [NUM_SIDE-1:0]     side      // index 0 = S1
);
  lamp_t ped;

  always_comb begin
    center = {NUM_CENTER{LAMP_R}};
    ped    = LAMP_R;
    case (state)
      ST_WEST1:  center[0] = LAMP_Y;
      ST_WEST2:  center[0] = LAMP_G;
      ST_WEST3:  begin center[0] = LAMP_Y; center[2] = LAMP_Y; end
      ST_NORTH1: center[2] = LAMP_G;
      ST_NORTH2: begin center[1] = LAMP_Y; center[2] = LAMP_Y; end
      ST_EAST1:  center[1] = LAMP_G;
      ST_EAST2:  begin center[1] = LAMP_Y; center[3] = LAMP_Y; end
      ST_SOUTH1: center[3] = LAMP_G;
      ST_SOUTH2: begin center[3] = LAMP_Y; ped = LAMP_Y; end
      ST_PED:    ped = LAMP_G;
      ST_EMG_CLR: begin
        if (clr_src == SRC_PED) ped = LAMP_Y;
        else center[center_of(road_t'(clr_src[1:0]))] = LAMP_Y;
      end
      default: ;  // INIT: all red
    endcase
    side = {NUM_SIDE{ped}};
  end

endmodule
