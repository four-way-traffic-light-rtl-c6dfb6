// tb_light_decoder: checks every state against the junction's lamp table.
//
// The expected pattern of each state is written out as a string of twelve
// letters, C1 C2 C3 C4 followed by S1..S8, and compared with the decoder's
// one-hot lamps for all states, including the emergency clearance state
// with each possible source of the green being cleared.
module tb_light_decoder;
  import tlc_pkg::*;

  state_t                 state;
  clr_src_t               clr_src;
  lamp_t [NUM_CENTER-1:0] center;
  lamp_t [NUM_SIDE-1:0]   side;
  int checks = 0;
  int failures = 0;

  light_decoder dut (.state, .clr_src, .center, .side);

  function automatic byte letter(lamp_t l);
    case (l)
      LAMP_R:  return "R";
      LAMP_Y:  return "Y";
      LAMP_G:  return "G";
      default: return "?";
    endcase
  endfunction

  task automatic expect_lamps(input state_t s, input clr_src_t c, input string exp);
    string got;
    state = s;
    clr_src = c;
    #1;
    got = "";
    for (int i = 0; i < NUM_CENTER; i++) got = {got, string'(letter(center[i]))};
    for (int i = 0; i < NUM_SIDE; i++) got = {got, string'(letter(side[i]))};
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s/%0d lamps %s expected %s", s.name(), c, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //                              C1234 S12345678
    expect_lamps(ST_INIT,   SRC_W, "RRRRRRRRRRRR");
    expect_lamps(ST_WEST1,  SRC_W, "YRRRRRRRRRRR");
    expect_lamps(ST_WEST2,  SRC_W, "GRRRRRRRRRRR");
    expect_lamps(ST_WEST3,  SRC_W, "YRYRRRRRRRRR");
    expect_lamps(ST_NORTH1, SRC_W, "RRGRRRRRRRRR");
    expect_lamps(ST_NORTH2, SRC_W, "RYYRRRRRRRRR");
    expect_lamps(ST_EAST1,  SRC_W, "RGRRRRRRRRRR");
    expect_lamps(ST_EAST2,  SRC_W, "RYRYRRRRRRRR");
    expect_lamps(ST_SOUTH1, SRC_W, "RRRGRRRRRRRR");
    expect_lamps(ST_SOUTH2, SRC_W, "RRRYYYYYYYYY");
    expect_lamps(ST_PED,    SRC_W, "RRRRGGGGGGGG");
    // clearance: the signal of the road that was green turns yellow
    expect_lamps(ST_EMG_CLR, SRC_W,   "YRRRRRRRRRRR");
    expect_lamps(ST_EMG_CLR, SRC_N,   "RRYRRRRRRRRR");
    expect_lamps(ST_EMG_CLR, SRC_E,   "RYRRRRRRRRRR");
    expect_lamps(ST_EMG_CLR, SRC_S,   "RRRYRRRRRRRR");
    expect_lamps(ST_EMG_CLR, SRC_PED, "RRRRYYYYYYYY");
    // the road-state patterns do not depend on clr_src
    expect_lamps(ST_NORTH1, SRC_PED, "RRGRRRRRRRRR");
    expect_lamps(ST_PED,    SRC_S,   "RRRRGGGGGGGG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
