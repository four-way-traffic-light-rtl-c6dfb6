// sync2: two-flop synchroniser for a bundle of asynchronous sensor lines.
//
// The IR and RF sensor outputs change with no relation to the board clock, so
// each bit passes two flip-flops before the controller uses it. Output lags
// the input by two clock cycles. The flops have no reset: they keep sampling
// while the rest of the design is held in reset, so after a reset of at least
// two cycles the output already equals the sensor lines and a vehicle that
// was standing on a sensor is not mistaken for a new arrival. This is a
// standard design practice, not something the source design describes.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
