// output_relay: output protection element KL, driving the disconnection
// command to the executive elements (circuit breaker).
//
// With LATCH = 1 (default) the trip output seals in: once the trip command
// has been seen, the output stays on until the reset command arrives while
// the trip command is off. Opening the breaker removes the fault current and
// with it the trip command, so a seal-in keeps the trip pulse long enough for
// the breaker to finish. With LATCH = 0 the output is the trip command
// registered by one clock.
//
// Interface: trip_cmd from the final OR element, reset_cmd from the
// operator, trip to the discrete output. Timing: trip rises one clock edge
// after trip_cmd. The source article only names KL as the output device; the
// register and the seal-in are this design's choice.
module output_relay #(
  parameter bit LATCH = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trip_cmd,
  input  logic reset_cmd,
  output logic trip
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        trip <= 1'b0;
    else if (trip_cmd) trip <= 1'b1;
    else if (!LATCH)   trip <= 1'b0;
    else if (reset_cmd) trip <= 1'b0;
  end

endmodule
