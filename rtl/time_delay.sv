// time_delay: pickup time delay element (DT1, DT2 of the protection scheme).
//
// The output goes to 1 once the input has been 1 without a break for
// DELAY_CYCLES clock cycles, and it falls in the same cycle the input falls.
// A drop of the input before the delay has run out restarts the timing, so
// a fault cleared by a faster downstream protection never trips this stage;
// this is what gives the stepwise protection its selectivity.
//
// How it works: a saturating counter counts clock edges while the input is
// high and is cleared while it is low. out = in AND (count == DELAY_CYCLES).
// With DELAY_CYCLES = 0 the element is a wire.
//
// Timing: if in rises before clock edge 1 and stays high, out is high from
// just after edge DELAY_CYCLES on. The source article gives the element's function
// (a delay on pickup) but not how it is timed; counting system-clock cycles
// is this design's choice.
module time_delay #(
  parameter int unsigned DELAY_CYCLES = 500_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic out
);

  localparam int unsigned CW = (DELAY_CYCLES < 1) ? 1 : $clog2(DELAY_CYCLES + 1);
  localparam logic [CW-1:0] LIMIT = CW'(DELAY_CYCLES);

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (!in)           count <= '0;
    else if (count != LIMIT) count <= count + 1'b1;
  end

  always_comb out = in && (count == LIMIT);

endmodule
