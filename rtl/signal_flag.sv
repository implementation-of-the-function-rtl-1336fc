// signal_flag: signalling element (KH1, KH2, KH3 of the protection scheme).
//
// Shows which stage of the protection has operated. The flag is set by a 1
// on its input and stays set after the input falls, so the operator can see
// which stage acted even after the breaker has cleared the fault; it is
// cleared by the reset command (set wins when both are high).
//
// Interface: set from the stage output, clear from the operator reset,
// flag to the signal output. Registered: flag follows set one clock edge
// later. The source article only names the element; making it a latched
// indicator, as relay targets usually are, is this design's choice.
module signal_flag (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic clear,
  output logic flag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     flag <= 1'b0;
    else if (set)   flag <= 1'b1;
    else if (clear) flag <= 1'b0;
  end

endmodule
