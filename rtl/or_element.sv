// or_element: logical OR element (DW1 .. DW4 of the protection scheme).
//
// The output is 1 when at least one input is 1, exactly as the source article
// defines its OR elements. DW1..DW3 collect the three phase relays of one
// stage; DW4 collects the three stage outputs into the trip command.
// Purely combinational; N sets the number of inputs.
module or_element #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  output logic         y
);

  always_comb y = |a;

endmodule
