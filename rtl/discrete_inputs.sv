// discrete_inputs: input register of the controller's discrete inputs.
//
// The ADC words for the phase currents reach the FPGA pins (through the
// galvanic isolation) as parallel discrete inputs. This block captures all
// N words together on each data-valid strobe and holds them until the next
// one, so that the protection logic always sees one consistent set of
// phase currents. After reset the held values are zero (no current).
//
// Interface: valid is a one-cycle strobe, synchronous to clk, that marks a
// new set of words on data_in; data_out holds the last set and updated
// pulses for one cycle after each capture. Timing: data_out changes one
// clock edge after the strobe. The source article only says the ADC values go to
// the discrete inputs; the strobe and synchronous capture are this design's
// choice.
module discrete_inputs #(
  parameter int unsigned N = relay_pkg::NUM_PHASES,
  parameter int unsigned W = relay_pkg::ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  input  logic [N-1:0][W-1:0] data_in,
  output logic [N-1:0][W-1:0] data_out,
  output logic                updated
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      updated  <= 1'b0;
    end else begin
      updated <= valid;
      if (valid) data_out <= data_in;
    end
  end

endmodule
