// plic_controller: logic of the FPGA in the parallel action relay
// protection controller.
//
// The external ADC digitises the three phase currents and the three phase
// voltages and presents them on the discrete inputs with a data-valid
// strobe. A discrete_inputs register captures one consistent set of
// current and voltage words; stepwise_protection evaluates all nine relays,
// both time delays and the trip function in parallel, every clock cycle,
// and drives the disconnection output (KL) and the three stage signals
// (KH1..KH3) to the discrete outputs. The status outputs carry the captured
// currents and voltages, a pulse per captured sample and the stage states
// for the LED boards and the numeric display. The protection algorithm uses
// only the currents; the voltages are captured and shown, not evaluated.
//
// Parameters: CLK_HZ is the system clock, DT1_MS and DT2_MS the stage-2 and
// stage-3 delays in milliseconds, I_SET1..I_SET3 the pickup codes. Changing
// them and rebuilding is how the settings are changed, matching the
// source article's point that the device is reprogrammed in place.
//
// Timing: a current word presented with adc_valid before clock edge k is
// captured at edge k; a stage-1 pickup shows on trip after edge k+1; a
// stage-2/3 pickup after edge k+1+DT1/DT2 cycles. The block structure
// (ADC to discrete inputs to FPGA to discrete outputs to executive elements)
// follows the source article; the clock rate, word width, strobe and settings are
// this design's defaults.
module plic_controller
  import relay_pkg::*;
#(
  parameter int unsigned  CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned  DT1_MS = DT1_MS_DEFAULT,
  parameter int unsigned  DT2_MS = DT2_MS_DEFAULT,
  parameter logic [ADC_W-1:0] I_SET1 = I_SET1_DEFAULT,
  parameter logic [ADC_W-1:0] I_SET2 = I_SET2_DEFAULT,
  parameter logic [ADC_W-1:0] I_SET3 = I_SET3_DEFAULT
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // discrete inputs from the ADC
  input  logic                             adc_valid,
  input  phase_currents_t                  adc_data,
  input  phase_voltages_t                  adc_volt,
  // operator reset of the trip output and signals
  input  logic                             reset_cmd,
  // discrete outputs
  output logic                             trip,
  output logic [NUM_STAGES-1:0]            signal,
  // status for the display boards
  output phase_currents_t                  i_meas,
  output phase_voltages_t                  u_meas,
  output logic [NUM_STAGES-1:0]            stage_pickup,
  output logic [NUM_STAGES-1:0]            stage_operate,
  output logic                             sample_updated
);

  localparam int unsigned DT1_CYCLES = ms_to_cycles(CLK_HZ, DT1_MS);
  localparam int unsigned DT2_CYCLES = ms_to_cycles(CLK_HZ, DT2_MS);

  // Current words in the low positions, voltage words above them.
  localparam int unsigned NUM_WORDS = NUM_PHASES + NUM_VOLTAGES;
  logic [NUM_WORDS-1:0][ADC_W-1:0] din_words, din_held;

  always_comb din_words = {adc_volt, adc_data};

  discrete_inputs #(.N(NUM_WORDS), .W(ADC_W)) u_din (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid   (adc_valid),
    .data_in (din_words),
    .data_out(din_held),
    .updated (sample_updated)
  );

  always_comb begin
    for (int p = 0; p < NUM_PHASES; p++)   i_meas[p] = din_held[p];
    for (int v = 0; v < NUM_VOLTAGES; v++) u_meas[v] = din_held[NUM_PHASES + v];
  end

  stepwise_protection #(
    .W         (ADC_W),
    .I_SET1    (I_SET1),
    .I_SET2    (I_SET2),
    .I_SET3    (I_SET3),
    .DT1_CYCLES(DT1_CYCLES),
    .DT2_CYCLES(DT2_CYCLES),
    .KL_LATCH  (1'b1)
  ) u_prot (
    .clk          (clk),
    .rst_n        (rst_n),
    .i_phase      (i_meas),
    .reset_cmd    (reset_cmd),
    .trip         (trip),
    .signal       (signal),
    .stage_pickup (stage_pickup),
    .stage_operate(stage_operate)
  );

endmodule
