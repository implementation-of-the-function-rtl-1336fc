// stepwise_protection: the three-stage current protection logic.
//
// Every phase current feeds one overcurrent relay per stage (KA1.x, KA2.x,
// KA3.x). Per stage an OR element (DW1, DW2, DW3) gives 1 when any phase of
// that stage has picked up. Stage 1, the instantaneous cutoff, acts at once;
// stage 2 (cutoff with delay) goes through time delay DT1 and stage 3
// (maximum current protection) through DT2. The OR element DW4 joins the
// three stage outputs into the trip function
//
//   T = DW1 OR (DW2 delayed by DT1) OR (DW3 delayed by DT2)
//
// which drives the output element KL. The signalling elements KH1, KH2, KH3
// are fed from DW1, the output of DT1 and the output of DT2. This structure
// and the trip function follow the source article exactly.
//
// Interface: i_phase holds the three phase current codes (unsigned
// magnitudes), reset_cmd clears KL and the KH flags. stage_pickup is the
// DW1..DW3 outputs and stage_operate the three inputs of DW4, both brought
// out for display. Timing: trip and signal are registered; a current above
// the stage-1 setting gives trip one clock edge later, a stage-2 or stage-3
// pickup gives trip DT1_CYCLES + 1 or DT2_CYCLES + 1 edges later.
// The settings, delays and the seal-in of KL are this design's defaults.
module stepwise_protection
  import relay_pkg::*;
#(
  parameter int unsigned W          = ADC_W,
  parameter logic [W-1:0] I_SET1    = W'(I_SET1_DEFAULT),
  parameter logic [W-1:0] I_SET2    = W'(I_SET2_DEFAULT),
  parameter logic [W-1:0] I_SET3    = W'(I_SET3_DEFAULT),
  parameter int unsigned DT1_CYCLES = ms_to_cycles(CLK_HZ_DEFAULT, DT1_MS_DEFAULT),
  parameter int unsigned DT2_CYCLES = ms_to_cycles(CLK_HZ_DEFAULT, DT2_MS_DEFAULT),
  parameter bit          KL_LATCH   = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NUM_PHASES-1:0][W-1:0] i_phase,
  input  logic                         reset_cmd,
  output logic                         trip,
  output logic [NUM_STAGES-1:0]        signal,
  output logic [NUM_STAGES-1:0]        stage_pickup,
  output logic [NUM_STAGES-1:0]        stage_operate
);

  localparam logic [NUM_STAGES-1:0][W-1:0] SETTINGS = {I_SET3, I_SET2, I_SET1};

  // Relay outputs, indexed [stage][phase].
  logic [NUM_STAGES-1:0][NUM_PHASES-1:0] ka;
  logic                                  trip_cmd;

  // KA1.1 .. KA3.3
  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_stage
    for (genvar p = 0; p < NUM_PHASES; p++) begin : g_phase
      current_relay #(.W(W)) u_ka (
        .i_meas (i_phase[p]),
        .setting(SETTINGS[s]),
        .pickup (ka[s][p])
      );
    end
    // DW1 .. DW3
    or_element #(.N(NUM_PHASES)) u_dw (
      .a(ka[s]),
      .y(stage_pickup[s])
    );
  end

  // Stage 1 acts without delay.
  assign stage_operate[STAGE_INSTANT] = stage_pickup[STAGE_INSTANT];

  // DT1
  time_delay #(.DELAY_CYCLES(DT1_CYCLES)) u_dt1 (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (stage_pickup[STAGE_DELAYED]),
    .out  (stage_operate[STAGE_DELAYED])
  );

  // DT2
  time_delay #(.DELAY_CYCLES(DT2_CYCLES)) u_dt2 (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (stage_pickup[STAGE_MAXCUR]),
    .out  (stage_operate[STAGE_MAXCUR])
  );

  // DW4
  or_element #(.N(NUM_STAGES)) u_dw4 (
    .a(stage_operate),
    .y(trip_cmd)
  );

  // KL
  output_relay #(.LATCH(KL_LATCH)) u_kl (
    .clk      (clk),
    .rst_n    (rst_n),
    .trip_cmd (trip_cmd),
    .reset_cmd(reset_cmd),
    .trip     (trip)
  );

  // KH1 .. KH3
  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_kh
    signal_flag u_kh (
      .clk  (clk),
      .rst_n(rst_n),
      .set  (stage_operate[s]),
      .clear(reset_cmd),
      .flag (signal[s])
    );
  end

endmodule
