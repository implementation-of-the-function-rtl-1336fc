// relay_pkg: types and default settings shared by the stepwise current
// protection.
//
// The protection watches the three phase currents of one line, delivered as
// unsigned ADC codes that stand for the current magnitude. Three stages (an
// instantaneous cutoff, a delayed cutoff and a maximum current stage) each
// compare all three phases against their own pickup setting. The source article
// fixes the structure (three stages, three relays per stage); the word width,
// the clock rate, the pickup codes and the delay times below are this
// design's own defaults, picked as typical values for a feeder protection.
package relay_pkg;

  // Number of phases fed from the current transformers (TA).
  localparam int unsigned NUM_PHASES = 3;
  // Number of phase voltages fed from the voltage transformers (TV).
  localparam int unsigned NUM_VOLTAGES = 3;
  // Number of protection stages.
  localparam int unsigned NUM_STAGES = 3;
  // Width of one ADC word (unsigned current magnitude).
  localparam int unsigned ADC_W = 10;

  typedef logic [ADC_W-1:0] current_t;
  typedef logic [NUM_PHASES-1:0][ADC_W-1:0] phase_currents_t;
  typedef logic [NUM_VOLTAGES-1:0][ADC_W-1:0] phase_voltages_t;

  // Index of each stage in the stage vectors of the design.
  typedef enum logic [1:0] {
    STAGE_INSTANT = 2'd0,  // instantaneous current cutoff
    STAGE_DELAYED = 2'd1,  // current cutoff with time delay
    STAGE_MAXCUR  = 2'd2   // maximum current (backup) protection
  } stage_e;

  // Default system clock.
  localparam int unsigned CLK_HZ_DEFAULT = 1_000_000;

  // Default pickup settings in ADC codes (stage 1 highest, stage 3 lowest).
  localparam current_t I_SET1_DEFAULT = current_t'(800);
  localparam current_t I_SET2_DEFAULT = current_t'(400);
  localparam current_t I_SET3_DEFAULT = current_t'(150);

  // Default delays of the two timed stages, in milliseconds.
  localparam int unsigned DT1_MS_DEFAULT = 500;
  localparam int unsigned DT2_MS_DEFAULT = 1500;

  // Convert a time in milliseconds to clock cycles.
  function automatic int unsigned ms_to_cycles(int unsigned clk_hz, int unsigned ms);
    return int'((longint'(clk_hz) * longint'(ms)) / 1000);
  endfunction

endpackage
