// tb_plic_controller: end-to-end test of the relay protection controller
// at its default parameters (1 MHz clock, 500 ms and 1500 ms stage delays,
// pickup codes 800/400/150).
//
// The line is modelled as three phase current magnitudes in amperes. A
// behavioural ADC (100 A full scale, one conversion per millisecond) feeds
// the controller's discrete inputs, and a breaker model opens 60 ms after
// the trip output rises, which drops the currents to zero. Scenarios:
// normal load and a voltage sag (no pickup); a fault in each stage's current
// band (90 A, 50 A, 20 A) on each phase in turn, so every one of the nine
// relays trips the line once; and a stage-2 and a stage-3 fault that a
// downstream protection clears before the delay runs out. Trip timing is checked in clock cycles from the
// sample that first carried the fault current, the seal-in and the signal
// flags after the breaker opens, and the operator reset.
module tb_plic_controller;
  import relay_pkg::*;

  localparam int unsigned CLK_HZ     = CLK_HZ_DEFAULT;
  localparam int unsigned DT1_CYCLES = ms_to_cycles(CLK_HZ_DEFAULT, DT1_MS_DEFAULT);
  localparam int unsigned DT2_CYCLES = ms_to_cycles(CLK_HZ_DEFAULT, DT2_MS_DEFAULT);
  localparam int unsigned SAMPLE_CYCLES = CLK_HZ / 1000;
  localparam int unsigned BREAKER_CYCLES = 60 * CLK_HZ / 1000;
  localparam real FAULT_A [3] = '{90.0, 50.0, 20.0};
  localparam int unsigned STAGE_DELAY [3] = '{0, DT1_CYCLES, DT2_CYCLES};

  logic clk = 0, rst_n = 0, reset_cmd = 0;
  logic adc_valid;
  phase_currents_t adc_data, i_meas;
  phase_voltages_t adc_volt, u_meas;
  logic trip, sample_updated;
  logic [2:0] signal, stage_pickup, stage_operate;
  real ia = 0.0, ib = 0.0, ic = 0.0;
  real va = 60.0, vb = 60.0, vc = 60.0;

  always #500 clk = ~clk;   // one period stands for 1 us at CLK_HZ

  adc_model #(.W(ADC_W), .SAMPLE_CYCLES(SAMPLE_CYCLES), .FULL_SCALE_A(100.0)) u_adc (
    .clk(clk), .rst_n(rst_n), .ia(ia), .ib(ib), .ic(ic), .va(va), .vb(vb), .vc(vc),
    .valid(adc_valid), .data(adc_data), .volt(adc_volt)
  );

  plic_controller dut (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_valid), .adc_data(adc_data), .adc_volt(adc_volt),
    .reset_cmd(reset_cmd), .trip(trip), .signal(signal), .i_meas(i_meas), .u_meas(u_meas),
    .stage_pickup(stage_pickup), .stage_operate(stage_operate), .sample_updated(sample_updated)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_samples = 0, n_stage_trip [3] = '{0, 0, 0}, n_restart [3] = '{0, 0, 0};
  int n_relay_trip [3][3];   // [stage][phase]
  int n_sealed = 0, n_reset = 0, n_breaker = 0;

  always @(posedge clk) if (sample_updated) n_samples++;

  // Breaker (executive element) model: opens BREAKER_CYCLES after trip.
  longint trip_cycle = -1;
  logic breaker_open = 0;
  always @(posedge clk) begin
    if (trip && trip_cycle < 0) trip_cycle <= cycle;
    if (!trip) trip_cycle <= -1;
    if (trip && trip_cycle >= 0 && cycle - trip_cycle == longint'(BREAKER_CYCLES) && !breaker_open) begin
      breaker_open <= 1;
      n_breaker++;
      ia = 0.0; ib = 0.0; ic = 0.0;
    end
  end

  // Timer restart coverage: a stage picks up and drops out without operating.
  logic [2:0] pk_q = '0, op_seen = '0;
  always @(posedge clk) begin
    for (int s = 1; s < 3; s++) begin
      if (stage_operate[s]) op_seen[s] <= 1;
      if (pk_q[s] && !stage_pickup[s]) begin
        if (!op_seen[s] && !stage_operate[s]) n_restart[s]++;
        op_seen[s] <= 0;
      end
    end
    pk_q <= stage_pickup;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // Wait for the next conversion started after this call and return the
  // number of the clock edge at which the controller captured it.
  task automatic next_capture(output longint cap);
    @(posedge adc_valid);
    @(posedge clk);
    #1 cap = cycle;
  endtask

  // Apply a fault, wait for the trip and check the delay in clock edges
  // from the edge that captured the first faulted sample.
  task automatic fault_trip(input int phase, input real amps, input int stage,
                            input int unsigned delay_cycles);
    longint cap, t_trip;
    breaker_open = 0;
    if (phase == 0) ia = amps; else if (phase == 1) ib = amps; else ic = amps;
    next_capture(cap);
    // first captured word with the fault
    check(stage_pickup[stage] === 1'b1, $sformatf("stage %0d pickup on phase %0d", stage + 1, phase));
    @(posedge trip);
    #1 t_trip = cycle;
    check(t_trip - cap == longint'(delay_cycles) + 1,
          $sformatf("stage %0d trip after %0d edges, expected %0d", stage + 1, t_trip - cap, delay_cycles + 1));
    check(signal === 3'(1 << stage), $sformatf("signal %b for stage %0d", signal, stage + 1));
    n_stage_trip[stage]++;
    n_relay_trip[stage][phase]++;
    // breaker opens, currents vanish; trip must seal in
    wait (breaker_open);
    repeat (5 * SAMPLE_CYCLES) @(posedge clk);
    #1;
    check(stage_pickup === 3'b000, "no pickup after breaker opened");
    check(trip === 1'b1, "trip sealed in after breaker opened");
    check(signal === 3'(1 << stage), "signal held after breaker opened");
    if (trip) n_sealed++;
    // operator reset
    @(posedge clk) #1 reset_cmd = 1;
    @(posedge clk) #1 reset_cmd = 0;
    @(posedge clk) #1;
    check(trip === 1'b0 && signal === 3'b000, "reset clears trip and signals");
    if (!trip) n_reset++;
    repeat (10) @(posedge clk);
  endtask

  // A fault in a delayed band cleared elsewhere after hold_ms.
  task automatic fault_cleared(input int phase, input real amps, input int stage, input int hold_ms);
    if (phase == 0) ia = amps; else if (phase == 1) ib = amps; else ic = amps;
    repeat (hold_ms * SAMPLE_CYCLES) @(posedge clk);
    ia = 5.0; ib = 5.0; ic = 5.0;
    repeat (5 * SAMPLE_CYCLES) @(posedge clk);
    #1;
    check(trip === 1'b0 && signal === 3'b000,
          $sformatf("no trip for stage %0d fault cleared after %0d ms", stage + 1, hold_ms));
    check(stage_pickup === 3'b000, "pickup dropped after clearance");
  endtask

  initial begin
    repeat (12 * CLK_HZ) @(posedge clk);   // 12 s of controller time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_relay_trip[s, p]) n_relay_trip[s][p] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Normal load: 5 A on all phases.
    ia = 5.0; ib = 5.0; ic = 5.0;
    repeat (20 * SAMPLE_CYCLES) @(posedge clk);
    #1;
    check(i_meas[0] === 10'd51 && i_meas[1] === 10'd51 && i_meas[2] === 10'd51, "load current codes");
    check(u_meas[0] === 10'd409 && u_meas[1] === 10'd409 && u_meas[2] === 10'd409, "voltage codes");
    check(stage_pickup === 3'b000 && trip === 1'b0, "no pickup at load current");
    // A voltage change alone must not disturb the protection.
    va = 20.0;
    repeat (3 * SAMPLE_CYCLES) @(posedge clk);
    #1;
    check(u_meas[0] === 10'd136 && u_meas[1] === 10'd409, "voltage sag captured");
    check(stage_pickup === 3'b000 && trip === 1'b0, "no pickup on voltage sag");
    va = 60.0;
    // Every relay once: each stage on each phase.
    // Stage 1: 90 A (code 921 >= 800); stage 2: 50 A (code 512, between
    // 400 and 800); stage 3: 20 A (code 205, between 150 and 400).
    for (int st = 0; st < 3; st++) begin
      for (int ph = 0; ph < 3; ph++) begin
        fault_trip(ph, FAULT_A[st], st, STAGE_DELAY[st]);
        ia = 5.0; ib = 5.0; ic = 5.0;
        repeat (5 * SAMPLE_CYCLES) @(posedge clk);
      end
    end
    // Selectivity: faults cleared downstream before the delays run out.
    fault_cleared(1, 60.0, 1, 300);
    fault_cleared(0, 30.0, 2, 1000);

    $display("samples=%0d stage_trips=%0d/%0d/%0d restarts2=%0d restarts3=%0d sealed=%0d resets=%0d breaker=%0d",
             n_samples, n_stage_trip[0], n_stage_trip[1], n_stage_trip[2],
             n_restart[1], n_restart[2], n_sealed, n_reset, n_breaker);
    check(n_samples > 1000, "sample captures happened");
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < 3; p++)
        check(n_relay_trip[s][p] > 0, $sformatf("relay KA%0d.%0d trip happened", s + 1, p + 1));
    check(n_restart[1] > 0, "stage 2 timer restart happened");
    check(n_restart[2] > 0, "stage 3 timer restart happened");
    check(n_sealed > 0, "seal-in happened");
    check(n_reset > 0, "operator reset happened");
    check(n_breaker > 0, "breaker opening happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
