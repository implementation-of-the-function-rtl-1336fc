// tb_stepwise_protection: self-checking test of the three-stage protection
// logic with short delays (DT1 = 20, DT2 = 50 cycles).
//
// A cycle-level reference model in the testbench evaluates the nine relay
// comparisons, the three stage ORs, the two pickup delays (as counts of
// consecutive edges), the trip function and the latched outputs, and every
// output of the block is compared with it on every cycle. Phase currents
// are random segments in the four current bands the settings define, on a
// random phase. Directed cases check the latency of each stage and that a
// fault cleared before the delay runs out does not trip. Coverage counters
// make sure each stage tripped, each timer restarted and each phase picked up.
module tb_stepwise_protection;
  import relay_pkg::*;
  localparam int unsigned W = 10;
  localparam int S1 = 800, S2 = 400, S3 = 150;
  localparam int unsigned D1 = 20, D2 = 50;

  logic clk = 0, rst_n = 0, reset_cmd = 0;
  logic [NUM_PHASES-1:0][W-1:0] i_phase = '0;
  logic trip;
  logic [2:0] signal, stage_pickup, stage_operate;

  stepwise_protection #(
    .W(W), .I_SET1(W'(S1)), .I_SET2(W'(S2)), .I_SET3(W'(S3)),
    .DT1_CYCLES(D1), .DT2_CYCLES(D2), .KL_LATCH(1'b1)
  ) dut (
    .clk(clk), .rst_n(rst_n), .i_phase(i_phase), .reset_cmd(reset_cmd),
    .trip(trip), .signal(signal), .stage_pickup(stage_pickup), .stage_operate(stage_operate)
  );

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  int run2 = 0, run3 = 0;
  logic ref_trip = 0;
  logic [2:0] ref_sig = '0;
  logic [2:0] op_q = '0;
  int checks = 0, failures = 0;
  int trips_by_stage [3] = '{0, 0, 0};
  int restarts [3] = '{0, 0, 0};
  int phase_hits [3] = '{0, 0, 0};

  function automatic logic [2:0] ref_pickup(input logic [NUM_PHASES-1:0][W-1:0] ip);
    logic [2:0] r = '0;
    for (int p = 0; p < 3; p++) begin
      if (int'(ip[p]) >= S1) r[0] = 1;
      if (int'(ip[p]) >= S2) r[1] = 1;
      if (int'(ip[p]) >= S3) r[2] = 1;
    end
    return r;
  endfunction

  function automatic logic [2:0] ref_operate(input logic [2:0] pk, input int r2, input int r3);
    return {pk[2] && r3 >= D2, pk[1] && r2 >= D1, pk[0]};
  endfunction

  always @(posedge clk) begin
    logic [2:0] pk, op;
    pk = ref_pickup(i_phase);
    op = ref_operate(pk, run2, run3);
    if (!rst_n) begin
      run2 <= 0; run3 <= 0; ref_trip <= 0; ref_sig <= '0;
    end else begin
      if (!pk[1]) begin if (run2 > 0 && run2 < D1) restarts[1]++; run2 <= 0; end
      else if (run2 < D1) run2 <= run2 + 1;
      if (!pk[2]) begin if (run3 > 0 && run3 < D2) restarts[2]++; run3 <= 0; end
      else if (run3 < D2) run3 <= run3 + 1;
      if (|op) ref_trip <= 1;
      else if (reset_cmd) ref_trip <= 0;
      for (int s = 0; s < 3; s++)
        if (op[s]) ref_sig[s] <= 1;
        else if (reset_cmd) ref_sig[s] <= 0;
      for (int s = 0; s < 3; s++) if (op[s] && !op_q[s]) trips_by_stage[s]++;
      op_q <= op;
      for (int p = 0; p < 3; p++) if (int'(i_phase[p]) >= S3) phase_hits[p]++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    logic [2:0] pk, op;
    pk = ref_pickup(i_phase);
    op = ref_operate(pk, run2, run3);
    checks += 4;
    if (stage_pickup !== pk)  begin failures++; $display("FAIL t=%0t pickup=%b ref=%b", $time, stage_pickup, pk); end
    if (stage_operate !== op) begin failures++; $display("FAIL t=%0t operate=%b ref=%b", $time, stage_operate, op); end
    if (trip !== ref_trip)    begin failures++; $display("FAIL t=%0t trip=%b ref=%b", $time, trip, ref_trip); end
    if (signal !== ref_sig)   begin failures++; $display("FAIL t=%0t signal=%b ref=%b", $time, signal, ref_sig); end
  end

  // ---------------- stimulus ----------------
  function automatic logic [W-1:0] band_current(input int band);
    case (band)
      0: return W'($urandom_range(S3 - 1));
      1: return W'($urandom_range(S2 - 1, S3));
      2: return W'($urandom_range(S1 - 1, S2));
      default: return W'($urandom_range(1023, S1));
    endcase
  endfunction

  task automatic clear_all();
    @(posedge clk) #1 i_phase = '0; reset_cmd = 1;
    @(posedge clk) #1 reset_cmd = 0;
    @(posedge clk);
  endtask

  // Apply a band-b current on phase p and count edges until trip rises.
  task automatic latency(input int p, input int band, input int expect_edges);
    int n = 0;
    clear_all();
    #1 i_phase[p] = band_current(band);
    while (!trip && n < 200) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != expect_edges) begin
      failures++;
      $display("FAIL latency stage band %0d phase %0d: %0d edges, expected %0d", band, p, n, expect_edges);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Latencies: stage 1 one edge, stage 2 D1+1, stage 3 D2+1.
    latency(0, 3, 1);
    latency(1, 2, D1 + 1);
    latency(2, 1, D2 + 1);
    // A stage-2 fault cleared one edge early must not trip.
    clear_all();
    #1 i_phase[1] = band_current(2);
    repeat (D1 - 1) @(posedge clk);
    #1 i_phase[1] = '0;
    repeat (5) @(posedge clk);
    checks++;
    if (trip) begin failures++; $display("FAIL stage 2 tripped on a short fault"); end
    // The seal-in outlives the fault.
    latency(0, 3, 1);
    #1 i_phase = '0;
    repeat (10) @(posedge clk);
    checks++;
    if (!trip || signal != 3'b001) begin failures++; $display("FAIL seal-in/signal %b", signal); end
    // Random segments.
    for (int seg = 0; seg < 1500; seg++) begin
      automatic int band = $urandom_range(3);
      automatic int p = $urandom_range(2);
      automatic int len = $urandom_range(80, 1);
      @(posedge clk) #1;
      i_phase = '0;
      for (int q = 0; q < 3; q++) i_phase[q] = band_current(0);
      i_phase[p] = band_current(band);
      if (band == 3 && $urandom_range(3) != 0) i_phase[p] = band_current(2);
      reset_cmd = ($urandom_range(3) == 0);
      @(posedge clk) #1 reset_cmd = 0;
      repeat (len) @(posedge clk);
    end
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (trips_by_stage[s] == 0) begin failures++; $display("FAIL stage %0d never operated", s + 1); end
      checks++;
      if (phase_hits[s] == 0) begin failures++; $display("FAIL phase %0d never picked up", s); end
    end
    for (int s = 1; s < 3; s++) begin
      checks++;
      if (restarts[s] == 0) begin failures++; $display("FAIL timer %0d never restarted", s); end
    end
    $display("stage operations %0d %0d %0d, timer restarts %0d %0d",
             trips_by_stage[0], trips_by_stage[1], trips_by_stage[2], restarts[1], restarts[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
