// tb_time_delay: self-checking test of the pickup time delay.
// A reference counts, after each clock edge, how many consecutive edges
// have seen the input high; the output must be high exactly when the input
// is high and that count has reached the delay. Directed cases: a long
// pulse (output must rise after exactly DELAY edges), pulses one edge too
// short, an interruption that must restart the timing, and random
// sequences. A second instance with delay 0 must behave as a wire.
module tb_time_delay;
  localparam int unsigned DELAY = 20;

  logic clk = 0, rst_n = 0, in = 0;
  logic out, out0;
  int checks = 0, failures = 0;
  int run = 0;        // consecutive edges with in high (reference)
  int rises = 0;      // output rising edges seen
  int restarts = 0;   // input drops before the delay ran out

  time_delay #(.DELAY_CYCLES(DELAY)) dut  (.clk(clk), .rst_n(rst_n), .in(in), .out(out));
  time_delay #(.DELAY_CYCLES(0))     dut0 (.clk(clk), .rst_n(rst_n), .in(in), .out(out0));

  always #5 clk = ~clk;

  // Reference: updated on the same edge as the DUT.
  always @(posedge clk) begin
    if (!rst_n || !in) begin
      if (rst_n && run > 0 && run < DELAY) restarts++;
      run <= 0;
    end else if (run < DELAY) run <= run + 1;
  end

  // Compare in the middle of the low phase, after all updates.
  logic out_q = 0;
  always @(negedge clk) if (rst_n) begin
    logic exp;
    exp = in && (run >= DELAY);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL t=%0t in=%b run=%0d out=%b", $time, in, run, out);
    end
    checks++;
    if (out0 !== in) begin failures++; $display("FAIL delay0 t=%0t", $time); end
    if (out && !out_q) rises++;
    out_q <= out;
  end

  task automatic pulse(input int n);
    @(posedge clk) #1 in = 1;
    repeat (n) @(posedge clk);
    #1 in = 0;
    @(posedge clk);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_rise;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    // Directed: exact rise time.
    #1 in = 1;
    t_rise = 0;
    while (!out) begin @(posedge clk); #1 t_rise++; end
    checks++;
    if (t_rise != DELAY) begin failures++; $display("FAIL rise after %0d edges", t_rise); end
    repeat (5) @(posedge clk);
    #1 in = 0;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL out did not fall with input"); end
    // Too short by one edge: never rises.
    pulse(DELAY - 1);
    // Interrupted and restarted: 15 + 15 edges must not trip.
    pulse(15);
    pulse(15);
    // Exactly long enough.
    pulse(DELAY + 1);
    // Random
    for (int k = 0; k < 3000; k++) begin
      @(posedge clk) #1 in = ($urandom_range(99) < 93) ? in : ~in;
    end
    #1 in = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (rises < 3 || restarts < 3) begin
      failures++;
      $display("FAIL coverage rises=%0d restarts=%0d", rises, restarts);
    end
    $display("rises=%0d restarts=%0d", rises, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
