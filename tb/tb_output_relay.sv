// tb_output_relay: self-checking test of the output trip element, both
// the sealing (LATCH=1) and the non-sealing (LATCH=0) form. Random trip and
// reset commands against reference models; checks that a seal-in outlives
// the trip command and that reset does not clear it while the command is on.
module tb_output_relay;
  logic clk = 0, rst_n = 0, trip_cmd = 0, reset_cmd = 0;
  logic trip_l, trip_n;
  logic ref_l = 0, ref_n = 0;
  int checks = 0, failures = 0, sealed = 0, reset_blocked = 0;

  output_relay #(.LATCH(1'b1)) dut_l (.clk(clk), .rst_n(rst_n), .trip_cmd(trip_cmd),
                                      .reset_cmd(reset_cmd), .trip(trip_l));
  output_relay #(.LATCH(1'b0)) dut_n (.clk(clk), .rst_n(rst_n), .trip_cmd(trip_cmd),
                                      .reset_cmd(reset_cmd), .trip(trip_n));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst_n) begin
      ref_l <= 0; ref_n <= 0;
    end else begin
      ref_n <= trip_cmd;
      if (trip_cmd) begin
        ref_l <= 1;
        if (reset_cmd && ref_l) reset_blocked++;
      end else if (reset_cmd) ref_l <= 0;
      else if (ref_l) sealed++;
    end
  end

  always @(negedge clk) begin
    checks += 2;
    if (trip_l !== ref_l) begin failures++; $display("FAIL latch t=%0t trip=%b ref=%b", $time, trip_l, ref_l); end
    if (trip_n !== ref_n) begin failures++; $display("FAIL nolatch t=%0t trip=%b ref=%b", $time, trip_n, ref_n); end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // One-cycle trip command: the latched output must stay on.
    @(posedge clk) #1 trip_cmd = 1;
    @(posedge clk) #1 trip_cmd = 0;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (trip_l !== 1'b1) begin failures++; $display("FAIL no seal-in"); end
    // Reset while the command is on must not clear.
    #1 trip_cmd = 1; reset_cmd = 1;
    @(posedge clk) #1 trip_cmd = 0;
    @(posedge clk) #1 reset_cmd = 0;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk) #1;
      trip_cmd  = ($urandom_range(15) == 0);
      reset_cmd = ($urandom_range(19) == 0);
    end
    checks++;
    if (sealed < 10 || reset_blocked < 1) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
