// tb_signal_flag: self-checking test of the latched signalling element.
// Random set/clear sequences against a reference flag: set wins, clear
// resets, otherwise the flag holds; reset clears it.
module tb_signal_flag;
  logic clk = 0, rst_n = 0, set = 0, clear = 0;
  logic flag;
  logic ref_flag = 0;
  int checks = 0, failures = 0, held = 0, cleared = 0;

  signal_flag dut (.clk(clk), .rst_n(rst_n), .set(set), .clear(clear), .flag(flag));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst_n)     ref_flag <= 0;
    else if (set)   ref_flag <= 1;
    else if (clear) begin ref_flag <= 0; if (ref_flag) cleared++; end
    else if (ref_flag) held++;
  end

  always @(negedge clk) begin
    checks++;
    if (flag !== ref_flag) begin
      failures++;
      $display("FAIL t=%0t set=%b clr=%b flag=%b ref=%b", $time, set, clear, flag, ref_flag);
    end
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
    // Set for one cycle, then it must hold.
    @(posedge clk) #1 set = 1;
    @(posedge clk) #1 set = 0;
    repeat (5) @(posedge clk);
    // Set and clear together: set wins.
    #1 set = 1; clear = 1;
    @(posedge clk) #1 set = 0; clear = 0;
    repeat (2) @(posedge clk);
    #1 clear = 1;
    @(posedge clk) #1 clear = 0;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk) #1;
      set   = ($urandom_range(19) == 0);
      clear = ($urandom_range(29) == 0);
    end
    // Asynchronous reset clears it.
    #1 set = 1;
    @(posedge clk) #1 set = 0;
    #1 rst_n = 0;
    #1;
    checks++;
    if (flag !== 1'b0) begin failures++; $display("FAIL reset"); end
    #1 rst_n = 1;
    checks++;
    if (held < 10 || cleared < 5) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
