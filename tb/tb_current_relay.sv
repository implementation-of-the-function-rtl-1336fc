// tb_current_relay: self-checking test of the overcurrent measuring element.
// Drives edge cases around the setting (just below, equal, just above, zero,
// full scale) and random pairs, and compares pickup with i_meas >= setting
// worked out in the testbench.
module tb_current_relay;
  localparam int unsigned W = 10;

  logic [W-1:0] i_meas, setting;
  logic         pickup;
  int checks = 0, failures = 0;

  current_relay #(.W(W)) dut (.i_meas(i_meas), .setting(setting), .pickup(pickup));

  task automatic apply(input int unsigned i, input int unsigned s);
    logic exp;
    i_meas  = W'(i);
    setting = W'(s);
    #1;
    exp = (i >= s);
    checks++;
    if (pickup !== exp) begin
      failures++;
      $display("FAIL i=%0d set=%0d pickup=%0b exp=%0b", i, s, pickup, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(399, 400);
    apply(400, 400);
    apply(401, 400);
    apply(0, 0);
    apply(0, 1);
    apply(1023, 1023);
    apply(1022, 1023);
    apply(1023, 0);
    for (int k = 0; k < 2000; k++) begin
      automatic int unsigned s = $urandom_range(1023);
      automatic int unsigned d = $urandom_range(6);
      // half near the setting, half anywhere
      if (k % 2 == 0) apply((s + d >= 3 && s + d - 3 <= 1023) ? s + d - 3 : s, s);
      else            apply($urandom_range(1023), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
