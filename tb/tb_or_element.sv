// tb_or_element: self-checking test of the OR element. All input
// combinations for the 3-input element used for DW1..DW4, and random
// vectors for a 7-input one; the expected value is "at least one input set".
module tb_or_element;
  logic [2:0] a3;
  logic       y3;
  logic [6:0] a7;
  logic       y7;
  int checks = 0, failures = 0;

  or_element #(.N(3)) dut3 (.a(a3), .y(y3));
  or_element #(.N(7)) dut7 (.a(a7), .y(y7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      a3 = 3'(v);
      #1;
      exp = (v != 0);
      checks++;
      if (y3 !== exp) begin failures++; $display("FAIL N=3 a=%b y=%b", a3, y3); end
    end
    for (int k = 0; k < 300; k++) begin
      int cnt;
      a7 = (k % 3 == 0) ? 7'(1 << (k % 7)) : 7'($urandom_range(127));
      if (k % 10 == 0) a7 = '0;
      #1;
      cnt = $countones(a7);
      checks++;
      if (y7 !== (cnt > 0)) begin failures++; $display("FAIL N=7 a=%b y=%b", a7, y7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
