// tb_discrete_inputs: self-checking test of the discrete input register.
// Random words with random valid strobes; the outputs must hold the last
// strobed set (zero after reset) and updated must pulse one cycle after each
// strobe.
module tb_discrete_inputs;
  localparam int unsigned N = 3, W = 10;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [N-1:0][W-1:0] data_in = '0, data_out, ref_data = '0;
  logic updated, ref_upd = 0;
  int checks = 0, failures = 0, captures = 0;

  discrete_inputs #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .valid(valid),
                                       .data_in(data_in), .data_out(data_out), .updated(updated));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst_n) begin ref_data <= '0; ref_upd <= 0; end
    else begin
      ref_upd <= valid;
      if (valid) begin ref_data <= data_in; captures++; end
    end
  end

  always @(negedge clk) if (rst_n) begin
    checks += 2;
    if (data_out !== ref_data) begin failures++; $display("FAIL t=%0t out=%h ref=%h", $time, data_out, ref_data); end
    if (updated !== ref_upd) begin failures++; $display("FAIL updated t=%0t", $time); end
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
    #1;
    checks++;
    if (data_out !== '0) begin failures++; $display("FAIL reset value"); end
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk) #1;
      for (int p = 0; p < N; p++) data_in[p] = W'($urandom_range(1023));
      valid = ($urandom_range(4) == 0);
    end
    checks++;
    if (captures < 100) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
