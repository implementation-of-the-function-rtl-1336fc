// adc_model: behavioural model of the analog-to-digital converter block
// that sits between the current transformers and the controller's discrete
// inputs. Not synthesizable; for testbenches only.
//
// Every SAMPLE_CYCLES clock cycles it converts the three phase current
// magnitudes (real inputs, amperes) and the three phase voltage magnitudes
// (volts) into unsigned W-bit codes, with FULL_SCALE_A amperes or
// FULL_SCALE_V volts mapping to the largest code and larger values
// clipping, and presents them on data and volt with a one-cycle valid
// strobe. The
// conversion itself (rectification/RMS and quantisation) is idealised.
module adc_model #(
  parameter int unsigned W             = 10,
  parameter int unsigned SAMPLE_CYCLES = 1000,
  parameter real         FULL_SCALE_A  = 100.0,
  parameter real         FULL_SCALE_V  = 150.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  real                 ia,
  input  real                 ib,
  input  real                 ic,
  input  real                 va,
  input  real                 vb,
  input  real                 vc,
  output logic                valid,
  output logic [2:0][W-1:0]   data,
  output logic [2:0][W-1:0]   volt
);

  int unsigned div;

  function automatic logic [W-1:0] convert(input real value, input real full_scale);
    real code;
    code = value / full_scale * real'((1 << W) - 1);
    if (code < 0.0) code = 0.0;
    if (code > real'((1 << W) - 1)) code = real'((1 << W) - 1);
    return W'($rtoi(code + 0.5));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div   <= 0;
      valid <= 1'b0;
      data  <= '0;
      volt  <= '0;
    end else begin
      valid <= 1'b0;
      if (div == SAMPLE_CYCLES - 1) begin
        div   <= 0;
        valid <= 1'b1;
        data  <= {convert(ic, FULL_SCALE_A), convert(ib, FULL_SCALE_A), convert(ia, FULL_SCALE_A)};
        volt  <= {convert(vc, FULL_SCALE_V), convert(vb, FULL_SCALE_V), convert(va, FULL_SCALE_V)};
      end else begin
        div <= div + 1;
      end
    end
  end

endmodule
