// Behavioural model of the read-back ADC (not synthesizable).
//
// A falling edge on adc_rc_n (read/convert) starts a conversion: after
// T_START ns adc_busy_n goes low, and T_CONV ns later the result is placed on
// adc_data and adc_busy_n returns high (end of conversion). The result is a
// known function of the multiplexer selects and a running conversion count,
// so a testbench can predict it:
//   adc_data = 16'h0C00 + 16'h0111 * mux_2_sel + 16'h0010 * mux_1_sel + conv_count
// conv_count counts conversions started, from 0.
module adc_model #(
  parameter int T_START = 30,
  parameter int T_CONV  = 400
) (
  input  logic        adc_rc_n,
  input  logic [1:0]  mux_1_sel,
  input  logic [2:0]  mux_2_sel,
  output logic        adc_busy_n,
  output logic [15:0] adc_data,
  output int          conv_count
);
  initial begin
    adc_busy_n = 1'b1;
    adc_data   = 16'h0000;
    conv_count = 0;
  end

  always @(negedge adc_rc_n) begin
    #(T_START) adc_busy_n = 1'b0;
    #(T_CONV);
    adc_data   = 16'h0C00 + 16'h0111 * 16'(mux_2_sel) + 16'h0010 * 16'(mux_1_sel) + 16'(conv_count);
    conv_count = conv_count + 1;
    adc_busy_n = 1'b1;
  end
endmodule
