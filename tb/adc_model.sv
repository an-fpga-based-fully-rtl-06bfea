// adc_model: behavioural model of one 12-bit bipolar A/D converter
// (+-2.5 V input range, two's complement output) as the controller uses it.
// Not synthesizable. A falling edge of conv samples the analog input vin;
// busy is high for TCONV clocks and drops together with the new word on data.
// The pin behaviour is a plain busy/data handshake chosen for this model.
module adc_model #(
  parameter int TCONV = 15
) (
  input  logic        clk,
  input  logic        conv,
  input  real         vin,
  output logic        busy,
  output logic [11:0] data
);
  logic conv_q = 1'b1;
  int   left = 0;
  real  held = 0.0;

  function automatic logic [11:0] quantise(input real v);
    int c;
    c = int'($floor(v / 2.5 * 2048.0 + 0.5));
    if (c > 2047) c = 2047;
    if (c < -2048) c = -2048;
    return 12'(c);
  endfunction

  initial begin
    busy = 1'b0;
    data = '0;
  end

  always @(posedge clk) begin
    conv_q <= conv;
    if (conv_q && !conv) begin
      held <= vin;
      left <= TCONV;
      busy <= 1'b1;
    end else if (left > 0) begin
      left <= left - 1;
      if (left == 1) begin
        busy <= 1'b0;
        data <= quantise(held);
      end
    end
  end
endmodule
