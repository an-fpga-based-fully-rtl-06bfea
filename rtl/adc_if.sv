// adc_if: reads the two A/D converters of the controller, the input (inductor)
// current converter and the output voltage converter, which are started
// together by the convert strobe from the DPWM.
//
// Each converter delivers a 12-bit two's complement word; only its upper eight
// bits are kept, so the code is a signed byte (the sign bit is the word's MSB).
// Both converters share the convert strobe: a falling edge starts a conversion,
// each converter raises its busy output while converting and presents its word
// when busy falls. The word is captured on the clock on which busy is seen
// falling. When both channels have delivered since the last falling edge of the
// strobe, the pair is presented on sample_o with a one-clock sample_valid_o.
// The upper-eight-bit use and the sign bit follow the design; the
// busy/data handshake is this design's choice, as the converters' pins are not
// part of it. A new falling edge of the strobe abandons an unfinished pair.
//
// The lower four bits of each word are not used, by design; lint reports them
// as unused.
//
// Timing: sample_valid_o rises one clock after the later busy falls.
module adc_if
  import pfc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adc_conv,
  input  logic             il_busy,
  input  logic [ADC_W-1:0] il_data,
  input  logic             vo_busy,
  input  logic [ADC_W-1:0] vo_data,
  output sample_t          sample_o,
  output logic             sample_valid_o
);

  logic    conv_q, il_busy_q, vo_busy_q;
  logic    il_done, vo_done;
  sample_t cap;

  wire conv_fall = conv_q && !adc_conv;
  wire il_fall   = il_busy_q && !il_busy;
  wire vo_fall   = vo_busy_q && !vo_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_q         <= 1'b1;
      il_busy_q      <= 1'b0;
      vo_busy_q      <= 1'b0;
      il_done        <= 1'b0;
      vo_done        <= 1'b0;
      cap            <= '0;
      sample_o       <= '0;
      sample_valid_o <= 1'b0;
    end else begin
      conv_q         <= adc_conv;
      il_busy_q      <= il_busy;
      vo_busy_q      <= vo_busy;
      sample_valid_o <= 1'b0;
      if (conv_fall) begin
        il_done <= 1'b0;
        vo_done <= 1'b0;
      end else begin
        if (il_fall && !il_done) begin
          cap.il  <= code_t'(il_data[ADC_W-1 -: CODE_W]);
          il_done <= 1'b1;
        end
        if (vo_fall && !vo_done) begin
          cap.vo  <= code_t'(vo_data[ADC_W-1 -: CODE_W]);
          vo_done <= 1'b1;
        end
        if ((il_done || il_fall) && (vo_done || vo_fall) && !(il_done && vo_done)) begin
          sample_o.il    <= il_done ? cap.il : code_t'(il_data[ADC_W-1 -: CODE_W]);
          sample_o.vo    <= vo_done ? cap.vo : code_t'(vo_data[ADC_W-1 -: CODE_W]);
          sample_valid_o <= 1'b1;
        end
      end
    end
  end

endmodule
