// gin_vo_multiplier: forms the product Gine[n] * Vo[n], the divisor of the
// duty law (1-d) = iL / (Gine * Vo). A negative voltage code is taken as zero
// (an output voltage is never negative; only noise or offset makes the code
// so). The product is registered: prod_o and out_valid_o follow in_valid by
// one clock. The multiplication follows the design; the clipping and the
// register are this design's choices.
module gin_vo_multiplier
  import pfc_pkg::*;
#(
  parameter int unsigned GW = GINE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [GW-1:0]            gine,
  input  code_t                    vo,
  output logic [GW+CODE_W-2:0]     prod_o,
  output logic                     out_valid_o
);

  logic [CODE_W-2:0] vo_mag;
  assign vo_mag = vo[CODE_W-1] ? '0 : vo[CODE_W-2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_o      <= '0;
      out_valid_o <= 1'b0;
    end else begin
      out_valid_o <= in_valid;
      if (in_valid)
        prod_o <= gine * vo_mag;
    end
  end

endmodule
