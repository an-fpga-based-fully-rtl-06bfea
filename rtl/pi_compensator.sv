// pi_compensator: voltage-loop compensator of the DOCC controller. It turns
// the output voltage code Vo[n] into the emulated input admittance Gine[n],
// the load indicator that sets how much current the converter draws.
//
// Once per switching period (on in_valid) it forms the error
// e[n] = VREF - Vo[n] and updates an accumulator
//     acc[n] = acc[n-1] + GAIN1 * e[n] + GAIN2 * e[n-1],
// a Gain1 path on the present error and a Gain2 path on the error delayed by
// one sample, both summed with the accumulator's own delayed value. The output
// is Gine[n] = acc[n] * 2^-GAIN3_SHIFT (Gain3). The structure and the numbers
// 22, 899 and 2^-15 follow the design; the adding sign of both paths, the
// accumulator width and the clamping are this design's choices. The
// accumulator is clamped to [0, 2^(GINE_W+GAIN3_SHIFT) - 1] so Gine[n] stays
// a non-negative GINE_W-bit value and the integrator cannot wind up; sat_o
// pulses when a clamp acted. Reset clears the accumulator to GINE_INIT
// (scaled) and the delayed error to zero.
//
// Timing: gine_o and out_valid_o change one clock after in_valid.
module pi_compensator
  import pfc_pkg::*;
#(
  parameter int          VREF        = VREF_CODE,
  parameter int          G1          = GAIN1,
  parameter int          G2          = GAIN2,
  parameter int unsigned SHIFT       = GAIN3_SHIFT,
  parameter int unsigned GW          = GINE_W,
  parameter int unsigned GINE_INIT   = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  code_t              vo,
  output logic [GW-1:0]      gine_o,
  output logic               out_valid_o,
  output logic               sat_o
);

  localparam int unsigned ACC_W = GW + SHIFT + 2;   // sign + headroom
  localparam logic signed [ACC_W-1:0] ACC_MAX = ACC_W'((64'(1) << (GW + SHIFT)) - 1);

  logic signed [9:0]       err, err_q;
  logic signed [ACC_W-1:0] acc, acc_sum;
  logic signed [ACC_W-1:0] p1, p2;

  assign err     = 10'(VREF) - 10'(vo);
  assign p1      = ACC_W'(G1) * ACC_W'(err);
  assign p2      = ACC_W'(G2) * ACC_W'(err_q);
  assign acc_sum = acc + p1 + p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= ACC_W'(64'(GINE_INIT) << SHIFT);
      err_q       <= '0;
      out_valid_o <= 1'b0;
      sat_o       <= 1'b0;
    end else begin
      out_valid_o <= in_valid;
      sat_o       <= 1'b0;
      if (in_valid) begin
        err_q <= err;
        if (acc_sum < 0) begin
          acc   <= '0;
          sat_o <= 1'b1;
        end else if (acc_sum > ACC_MAX) begin
          acc   <= ACC_MAX;
          sat_o <= 1'b1;
        end else begin
          acc   <= acc_sum;
        end
      end
    end
  end

  assign gine_o = GW'(acc >>> SHIFT);

endmodule
