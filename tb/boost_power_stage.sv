// boost_power_stage: behavioural model of the analog part of the PFC
// rectifier: rectified 50 Hz line, boost inductor L, switch, diode, output
// capacitor C2 and a resistive load, plus the two sensing chains. Not
// synthesizable. The state is advanced by forward Euler once per 20 ns clock.
// The inductor current is kept at zero when it would reverse (diode blocks),
// which models discontinuous conduction; dcm_events counts the switching
// periods in which that happened. Sensing: current 0.5 V/A (0.1 ohm shunt
// times an amplifier gain of 5), output voltage divided by 40 (390k/10k).
module boost_power_stage #(
  parameter real VIN_RMS = 50.0,
  parameter real F_LINE  = 50.0,
  parameter real L       = 500.0e-6,
  parameter real C       = 1000.0e-6,
  parameter real DT      = 20.0e-9
) (
  input  logic clk,
  input  logic sw_on,
  input  logic period_start,
  input  real  r_load,
  output real  v_in,
  output real  i_l,
  output real  v_o,
  output real  sense_i,
  output real  sense_v
);
  real t = 0.0;
  real il = 0.0;
  real vo = VIN_RMS * 1.41421356;
  real vin_now = 0.0;
  bit  hit_zero = 0;
  int  dcm_events = 0;
  int  periods = 0;

  always @(posedge clk) begin
    real vi, dil, nil;
    vi = VIN_RMS * 1.41421356 * $sin(2.0 * 3.14159265358979 * F_LINE * t);
    if (vi < 0.0) vi = -vi;
    if (sw_on) begin
      dil = vi / L * DT;
      vo  = vo - vo / r_load / C * DT;
      il  = il + dil;
    end else begin
      nil = il + (vi - vo) / L * DT;
      if (nil < 0.0) begin
        nil = 0.0;
        if (il > 0.0) hit_zero = 1;
      end
      vo = vo + (0.5 * (il + nil) - vo / r_load) / C * DT;
      il = nil;
    end
    if (period_start) begin
      periods++;
      if (hit_zero) dcm_events++;
      hit_zero = 0;
    end
    t = t + DT;
    vin_now = vi;
  end

  assign v_in    = vin_now;
  assign i_l     = il;
  assign v_o     = vo;
  assign sense_i = il * 0.5;
  assign sense_v = vo * 0.025;
endmodule
