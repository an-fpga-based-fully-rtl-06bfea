// pfc_pkg: constants and types shared by the digital one-cycle-control (DOCC)
// boost PFC controller.
//
// The controller runs from a 50 MHz clock. One switching period is PWM_PERIOD
// = 1024 clocks, giving fs = 48.83 kHz (Ts = 20.48 us), the integer-multiple
// period the design is built around. Both A/D converters deliver 12-bit two's
// complement words of which only the upper CODE_W = 8 bits are used, so a code
// is a signed byte with 2^7 counts per 2.5 V.
//
// Scaling of the control law (this design's choice, see README): the divider
// forms the switch off-time in clocks as
//     off_count = (iL[n] << DIV_SHIFT) / (Gine[n] * Vo[n]),
// i.e. (1-d) = iL / (Gine * Vo / 2^(DIV_SHIFT-10)), clipped to PWM_PERIOD.
package pfc_pkg;

  // Timing
  localparam int unsigned CLK_HZ     = 50_000_000;
  localparam int unsigned PWM_PERIOD = 1024;              // clocks per switching cycle
  localparam int unsigned CNT_W      = $clog2(PWM_PERIOD);  // 10
  localparam int unsigned DUTY_W     = CNT_W + 1;           // 0..PWM_PERIOD inclusive

  // A/D converters
  localparam int unsigned ADC_W      = 12;   // converter word width
  localparam int unsigned CODE_W     = 8;    // bits kept (upper eight)

  // Voltage loop
  localparam int unsigned GINE_W     = 12;   // emulated input admittance Gine[n]
  localparam int signed   VREF_CODE  = 102;  // 80 V * K_voe (1.275)
  localparam int signed   GAIN1      = 22;
  localparam int signed   GAIN2      = 899;
  localparam int unsigned GAIN3_SHIFT = 15;  // Gain3 = 2^-15
  localparam int unsigned GINE_CCM_MIN = 500; // below: MCM/DCM operation

  // Duty computation
  localparam int unsigned DIV_SHIFT  = 20;
  localparam int unsigned PROD_W     = GINE_W + CODE_W - 1;   // Gine * Vo (Vo >= 0)
  localparam int unsigned NUM_W      = CODE_W - 1 + DIV_SHIFT; // iL << DIV_SHIFT

  typedef logic signed [CODE_W-1:0]  code_t;
  typedef logic        [GINE_W-1:0]  gine_t;
  typedef logic        [DUTY_W-1:0]  duty_t;
  typedef logic        [CNT_W-1:0]   cnt_t;

  // One pair of samples taken at the same instant.
  typedef struct packed {
    code_t il;   // input (inductor) current code iL[n]
    code_t vo;   // output voltage code Vo[n]
  } sample_t;

endpackage
