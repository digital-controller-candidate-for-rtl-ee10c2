// Shared widths, number formats and types of the tri-mode buck controller.
//
// Number formats used throughout the design:
//   * ADC words (Vref[n], Vo[n]) are unsigned ADC_W-bit codes. With the 2 V
//     input range of the converter front end one code is 2 V / 1024.
//   * The error e[n] = Vref[n] - Vo[n] is a signed ADC_W+1-bit code.
//   * The duty word d[n] handed to the DPWM is an unsigned DUTY_W-bit code
//     (11 bits, the equivalent DPWM resolution). Inside the compensators the
//     duty state keeps D_FRAC extra fraction bits so that small integral
//     steps are not lost between periods.
//   * Compensator coefficients are signed COEF_W-bit fixed-point numbers with
//     COEF_FRAC fraction bits (value = code / 2**COEF_FRAC).
// The 10-bit ADC and 11-bit DPWM widths follow the test-bench specification
// of the controller; the fixed-point formats are this design's own choice.
package trimode_pkg;

  localparam int ADC_W     = 10;  // ADC resolution
  localparam int DUTY_W    = 11;  // equivalent DPWM resolution
  localparam int SD_BITS   = 5;   // bits removed by the sigma-delta modulator
  localparam int COEF_W    = 24;  // coefficient word
  localparam int COEF_FRAC = 14;  // coefficient fraction bits
  localparam int D_FRAC    = 10;  // fraction bits of the duty state

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ADC_W:0]    err_t;
  typedef logic [ADC_W-1:0]         adc_t;
  typedef logic [DUTY_W-1:0]        duty_t;

  // Operating modes of the tri-mode compensator (Mode I, II, III).
  typedef enum logic [1:0] {
    MODE_STANDBY   = 2'd0,  // Mode I  : quarter-rate PID
    MODE_TRANSIENT = 2'd1,  // Mode II : robust RST
    MODE_STEADY    = 2'd2   // Mode III: full-rate PID
  } mode_e;

  // Which compensator drives the DPWM.
  typedef enum logic {
    SEL_PID = 1'b0,
    SEL_RST = 1'b1
  } ctrl_sel_e;

  // d[n] = a1 d[n-1] + a2 d[n-2] + b0 e[n] + b1 e[n-1] + b2 e[n-2]
  typedef struct packed {
    coef_t a1;
    coef_t a2;
    coef_t b0;
    coef_t b1;
    coef_t b2;
  } pid_coef_t;

  // d[n] = sum t_i w[n-i] - sum r_i y[n-i] - s1 d[n-1] - s2 d[n-2]
  typedef struct packed {
    coef_t t0;
    coef_t t1;
    coef_t t2;
    coef_t t3;
    coef_t r0;
    coef_t r1;
    coef_t r2;
    coef_t s1;
    coef_t s2;
  } rst_coef_t;

endpackage
