// Idle-tone sensitive_word duty-word detector.
//
// A sigma-delta DPWM that removes SD_BITS = n - m low bits from an n-bit duty
// word produces its strongest low-frequency periodic pattern (idle tone) for
// words one code away from a multiple of 2**(n-m):
//     d = I * 2**(n-m) +- 1,   q_th <= I <= 2**m - q_th
// where m = n - SD_BITS is the DPWM counter width and q_th bounds the central
// "floor" of the input range. The flag lets the system see when the duty word
// sits on such a code (for example to trim the reference away from it). The
// rule follows the published analysis; doing the check in hardware as a status flag is
// this design's choice. Purely combinational.
module idle_tone_detector
  import trimode_pkg::*;
#(
  parameter int unsigned N_IN = DUTY_W,   // n: duty word bits
  parameter int unsigned N_SD = SD_BITS,  // n - m: bits shaped by the modulator
  parameter int unsigned Q_TH = 8         // central-floor threshold q_th
) (
  input  logic [N_IN-1:0] d,
  output logic            sensitive_word
);

  localparam int unsigned M = N_IN - N_SD;

  logic [N_SD-1:0] low;
  logic [M:0]      idx;   // I, one bit wider than the DPWM word

  always_comb begin
    low = d[N_SD-1:0];
    if (low == N_SD'(1))
      idx = {1'b0, d[N_IN-1:N_SD]};
    else
      idx = {1'b0, d[N_IN-1:N_SD]} + 1'b1;
    sensitive_word = ((low == N_SD'(1)) || (low == {N_SD{1'b1}}))
             && (idx >= (M+1)'(Q_TH))
             && (idx <= (M+1)'((1 << M) - Q_TH));
  end

endmodule
