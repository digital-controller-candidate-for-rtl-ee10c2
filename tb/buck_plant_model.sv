// Behavioural model (not synthesizable) of the synchronous buck power stage
// and its output ADC, used to close the control loop in simulation.
//
// Power stage: L = 4.7 uH, C = 22 uF, resistive load R_L = 5 ohm plus an
// extra load current i_step (A) set by the testbench, input 3.0 V. The switch
// node is Vin while the high-side gate is on and 0 V otherwise (the low-side
// switch or its body diode carries the inductor current; the diode drop is
// ignored). The state is integrated with forward Euler once per system clock
// of DT_NS nanoseconds; 7.8125 ns is one clock of a 64-clock period at 2 MHz.
// ADC: 10 bits over a 2 V range; Vo is converted at the falling clock edge
// inside the clock where `sample` is high and held until the next sample.
module buck_plant_model #(
  parameter real VIN   = 3.0,
  parameter real L_H   = 4.7e-6,
  parameter real C_F   = 22.0e-6,
  parameter real R_OHM = 5.0,
  parameter real DT_NS = 7.8125,
  parameter real V0    = 0.0      // initial output voltage
) (
  input  logic       clk,
  input  logic       gate_hs,
  input  logic       sample,
  input  real        i_step,      // extra load current, A
  output real        vo,          // output voltage, V
  output real        il,          // inductor current, A
  output logic [9:0] vo_adc       // ADC code of vo
);

  real dt;
  int  code;

  initial begin
    dt     = DT_NS * 1.0e-9;
    vo     = V0;
    il     = 0.0;
    vo_adc = '0;
  end

  always @(posedge clk) begin
    real vsw, dil, dvo;
    vsw = gate_hs ? VIN : 0.0;
    dil = (vsw - vo) / L_H * dt;
    dvo = (il - vo / R_OHM - i_step) / C_F * dt;
    il  = il + dil;
    vo  = vo + dvo;
  end

  // convert in the middle of the sampling clock, ready for its closing edge
  always @(negedge clk) begin
    if (sample) begin
      code = $rtoi(vo / 2.0 * 1024.0);
      if (code < 0) code = 0;
      if (code > 1023) code = 1023;
      vo_adc <= 10'(code);
    end
  end

endmodule
