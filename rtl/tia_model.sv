// tia_model: behavioural model of the transimpedance amplifier of one channel.
// This is a behavioural model of an analog block, not synthesizable logic.
//
// The two-stage op-amp holds its inverting input at V_BIAS = 0.4 V, which biases every
// selected sensor at 0.4 V. All current drawn out of the input node (sensor currents
// to ground plus the I-DAC current) must come through the 10 kOhm feedback resistor,
// so v_out = V_BIAS + R_FB * i_draw_a, limited to the 0 .. 1.2 V supply range. VOS is an
// input-referred offset, zero by default.
//
// Timing: ideal and instantaneous; the op-amp bandwidth and its stability with 500 pF
// of input capacitance are not modelled.
//
// Bias, feedback resistor and topology follow the source design; the output range is
// an own choice (equal to the 1.2 V supply).
module tia_model
  import cs_pkg::*;
#(
  parameter real RF   = R_FB,
  parameter real VB   = V_BIAS,
  parameter real VOS  = 0.0,
  parameter real VMAX = ADC_VREF
) (
  input  real i_draw_a,
  output real v_out
);

  real v;

  always_comb begin
    v = VB + VOS + RF * i_draw_a;
    if (v < 0.0)  v = 0.0;
    if (v > VMAX) v = VMAX;
    v_out = v;
  end

endmodule
