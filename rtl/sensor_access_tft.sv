// sensor_access_tft: behavioural model of one force sensor and its access TFT.
// This is a behavioural model of a thin-film device pair, not synthesizable logic.
//
// The sensor (resistance r_sns_ohm, falling as force rises) is in series with the
// access TFT between ground and the shared CS output wire, which the TIA holds at
// V_BIAS. With the gate at V_ON the TFT conducts with RACC; with the gate at V_OFF it
// is taken as RACC_OFF. i_draw_a is the current drawn out of the TIA input.
//
// Timing: instantaneous.
//
// The series sensor/access-TFT arrangement, 0.4 V bias and 1.5 kOhm on-resistance follow
// the source design; the off-resistance is an own choice.
module sensor_access_tft
  import cs_pkg::*;
#(
  parameter real RACC     = R_ACC,
  parameter real RACC_OFF = R_ACC_OFF
) (
  input  logic        acc_gate,
  input  logic [31:0] r_sns_ohm,
  output real         i_draw_a
);

  assign i_draw_a = V_BIAS / (real'(r_sns_ohm) + (acc_gate ? RACC : RACC_OFF));

endmodule
