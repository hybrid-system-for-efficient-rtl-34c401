// idac_model: behavioural model of the 7-bit offset-correction current DAC.
// This is a behavioural model of an analog block, not synthesizable logic.
//
// The I-DAC has two banks of six binary-weighted current sources (unit, 2x .. 32x),
// one of PMOS devices that push current into the TIA input and one of NMOS devices
// that draw current out of it. Code bit 6 selects the bank (1 = NMOS, draw), bits 5:0
// enable the weighted sources. Output i_draw_a is the current drawn out of the TIA
// input node in amperes (negative when the PMOS bank pushes current in).
//
// Timing: combinational, no settling modelled.
//
// The two six-bit banks follow the source design; the unit current (0.5 uA, read from
// the measured ADC-code-versus-I-DAC-code slope) and bank-select coding are own choices.
module idac_model
  import cs_pkg::*;
#(
  parameter real LSB_A = IDAC_LSB_A
) (
  input  idac_code_t code,
  output real        i_draw_a
);

  real mag;

  always_comb begin
    mag = 0.0;
    for (int b = 0; b < IDAC_MAG; b++)
      if (code[b]) mag = mag + LSB_A * real'(1 << b);
    i_draw_a = code[IDAC_BITS-1] ? mag : -mag;
  end

endmodule
