// sar_cdac_comparator: behavioural model of the analog core of the 10-bit SAR ADC.
// This is a behavioural model of an analog block, not synthesizable logic.
//
// The real circuit samples the input onto a split capacitor DAC (a 5-bit main array
// and a 5-bit sub array joined by a bridge capacitor) and compares the top-plate
// voltage with a 0.6 V reference. Here the split DAC is taken as ideal: during a cycle
// with sample high the input is tracked and it is held from the clock edge that ends
// that cycle; comp is 1 when the held input is at or above dac_code * VREF / 1024.
//
// Interface: clk, sample and dac_code come from the SAR logic; vin from the TIA.
//
// The 5b/5b split structure follows the source design (modelled as ideal); the full
// scale of 1.2 V and the ideal linearity are own choices.
module sar_cdac_comparator
  import cs_pkg::*;
#(
  parameter real VREF = ADC_VREF
) (
  input  logic      clk,
  input  logic      sample,
  input  real       vin,
  input  adc_code_t dac_code,
  output logic      comp
);

  real vhold;

  always_ff @(posedge clk) begin
    if (sample) vhold <= vin;
  end

  assign comp = vhold >= real'(dac_code) * (VREF / real'(1 << ADC_BITS));

endmodule
