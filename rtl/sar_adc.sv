// sar_adc: 10-bit SAR ADC of one read-out channel.
//
// Joins the successive-approximation register (sar_logic) with the behavioural model of
// the sampling capacitor DAC and comparator (sar_cdac_comparator). start begins a
// conversion of vin; done pulses 12 cycles later with code on result (see sar_logic).
// The analog part is modelled; the SAR register is synthesizable logic.
//
// Resolution, SAR architecture and split DAC follow the source design; cycle timing is
// an own choice.
module sar_adc
  import cs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  real       vin,
  output logic      busy,
  output logic      done,
  output adc_code_t result
);

  logic      sample, comp;
  adc_code_t dac_code;

  sar_logic #(.BITS(ADC_BITS)) u_sar (
    .clk, .rst_n, .start, .comp, .sample, .dac_code, .busy, .done, .result
  );

  sar_cdac_comparator u_cdac (
    .clk, .sample, .vin, .dac_code, .comp
  );

endmodule
