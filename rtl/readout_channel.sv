// readout_channel: one of the eight read-out channels of the CMOS IC.
//
// Signal path: the channel input IN collects the superimposed sensor currents of one
// LAE array. The TIA holds IN at 0.4 V and turns the current into a voltage; the I-DAC
// adds a per-row correction current at the same node so that, with no force applied,
// each row reads the same code (CAL_TARGET, by default the code of the bare 0.4 V
// bias). The 10-bit SAR ADC digitises the TIA output and the shift register carries the
// code off chip, chained with the other channels.
//
// Offset correction: the register file holds one I-DAC code per row. During start-up
// calibration the channel keeps a 7-bit search value cal_off (offset binary, 64 = no
// current); digital_ctrl sets one bit on trial (cal_set), and after a conversion
// (cal_decide) the bit is cleared if the ADC code lies above CAL_TARGET. cal_write stores
// the converted code for the current row. Outside calibration the I-DAC takes the
// register-file word of the row on r_code.
//
// Interface: control signals come from digital_ctrl; i_in_a is the current drawn out
// of IN by the LAE array (amperes); sin/sout form the serial chain. adc_code and
// idac_code are brought out for observation.
//
// Block list and values (32-word register file, 7-bit I-DAC, 10 kOhm TIA, 10-bit SAR
// ADC, shift register) follow the source design. The search method, target code and
// the coding of the I-DAC word are own choices. TIA, I-DAC and the ADC's analog core are
// behavioural models; the register file, search register, SAR logic and shift register
// are synthesizable.
module readout_channel
  import cs_pkg::*;
#(
  parameter adc_code_t CAL_TARGET = ideal_adc(V_BIAS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  i_in_a,
  input  row_code_t            r_code,
  input  logic                 cal_active,
  input  logic                 cal_set,
  input  logic [IDAC_BITS-1:0] cal_bit,
  input  logic                 cal_decide,
  input  logic                 cal_write,
  input  logic                 adc_start,
  input  logic                 sr_load,
  input  logic                 sr_shift,
  input  logic                 sin,
  output logic                 sout,
  output logic                 adc_done,
  output adc_code_t            adc_code,
  output idac_code_t           idac_code
);

  logic [IDAC_BITS-1:0] cal_off;
  idac_code_t           rf_code;
  real                  i_dac_a, v_tia;
  logic                 adc_busy;

  // Start-up search of the offset code, one bit per trial.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cal_off <= '0;
    else if (cal_write)              cal_off <= '0;
    else if (cal_set)                cal_off <= cal_off | cal_bit;
    else if (cal_decide && adc_code > CAL_TARGET)
                                     cal_off <= cal_off & ~cal_bit;
  end

  offset_regfile #(.WORDS(M_ROWS), .WIDTH(IDAC_BITS)) u_regfile (
    .clk, .rst_n,
    .we    (cal_write),
    .waddr (r_code),
    .wdata (idac_from_offset(cal_off)),
    .raddr (r_code),
    .rdata (rf_code)
  );

  assign idac_code = cal_active ? idac_from_offset(cal_off) : rf_code;

  idac_model u_idac (.code(idac_code), .i_draw_a(i_dac_a));

  tia_model u_tia (.i_draw_a(i_in_a + i_dac_a), .v_out(v_tia));

  sar_adc u_adc (
    .clk, .rst_n, .start(adc_start), .vin(v_tia),
    .busy(adc_busy), .done(adc_done), .result(adc_code)
  );

  out_shift_reg #(.WIDTH(ADC_BITS)) u_sreg (
    .clk, .rst_n, .load(sr_load), .pdata(adc_code), .shift(sr_shift), .sin, .sout
  );

  // A conversion is never started while the previous one runs.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) adc_start |-> !adc_busy);

endmodule
