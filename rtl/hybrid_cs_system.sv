// hybrid_cs_system: the complete hybrid tactile-sensing system.
//
// A large-area array of resistive force sensors is read through a single wire by
// compressed sensing: the LAE array (lae_cs_array) forms, for each of 32 row codes, a
// 0/1 superposition of its sensor currents, and the CMOS IC (cmos_readout_ic) biases
// the wire, removes a per-row offset, digitises each superposition with a 10-bit ADC and
// streams the codes out. A frame is the 32 measurements y = phi x; a PC reconstructs
// the few pressed sensors from it. The LAE array and the IC share only the CS output
// wire and the 5 differential row-selection lines R/Rb[4:0].
//
// The demonstrated array of SENSORS sensors sits on channel 1; channels 2..8 take
// their input currents from the i_ext_a ports (further arrays in parallel).
// OPEN_PPM, SHORT_PPM and FAULT_SEED inject open and shorted/leaky matrix TFTs into the
// array model (default none); mixed_col flags sensors whose gate sits between the rails.
//
// Interface: r_sns_ohm gives each sensor's present resistance (ohms); cal_req starts
// the start-up calibration (to be done with no force), run_en the 31-frame/s
// acquisition; results leave on sdo/sdo_valid (80 bits per row), frame_start marks
// row 0, and adc_code/idac_code/phi_col/mixed_col/r_code are brought out for observation.
module hybrid_cs_system
  import cs_pkg::*;
#(
  parameter int unsigned SENSORS       = N_SENSORS,
  parameter int unsigned ROW_CYCLES    = 1200,
  parameter int unsigned SETTLE_CYCLES = 600,
  parameter int unsigned OPEN_PPM      = 0,
  parameter int unsigned SHORT_PPM     = 0,
  parameter int unsigned FAULT_SEED    = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cal_req,
  input  logic               run_en,
  input  logic [31:0]        r_sns_ohm [SENSORS],
  input  real                i_ext_a [N_CH-1],
  output row_code_t          r_code,
  output logic               sdo,
  output logic               sdo_valid,
  output logic               frame_start,
  output logic               cal_done,
  output logic               busy,
  output logic [SENSORS-1:0] phi_col,
  output logic [SENSORS-1:0] mixed_col,
  output adc_code_t          adc_code [N_CH],
  output idac_code_t         idac_code [N_CH]
);

  row_code_t  rb_code;
  real        i_cs_a;
  real        i_in_a [N_CH];

  lae_cs_array #(.SENSORS(SENSORS), .OPEN_PPM(OPEN_PPM), .SHORT_PPM(SHORT_PPM),
                 .FAULT_SEED(FAULT_SEED)) u_lae (
    .r_code, .rb_code, .r_sns_ohm, .i_out_a(i_cs_a), .phi_col, .mixed_col
  );

  always_comb begin
    i_in_a[0] = i_cs_a;
    for (int k = 1; k < N_CH; k++) i_in_a[k] = i_ext_a[k-1];
  end

  cmos_readout_ic #(
    .ROW_CYCLES(ROW_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES), .CHANNELS(N_CH)
  ) u_ic (
    .clk, .rst_n, .cal_req, .run_en, .i_in_a,
    .r_code, .rb_code, .sdo, .sdo_valid, .frame_start, .cal_done, .busy,
    .adc_code, .idac_code
  );

endmodule
