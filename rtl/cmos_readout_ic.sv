// cmos_readout_ic: the CMOS read-out IC, eight channels and a shared controller.
//
// Each channel (readout_channel) reads one LAE array through its own IN pad; all eight
// run in lock step under one digital_ctrl, which also drives the matrix-row-selection
// bus R/Rb[4:0] to the arrays. After every row's conversion the eight 10-bit codes leave
// the chip as one 80-bit serial word on sdo, channel 1 first, MSB first, one bit per
// cycle with sdo_valid high. Parallel arrays on the eight channels multiply the number
// of sensors read with the same row bus.
//
// Interface: i_in_a[k] is the current drawn out of channel k+1's IN pad (amperes);
// cal_req starts the start-up calibration, run_en the continuous acquisition. Timing
// as in digital_ctrl: ROW_CYCLES cycles per row, 32 rows per frame.
//
// The channel count, the per-channel chain and the single R/Rb[4:0] generator follow
// the source design; the sharing of one controller by all channels, the serial order
// and the pin set are own choices.
module cmos_readout_ic
  import cs_pkg::*;
#(
  parameter int unsigned ROW_CYCLES    = 1200,
  parameter int unsigned SETTLE_CYCLES = 600,
  parameter int unsigned CHANNELS      = N_CH
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_req,
  input  logic       run_en,
  input  real        i_in_a [CHANNELS],
  output row_code_t  r_code,
  output row_code_t  rb_code,
  output logic       sdo,
  output logic       sdo_valid,
  output logic       frame_start,
  output logic       cal_done,
  output logic       busy,
  output adc_code_t  adc_code [CHANNELS],
  output idac_code_t idac_code [CHANNELS]
);

  logic                 cal_active, cal_set, cal_decide, cal_write;
  logic [IDAC_BITS-1:0] cal_bit;
  logic                 adc_start, sr_load, sr_shift;
  logic [CHANNELS-1:0]  adc_done;
  logic [CHANNELS:0]    chain;     // chain[k] = sout of channel k; chain[CHANNELS] = 0

  digital_ctrl #(
    .ROW_CYCLES(ROW_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES), .N_CHANNELS(CHANNELS)
  ) u_ctrl (
    .clk, .rst_n, .cal_req, .run_en,
    .adc_done (adc_done[0]),
    .r_code, .rb_code,
    .cal_active, .cal_set, .cal_bit, .cal_decide, .cal_write, .cal_done,
    .adc_start, .sr_load, .sr_shift, .frame_start, .busy
  );

  assign chain[CHANNELS] = 1'b0;

  for (genvar k = 0; k < CHANNELS; k++) begin : g_ch
    readout_channel u_ch (
      .clk, .rst_n,
      .i_in_a     (i_in_a[k]),
      .r_code,
      .cal_active, .cal_set, .cal_bit, .cal_decide, .cal_write,
      .adc_start, .sr_load, .sr_shift,
      .sin        (chain[k+1]),
      .sout       (chain[k]),
      .adc_done   (adc_done[k]),
      .adc_code   (adc_code[k]),
      .idac_code  (idac_code[k])
    );
  end

  assign sdo       = chain[0];
  assign sdo_valid = sr_shift;

  // All channels convert in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) adc_done == '0 || adc_done == '1);

endmodule
