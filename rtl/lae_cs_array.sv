// lae_cs_array: the large-area-electronics compression array.
// This is a behavioural model (the sensors and TFTs are analog thin-film devices); the
// matrix-control logic inside it is the synthesizable description of the TFT networks.
//
// Every sensor has its own matrix-control network and access TFT. All of them share
// the row-selection bus R/Rb[4:0] and one output wire, the CS output, that goes to the
// TIA input of a CMOS channel. For row code r the wire carries the sum of the currents
// of the sensors whose phi(r, s) is 1, so 32 row codes give 32 superpositions y = phi x
// of the N sensor conductances, from which a sparse force pattern is reconstructed off
// chip.
//
// Interface: r_code/rb_code from the CMOS IC; r_sns_ohm[s] is the present resistance of
// sensor s (ohms); i_out_a the current drawn out of the TIA input (amperes); phi_col
// shows which access TFTs are on. Timing: combinational.
//
// Optional fault model (OPEN_PPM > 0): matrix TFTs with an open source-drain path,
// drawn at random with rate OPEN_PPM per million (cs_pkg::open_branches). When the
// selected branch of a sensor is open, nothing drives its access-TFT gate and the gate
// keeps the charge of the previous row, so phi(row, s) repeats phi(row-1, s). That
// charge is held in a latch per sensor (g_sns[s].gate_q), which stands on purpose: it
// models the floating gate. With the default OPEN_PPM = 0 every row is driven and the
// latch is transparent.
//
// SHORT_PPM > 0 adds matrix TFTs with a source-drain short or gate leakage. When such a
// TFT makes branches to both rails conduct, the gate settles in between and the sensor
// contributes only a fraction of its current: a fixed level in (0,1) per sensor
// (cs_pkg::contention_level). mixed_col flags those sensors for the present row.
//
// N_SENSORS defaults to the 20 of the demonstrated array; with 120 distinct wirings the
// 32-row code supports up to 120 sensors. Follows the source design except for the
// wiring of sensors other than 1 and 20 and the branch table entries it does not give.
module lae_cs_array
  import cs_pkg::*;
#(
  parameter int unsigned SENSORS    = N_SENSORS,
  parameter int unsigned OPEN_PPM   = 0,
  parameter int unsigned SHORT_PPM  = 0,
  parameter int unsigned FAULT_SEED = 1
) (
  input  row_code_t           r_code,
  input  row_code_t           rb_code,
  input  logic [31:0]         r_sns_ohm [SENSORS],
  output real                 i_out_a,
  output logic [SENSORS-1:0]  phi_col,
  output logic [SENSORS-1:0]  mixed_col
);

  real i_s [SENSORS];

  for (genvar s = 0; s < SENSORS; s++) begin : g_sns
    logic gate_now, driven, gate_q;
    real  i_full;

    matrix_control_logic #(
      .WIRING (sensor_wiring(s)),
      .OPEN   (open_branches(FAULT_SEED, s, OPEN_PPM)),
      .SHORT  (shorted_tfts(FAULT_SEED, s, SHORT_PPM))
    ) u_mcl (
      .r_code, .rb_code, .acc_gate(gate_now), .driven, .contention(mixed_col[s])
    );

    // Charge on the access-TFT gate: follows the network while it is driven.
    always_latch begin
      if (driven) gate_q = gate_now;
    end
    assign phi_col[s] = gate_q;

    sensor_access_tft u_sns (
      .acc_gate(phi_col[s]), .r_sns_ohm(r_sns_ohm[s]), .i_draw_a(i_full)
    );

    // A gate held between the rails passes part of the sensor current.
    assign i_s[s] = mixed_col[s] ? contention_level(FAULT_SEED, s) * V_BIAS / (real'(r_sns_ohm[s]) + R_ACC)
                                 : i_full;
  end

  // Currents of all sensors superimpose on the CS output wire.
  always_comb begin
    i_out_a = 0.0;
    for (int s = 0; s < SENSORS; s++) i_out_a = i_out_a + i_s[s];
  end

  initial assert (SENSORS >= 1 && SENSORS <= 120)
    else $error("lae_cs_array: 1 to 120 sensors have distinct wirings");

endmodule
