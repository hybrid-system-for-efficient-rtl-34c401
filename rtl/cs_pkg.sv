// cs_pkg: constants, types and wiring functions shared by the compressed-sensing
// tactile read-out system.
//
// The system reads N resistive force sensors through one wire. Every sensor has an
// access TFT whose gate is set, for each of M = 32 measurement rows, by a small TFT
// switch network (the matrix-control logic). The row is selected by a 5-bit
// differential code R/Rb[4:0]. Each sensor's network is identical; only the wiring
// from R/Rb[4:0] to the network's control pins C/Cb[4:0] differs. This package holds
// the network's branch table, the per-sensor wiring and the analog constants used by
// the behavioural models of the CMOS read-out channel.
//
// Taken from the source design: 5-bit row code, 32 rows, 32 branches of 5 TFTs, the
// wiring of sensors 1 and 20, six branch values of the truth table of sensor 20, a 0.4 V
// sensor bias, 10 kOhm TIA feedback, R_ACC of 1.5 kOhm, 10-bit ADC, 7-bit I-DAC, 8
// channels, 1 kHz row rate. Own choices: the other 26 branch values, the wiring of
// sensors 2..19 (and beyond), ADC full scale (1.2 V), I-DAC LSB (0.5 uA), clock rate.
package cs_pkg;

  localparam int unsigned R_BITS     = 5;             // R/Rb[4:0]
  localparam int unsigned M_ROWS     = 1 << R_BITS;   // 32 rows of phi
  localparam int unsigned ADC_BITS   = 10;
  localparam int unsigned IDAC_BITS  = 7;             // 1 bank-select bit + 6 magnitude bits
  localparam int unsigned IDAC_MAG   = IDAC_BITS - 1;
  localparam int unsigned N_CH       = 8;
  localparam int unsigned N_SENSORS  = 20;

  typedef logic [R_BITS-1:0]    row_code_t;
  typedef logic [ADC_BITS-1:0]  adc_code_t;
  typedef logic [IDAC_BITS-1:0] idac_code_t;

  // Branch table of the matrix-control network: bit c is 1 when the branch that
  // conducts for control code C[4:0] = c is tied to V_ON (access TFT on), 0 when it is
  // tied to V_OFF. Codes 31, 23, 21 -> V_ON and 29, 8, 0 -> V_OFF are fixed by the
  // published truth table of sensor 20; the other bits are a fixed random draw.
  localparam logic [M_ROWS-1:0] BRANCH_ON = 32'h9AE5_3CA6;

  // Analog constants of the behavioural models (volts, ohms, amperes).
  localparam real V_BIAS     = 0.4;      // TIA virtual ground = sensor bias
  localparam real R_FB       = 10.0e3;   // TIA feedback resistor
  localparam real R_ACC      = 1.5e3;    // access-TFT on-resistance (nominal)
  localparam real R_ACC_OFF  = 1.0e12;   // access-TFT off-resistance (assumed)
  localparam real ADC_VREF   = 1.2;      // ADC full scale (assumed = VDD)
  localparam real IDAC_LSB_A = 0.5e-6;   // I-DAC unit current (read from the I-DAC plot)

  // Wiring of one sensor: sel[3*i +: 3] is the index j of the row-code bit wired to
  // control pin i, so that C[i] = Rb[j] and Cb[i] = R[j].
  typedef logic [3*R_BITS-1:0] wiring_t;

  // k-th permutation of {4,3,2,1,0} in lexicographic order of descending symbols,
  // k = 0 being the identity (C[i] <- Rb[i]). Result packed as in wiring_t, with the
  // first symbol of the sequence driving C[4].
  function automatic wiring_t nth_perm(input int unsigned k);
    int unsigned avail [R_BITS];
    int unsigned navail, fact, idx, rem;
    wiring_t w;
    w = '0;
    for (int unsigned i = 0; i < R_BITS; i++) avail[i] = R_BITS - 1 - i;
    navail = R_BITS;
    rem = k % 120;
    for (int p = R_BITS - 1; p >= 0; p--) begin
      fact = 1;
      for (int unsigned f = 2; f <= navail - 1; f++) fact = fact * f;
      idx = rem / fact;
      rem = rem % fact;
      w[3*p +: 3] = 3'(avail[idx]);
      for (int unsigned s = idx; s + 1 < navail; s++) avail[s] = avail[s+1];
      navail--;
    end
    return w;
  endfunction

  // Sensor 20 (index 19) is wired C[4..0] <- Rb[2], Rb[0], Rb[4], Rb[1], Rb[3].
  // In the ordering of nth_perm that wiring is number 67, so sensor index 67 takes
  // number 19 instead and every sensor up to 120 keeps a distinct wiring.
  localparam int unsigned SENSOR20_PERM = 67;

  function automatic wiring_t sensor_wiring(input int unsigned s);
    if (s == 19)                 return nth_perm(SENSOR20_PERM);
    else if (s == SENSOR20_PERM) return nth_perm(19);
    else                         return nth_perm(s);
  endfunction

  // Fault injection for the LAE model. Each of the 160 matrix TFTs of sensor s (TFT t
  // sits in branch t / 5 and is gated by bit t % 5) is faulty with probability
  // ppm / 1e6, drawn from a linear congruential generator seeded by seed and s.
  localparam int unsigned N_MTFT = M_ROWS * R_BITS;

  function automatic logic [N_MTFT-1:0] faulty_tfts(input int unsigned seed,
                                                    input int unsigned s,
                                                    input int unsigned ppm);
    logic [31:0]       x;
    logic [N_MTFT-1:0] mask;
    x    = 32'(seed) * 32'd2654435761 + 32'(s) * 32'd40503 + 32'd1;
    mask = '0;
    for (int unsigned t = 0; t < N_MTFT; t++) begin
      x = x * 32'd1664525 + 32'd1013904223;
      if (int'(x[31:12]) % 1000000 < int'(ppm)) mask[t] = 1'b1;
    end
    return mask;
  endfunction

  // Branches that contain at least one TFT with an open source-drain path.
  function automatic logic [M_ROWS-1:0] open_branches(input int unsigned seed,
                                                      input int unsigned s,
                                                      input int unsigned ppm);
    logic [N_MTFT-1:0] f;
    logic [M_ROWS-1:0] mask;
    f = faulty_tfts(seed, s, ppm);
    for (int unsigned b = 0; b < M_ROWS; b++) mask[b] = |f[b*R_BITS +: R_BITS];
    return mask;
  endfunction

  // TFTs with a source-drain short or gate leakage: they conduct whatever their gate
  // (drawn from a separate stream of the same generator).
  function automatic logic [N_MTFT-1:0] shorted_tfts(input int unsigned seed,
                                                    input int unsigned s,
                                                    input int unsigned ppm);
    return faulty_tfts(seed + 32'd7919, s, ppm);
  endfunction

  // Level, between 0 and 1, that a gate pulled to both rails settles at for sensor s:
  // a fixed uniform draw per sensor.
  function automatic real contention_level(input int unsigned seed, input int unsigned s);
    logic [31:0] x;
    x = (32'(seed) + 32'd104729) * 32'd2654435761 + 32'(s) * 32'd40503 + 32'd7;
    x = x * 32'd1664525 + 32'd1013904223;
    x = x * 32'd1664525 + 32'd1013904223;
    return real'(x[31:8]) / 16777216.0;
  endfunction

  // Control code seen by a sensor's network for row code r (R = r, Rb = ~r).
  function automatic row_code_t control_code(input wiring_t w, input row_code_t r);
    row_code_t c;
    for (int i = 0; i < R_BITS; i++) c[i] = ~r[w[3*i +: 3]];
    return c;
  endfunction

  // Element phi(row, sensor) of the measurement matrix.
  function automatic logic phi(input row_code_t row, input int unsigned s);
    return BRANCH_ON[control_code(sensor_wiring(s), row)];
  endfunction

  // ADC code of a voltage for an ideal converter (floor, clamped).
  function automatic adc_code_t ideal_adc(input real v);
    real x;
    x = v / (ADC_VREF / real'(1 << ADC_BITS));
    if (x < 0.0) return '0;
    if (x >= real'((1 << ADC_BITS) - 1)) return '1;
    return adc_code_t'(int'($floor(x)));
  endfunction

  // I-DAC code: bit 6 = 1 selects the NMOS bank (current drawn out of the TIA input,
  // raising the TIA output), 0 selects the PMOS bank (current pushed in); bits 5:0 the
  // number of unit currents. Conversion from the signed offset-binary value o used by
  // the start-up search: net drawn current = (o - 64) units, clamped to +-63.
  function automatic idac_code_t idac_from_offset(input logic [IDAC_BITS-1:0] o);
    if (o[IDAC_BITS-1]) return {1'b1, o[IDAC_MAG-1:0]};
    else if (o == '0)   return {1'b0, {IDAC_MAG{1'b1}}};
    else                return {1'b0, IDAC_MAG'((1 << IDAC_MAG) - int'(o))};
  endfunction

  // Current drawn out of the TIA input node by an I-DAC code, in amperes.
  function automatic real idac_current(input idac_code_t c);
    real m;
    m = real'(c[IDAC_MAG-1:0]) * IDAC_LSB_A;
    return c[IDAC_BITS-1] ? m : -m;
  endfunction

endpackage
