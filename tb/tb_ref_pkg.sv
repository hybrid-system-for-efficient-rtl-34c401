// tb_ref_pkg: reference models used by the testbenches to work out expected values
// independently of the design: the TIA/ADC transfer, the I-DAC current of a search
// value, the start-up offset search and the phi matrix element taken straight from the
// branch table and wiring definitions.
package tb_ref_pkg;

  // ADC code of a current drawn from the TIA input (0.4 V + 10 kOhm * i, 1.2 V full scale).
  function automatic int ref_code(input real i_draw);
    real v, x;
    v = 0.4 + 10.0e3 * i_draw;
    if (v < 0.0) v = 0.0;
    if (v > 1.2) v = 1.2;
    x = v * 1024.0 / 1.2;
    if (x >= 1023.0) return 1023;
    return int'($floor(x));
  endfunction

  // Net current drawn by the I-DAC for offset-binary search value o (64 = none).
  function automatic real ref_idac(input int o);
    int n;
    n = o - 64;
    if (n < -63) n = -63;
    return real'(n) * 0.5e-6;
  endfunction

  // Start-up search: largest o (bit by bit) whose code does not exceed the target.
  function automatic int ref_cal(input real i_base, input int target);
    int o;
    o = 0;
    for (int b = 6; b >= 0; b--) begin
      o = o | (1 << b);
      if (ref_code(i_base + ref_idac(o)) > target) o = o & ~(1 << b);
    end
    return o;
  endfunction

  // I-DAC word for search value o: {bank, magnitude}.
  function automatic int ref_word(input int o);
    if (o >= 64) return 64 + (o - 64);
    if (o == 0)  return 63;
    return 64 - o;
  endfunction

  // phi(row, sensor) from a wiring list: C[i] = ~R[src[i]], element = branch table[C].
  function automatic bit ref_phi(input logic [31:0] branch, input int src [5], input int row);
    int c;
    c = 0;
    for (int i = 0; i < 5; i++) if (((row >> src[i]) & 1) == 0) c |= (1 << i);
    return branch[c];
  endfunction

endpackage
