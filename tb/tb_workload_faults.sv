// tb_workload_faults: fault tolerance of the compressed-sensing readout. A 120-sensor
// array is built with 0.1 % of its matrix TFTs open (source-drain open) and 0.1 % shorted
// or leaky, at random positions. With an open branch selected, an access-TFT gate keeps
// the previous row's charge, so the element repeats the previous row; where a short
// makes branches to both rails conduct, the element takes an intermediate value. The IC is calibrated, three sensors
// are pressed (one of them chosen among the sensors whose column the faults corrupt)
// and one frame is read at full row timing. Checks: faults really changed phi; the
// phi formed equals a reference model of the held gates; every code matches
// the reference chain for the phi actually formed; and a brute-force 3-sparse recovery
// using the fault-free phi still finds the pressed sensors and their resistances within
// 10 %.
module tb_workload_faults;
  localparam int NS = 120;
  import cs_pkg::*;
  import tb_ref_pkg::*;
  localparam int RC = 1200;
  localparam real R_OPEN = 200.0e6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cal_req = 0, run_en = 0;
  logic [31:0] rs [NS];
  real ext [7];
  row_code_t r;
  logic sdo, sdo_valid, frame_start, cal_done, busy;
  logic [NS-1:0] phi_col, mixed_col;
  adc_code_t adc_code [8];
  idac_code_t idac_code [8];
  real base [7][32], force_i [7][32];
  logic force_on = 0;

  hybrid_cs_system #(.SENSORS(NS), .OPEN_PPM(PPM), .SHORT_PPM(PPM), .FAULT_SEED(SEED)) u_dut (
    .clk, .rst_n, .cal_req, .run_en, .r_sns_ohm(rs), .i_ext_a(ext), .r_code(r),
    .sdo, .sdo_valid, .frame_start, .cal_done, .busy, .phi_col, .mixed_col, .adc_code, .idac_code);

  always_comb
    for (int k = 0; k < 7; k++) ext[k] = base[k][r] + (force_on ? force_i[k][r] : 0.0);

  always #5 clk = ~clk;

  // mechanism counters
  int n_calw = 0, n_rows = 0, n_conv = 0, n_words = 0, n_push = 0, n_draw = 0;
  int n_sel [3] = '{0, 0, 0};
  int pressed [3] = '{6, 57, 100};
  localparam int PPM = 1000, SEED = 3;

  // Reference column of sensor s with faults: for code c the branches that conduct are
  // c itself and every c ^ (1 << i) whose bit-i TFT is shorted, minus open branches.
  // No conducting branch: the gate keeps the previous row (rows cycle 0..31). Branches
  // to both rails: the element is mixed (reported in mix).
  function automatic logic [31:0] ref_faulty_col(input int s, output logic [31:0] mix);
    logic [31:0]  omask, col;
    logic [159:0] smask;
    logic g, on, off;
    int c, b;
    omask = open_branches(SEED, s, PPM);
    smask = faulty_tfts(SEED + 7919, s, PPM);
    g = 1'b0;
    col = '0;
    mix = '0;
    for (int pass = 0; pass < 2; pass++)
      for (int m = 0; m < 32; m++) begin
        c = int'(control_code(sensor_wiring(s), row_code_t'(m)));
        on = 1'b0; off = 1'b0;
        if (!omask[c]) begin if (BRANCH_ON[c]) on = 1'b1; else off = 1'b1; end
        for (int i = 0; i < 5; i++) begin
          b = c ^ (1 << i);
          if (smask[b*5 + i] && !omask[b]) begin if (BRANCH_ON[b]) on = 1'b1; else off = 1'b1; end
        end
        if (on || off) g = on;
        col[m] = g;
        mix[m] = on && off;
      end
    return col;
  endfunction
  real r_press [3] = '{55.7e3, 54.4e3, 19.3e3};
  row_code_t r_q;
  logic [NS-1:0] phio [32];    // phi columns actually formed, per row
  logic [NS-1:0] mixo [32];    // sensors whose gate sat between the rails, per row
  always @(posedge clk) begin
    if (rst_n && u_dut.u_ic.u_ctrl.sr_load && force_on) begin
      phio[r] <= phi_col;
      mixo[r] <= mixed_col;
    end
    r_q <= r;
    if (rst_n && u_dut.u_ic.u_ctrl.cal_write) n_calw++;
    if (rst_n && r != r_q) n_rows++;
    if (rst_n && u_dut.u_ic.adc_done[0]) n_conv++;
    if (u_dut.u_ic.u_ctrl.sr_load && force_on) begin
      for (int k = 0; k < 8; k++) if (idac_code[k][6]) n_draw++; else if (idac_code[k] != 0) n_push++;
      for (int p = 0; p < 3; p++) if (phi_col[pressed[p]]) n_sel[p]++;
    end
  end

  real y [32];    // channel-1 measurements in amperes (offset removed)
  real ich0 [32]; // channel-1 current of each row with no force (calibration condition)
  logic phim [32][NS];

  // Least-squares fit of y on the columns in sup; returns residual and conductances.
  function automatic real fit3(input int sup [3], output real g [3]);
    real a [3][3], b [3], det, res, m [3][3];
    for (int i = 0; i < 3; i++) begin
      b[i] = 0.0;
      for (int j = 0; j < 3; j++) a[i][j] = 0.0;
      for (int k = 0; k < 32; k++) begin
        if (phim[k][sup[i]]) b[i] += y[k];
        for (int j = 0; j < 3; j++) if (phim[k][sup[i]] && phim[k][sup[j]]) a[i][j] += 1.0;
      end
    end
    det = a[0][0]*(a[1][1]*a[2][2]-a[1][2]*a[2][1]) - a[0][1]*(a[1][0]*a[2][2]-a[1][2]*a[2][0])
        + a[0][2]*(a[1][0]*a[2][1]-a[1][1]*a[2][0]);
    if (det < 0.5 && det > -0.5) begin g = '{0.0, 0.0, 0.0}; return 1.0e9; end
    for (int c = 0; c < 3; c++) begin
      m = a;
      for (int i = 0; i < 3; i++) m[i][c] = b[i];
      g[c] = (m[0][0]*(m[1][1]*m[2][2]-m[1][2]*m[2][1]) - m[0][1]*(m[1][0]*m[2][2]-m[1][2]*m[2][0])
            + m[0][2]*(m[1][0]*m[2][1]-m[1][1]*m[2][0])) / det;
    end
    res = 0.0;
    for (int k = 0; k < 32; k++) begin
      real e;
      e = y[k];
      for (int i = 0; i < 3; i++) if (phim[k][sup[i]]) e -= g[i];
      res += e * e;
    end
    return res;
  endfunction

  initial begin
    int o [7][32];
    int nbits, row, exp, got, frame_cycles, nframes;
    logic [79:0] word;
    real best, g [3], gb [3];
    int bs [3], sup [3];
    for (int s = 0; s < NS; s++) rs[s] = 32'(int'(R_OPEN));
    // Press a sensor whose column the faults corrupt (the lowest such index).
    for (int s = 0; s < NS; s++) begin
      logic [31:0] nom, mx;
      for (int m = 0; m < 32; m++) nom[m] = phi(row_code_t'(m), s);
      if (s != 57 && s != 100 && (ref_faulty_col(s, mx) != nom || mx != 0)) begin
        pressed[0] = s;
        break;
      end
    end
    pressed.sort();
    $display("pressed sensors (1-based): %0d %0d %0d", pressed[0] + 1, pressed[1] + 1, pressed[2] + 1);
    for (int k = 0; k < 7; k++)
      for (int m = 0; m < 32; m++) begin
        base[k][m]    = (real'($urandom_range(0, 40000)) - 10000.0) * 1e-9;
        force_i[k][m] = real'($urandom_range(0, 70000)) * 1e-9;
        o[k][m] = ref_cal(base[k][m], 341);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cal_req = 1;
    @(negedge clk); cal_req = 0;
    wait (cal_done);
    // press three sensors
    @(negedge clk);
    for (int p = 0; p < 3; p++) rs[pressed[p]] = 32'(int'(r_press[p]));
    force_on = 1; run_en = 1;
    @(posedge clk); #1;
    while (!frame_start) begin @(posedge clk); #1; end
    frame_cycles = 0; nframes = 0; nbits = 0; row = 0;
    while (nframes == 0) begin
      if (sdo_valid) begin
        word = {word[78:0], sdo};
        nbits++;
        if (nbits == 80) begin
          real ich1;
          n_words++;
          // channel 1: the LAE array (calibrated offset is zero current here)
          ich1 = 0.0;
          ich0[row] = 0.0;
          for (int s = 0; s < NS; s++) begin
            int src [5];
            wiring_t w;
            w = sensor_wiring(s);
            for (int b = 0; b < 5; b++) src[b] = int'(w[3*b +: 3]);
            phim[row][s] = ref_phi(32'h9AE5_3CA6, src, row);
            if (mixo[row][s]) begin
              ich1 += contention_level(SEED, s) * 0.4 / (real'(rs[s]) + 1500.0);
              ich0[row] += contention_level(SEED, s) * 0.4 / (R_OPEN + 1500.0);
            end else if (phio[row][s]) begin
              ich1 += 0.4 / (real'(rs[s]) + 1500.0);
              ich0[row] += 0.4 / (R_OPEN + 1500.0);
            end
          end
          got = int'(word[79 -: 10]);
          exp = ref_code(ich1 + ref_idac(ref_cal(ich0[row], 341)));
          checks++;
          if (got < exp - 1 || got > exp + 1) begin
            failures++; $display("FAIL ch1 row %0d code %0d expected %0d", row, got, exp);
          end
          y[row] = (real'(got) + 0.5 - 341.33) * (1.2 / 1024.0) / 1.0e4;
          for (int k = 1; k < 8; k++) begin
            got = int'(word[79 - 10*k -: 10]);
            exp = ref_code(base[k-1][row] + force_i[k-1][row] + ref_idac(o[k-1][row]));
            checks++;
            if (got < exp - 1 || got > exp + 1) begin
              failures++; $display("FAIL ch%0d row %0d code %0d expected %0d", k + 1, row, got, exp);
            end
          end
          nbits = 0; row++;
        end
      end
      @(posedge clk); #1;
      frame_cycles++;
      if (frame_start) nframes++;
    end
    checks++;
    if (frame_cycles != 32 * RC) begin failures++; $display("FAIL frame took %0d cycles", frame_cycles); end
    // Faults changed phi, and phi matches the independent fault model element by element.
    begin
      int nchanged, nmixed;
      nchanged = 0; nmixed = 0;
      for (int m = 0; m < 32; m++)
        for (int s = 0; s < NS; s++) begin
          if (phio[m][s] != phim[m][s]) nchanged++;
          if (mixo[m][s]) nmixed++;
        end
      $display("faulty phi elements: %0d flipped, %0d intermediate, of %0d", nchanged, nmixed, 32 * NS);
      for (int s2 = 0; s2 < NS; s2++) begin
        logic [31:0] rc, rm;
        rc = ref_faulty_col(s2, rm);
        for (int m = 0; m < 32; m++) begin
          checks++;
          if (phio[m][s2] != rc[m] || mixo[m][s2] != rm[m]) begin
            failures++; $display("FAIL phi(%0d,%0d) differs from the fault model", m, s2);
          end
        end
      end
      begin
        int np;
        np = 0;
        for (int m = 0; m < 32; m++) if (phio[m][pressed[0]] != phim[m][pressed[0]] || mixo[m][pressed[0]]) np++;
        $display("faulty elements in the column of pressed sensor %0d: %0d", pressed[0] + 1, np);
        checks++; if (np == 0) begin failures++; $display("FAIL pressed sensor column not corrupted"); end
      end
      checks++; if (nchanged == 0) begin failures++; $display("FAIL no element flipped by faults"); end
      checks++; if (nmixed == 0) begin failures++; $display("FAIL no intermediate element"); end
    end
    // Brute-force 3-sparse recovery of channel 1.
    best = 1.0e30;
    for (int a = 0; a < NS; a++)
      for (int b = a + 1; b < NS; b++)
        for (int c = b + 1; c < NS; c++) begin
          real res;
          sup = '{a, b, c};
          res = fit3(sup, g);
          if (res < best) begin best = res; bs = sup; gb = g; end
        end
    checks++;
    if (bs != pressed) begin
      failures++; $display("FAIL recovered sensors %0d %0d %0d", bs[0] + 1, bs[1] + 1, bs[2] + 1);
    end else begin
      for (int p = 0; p < 3; p++) begin
        real rr;
        rr = 0.4 / gb[p] - 1500.0;
        $display("sensor S%0d: %.1f kOhm recovered, %.1f kOhm applied", pressed[p] + 1, rr / 1e3, r_press[p] / 1e3);
        checks++;
        if (rr > r_press[p] * 1.10 || rr < r_press[p] * 0.90) begin
          failures++; $display("FAIL sensor S%0d resistance off by more than 10 %%", pressed[p] + 1);
        end
      end
    end
    $display("mechanisms: cal writes %0d, row switches %0d, conversions %0d, serial words %0d, I-DAC push %0d draw %0d, selections %0d %0d %0d",
             n_calw, n_rows, n_conv, n_words, n_push, n_draw, n_sel[0], n_sel[1], n_sel[2]);
    checks++; if (n_calw != 32) begin failures++; $display("FAIL calibration writes"); end
    checks++; if (n_rows < 32) begin failures++; $display("FAIL row switches"); end
    checks++; if (n_conv == 0) begin failures++; $display("FAIL no conversions"); end
    checks++; if (n_words != 32) begin failures++; $display("FAIL serial words"); end
    checks++; if (n_push == 0 || n_draw == 0) begin failures++; $display("FAIL an I-DAC bank unused"); end
    for (int p = 0; p < 3; p++) begin
      checks++; if (n_sel[p] == 0) begin failures++; $display("FAIL pressed sensor never selected"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
