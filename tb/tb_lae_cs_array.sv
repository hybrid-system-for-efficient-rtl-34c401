// tb_lae_cs_array: 20-sensor array with random sensor resistances. For every row code
// the CS-output current must equal the sum of 0.4 V / (R + 1.5 kOhm) over the sensors
// whose phi element is 1; sensor 20's column must match the published truth-table
// rows, and every pair of sensors must have different columns.
module tb_lae_cs_array;
  import cs_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  row_code_t r;
  logic [31:0] rs [20];
  real i;
  logic [19:0] col, mixed;
  logic [31:0] colbits [20];

  lae_cs_array #(.SENSORS(20)) u_dut (.r_code(r), .rb_code(~r), .r_sns_ohm(rs), .i_out_a(i), .phi_col(col), .mixed_col(mixed));

  initial begin
    for (int s = 0; s < 20; s++) begin
      rs[s] = 32'($urandom_range(15000, 100000));
      colbits[s] = '0;
    end
    for (int row = 0; row < 32; row++) begin
      real e;
      r = row_code_t'(row); #1;
      e = 0.0;
      for (int s = 0; s < 20; s++) begin
        int src [5];
        wiring_t w;
        w = sensor_wiring(s);
        for (int b = 0; b < 5; b++) src[b] = int'(w[3*b +: 3]);
        if (ref_phi(32'h9AE5_3CA6, src, row)) e += 0.4 / (real'(rs[s]) + 1500.0);
        checks++;
        if (col[s] !== ref_phi(32'h9AE5_3CA6, src, row)) begin failures++; $display("FAIL phi(%0d,%0d)", row, s); end
        colbits[s][row] = col[s];
      end
      checks++;
      if (mixed != '0) begin failures++; $display("FAIL contention without faults"); end
      checks++;
      if (i > e + 1e-9 || i < e - 1e-9) begin failures++; $display("FAIL row %0d i=%g expected %g", row, i, e); end
    end
    // Published truth-table rows of sensor 20.
    checks++;
    if (colbits[19][0] != 1 || colbits[19][1] != 1 || colbits[19][2] != 0 || colbits[19][3] != 1 ||
        colbits[19][30] != 0 || colbits[19][31] != 0) begin
      failures++; $display("FAIL sensor 20 truth table");
    end
    for (int s = 0; s < 20; s++)
      for (int t = 0; t < s; t++) begin
        checks++;
        if (colbits[s] == colbits[t]) begin failures++; $display("FAIL sensors %0d and %0d share a column", s, t); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
