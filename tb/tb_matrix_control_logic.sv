// tb_matrix_control_logic: checks the TFT matrix-control function of sensors 1 and 20.
// Sensor 20 is checked against the six published truth-table rows, and both sensors
// over all 32 row codes against a wiring-list reference. Rb is driven as the
// complement of R. A third instance with open branches 0 and 31 must leave its gate
// undriven exactly when one of those branches is selected. A fourth instance with the
// bit-0 TFT of branch 31 shorted must see both rails (branch 30 goes to V_OFF) exactly
// when branch 30 is selected, i.e. for sensor-1 wiring at row 1.
module tb_matrix_control_logic;
  import cs_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  row_code_t r;
  logic g1, g20, go, gs, d1, d20, dopen, ds, x1, x20, xo, xs;
  // wiring: C[4..0] <- Rb[4..0] (sensor 1); C[4..0] <- Rb[2],Rb[0],Rb[4],Rb[1],Rb[3] (sensor 20)
  localparam wiring_t W1  = {3'd4, 3'd3, 3'd2, 3'd1, 3'd0};
  localparam wiring_t W20 = {3'd2, 3'd0, 3'd4, 3'd1, 3'd3};
  int src1  [5] = '{0, 1, 2, 3, 4};
  int src20 [5] = '{3, 1, 4, 0, 2};

  matrix_control_logic #(.WIRING(W1))  u_s1  (.r_code(r), .rb_code(~r), .acc_gate(g1),  .driven(d1), .contention(x1));
  matrix_control_logic #(.WIRING(W20)) u_s20 (.r_code(r), .rb_code(~r), .acc_gate(g20), .driven(d20), .contention(x20));
  matrix_control_logic #(.WIRING(W1), .OPEN(32'h8000_0001)) u_open (
    .r_code(r), .rb_code(~r), .acc_gate(go), .driven(dopen), .contention(xo));
  localparam logic [159:0] SH = 160'(1) << 155;
  matrix_control_logic #(.WIRING(W1), .SHORT(SH)) u_short (
    .r_code(r), .rb_code(~r), .acc_gate(gs), .driven(ds), .contention(xs));

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    // Published rows of the truth table of sensor 20.
    int rows [6] = '{0, 1, 2, 3, 30, 31};
    bit phis [6] = '{1, 1, 0, 1, 0, 0};
    for (int k = 0; k < 6; k++) begin
      r = row_code_t'(rows[k]); #1;
      expect_bit($sformatf("sensor20 row %0d", rows[k]), g20, phis[k]);
    end
    for (int row = 0; row < 32; row++) begin
      r = row_code_t'(row); #1;
      expect_bit($sformatf("sensor1 row %0d", row),  g1,  ref_phi(32'h9AE5_3CA6, src1, row));
      expect_bit($sformatf("sensor20 row %0d", row), g20, ref_phi(32'h9AE5_3CA6, src20, row));
      expect_bit($sformatf("driven row %0d", row), d1 & d20, 1'b1);
      // sensor 1 selects branch ~row: branches 31 and 0 are rows 0 and 31
      expect_bit($sformatf("open driven row %0d", row), dopen, (row != 0 && row != 31));
      expect_bit($sformatf("no contention row %0d", row), x1 | x20 | xo, 1'b0);
      expect_bit($sformatf("short driven row %0d", row), ds, 1'b1);
      expect_bit($sformatf("short contention row %0d", row), xs, row == 1);
      expect_bit($sformatf("short gate row %0d", row), gs, (row == 1) ? 1'b1 : ref_phi(32'h9AE5_3CA6, src1, row));
      expect_bit($sformatf("open gate row %0d", row), go, (row != 0 && row != 31) ? ref_phi(32'h9AE5_3CA6, src1, row) : 1'b0);
    end
    // The package's wiring for sensor index 19 must be the published one.
    checks++;
    if (sensor_wiring(19) != W20 || sensor_wiring(0) != W1) begin
      failures++; $display("FAIL package wiring of sensors 1/20");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
