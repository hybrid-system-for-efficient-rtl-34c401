// matrix_control_logic: logic function of one sensor's TFT matrix-control network.
//
// The network has 32 branches of 5 series matrix TFTs between the access-TFT gate and
// one of two rails, V_ON or V_OFF. The TFT of bit i in branch b is gated by C[i] when
// bit i of b is 1 and by Cb[i] when it is 0, so exactly one branch conducts for a
// complementary control pair C/Cb: the branch b = C. Which rail each branch reaches is
// the same for every sensor (cs_pkg::BRANCH_ON). The sensors differ only in how their
// C/Cb pins are wired to the row-selection bus R/Rb[4:0] (parameter WIRING), so one
// row code enables a different subset of access TFTs for every sensor: one 0/1 row of
// the measurement matrix phi.
//
// Interface: r_code/rb_code are the R and Rb halves of the row-selection bus (Rb is
// expected to be the complement of R); acc_gate is 1 when the access-TFT gate is pulled
// to V_ON. Purely combinational: the gate follows the row code in the same cycle.
//
// Follows the source design: the branch structure, the per-sensor rewiring, the
// wiring of sensors 1 and 20 and six truth-table entries of sensor 20. Own choice: the
// remaining branch-to-rail assignments.
//
// Faults (both default to none): OPEN marks branches that contain a matrix TFT with an
// open source-drain path; such a branch never conducts. SHORT marks single TFTs (bit
// 5*b+i = TFT of bit i in branch b) with a source-drain short or gate leakage; such a
// TFT conducts whatever its gate, so its branch also conducts for the code that differs
// in that bit. driven is 0 when no branch conducts (an open branch is selected, or R and
// Rb are not complementary): the gate floats and the caller decides what it holds
// (lae_cs_array keeps the previous row's charge). contention is 1 when branches to
// both rails conduct: the gate then sits between V_ON and V_OFF.
module matrix_control_logic
  import cs_pkg::*;
#(
  parameter wiring_t             WIRING = sensor_wiring(0),
  parameter logic [M_ROWS-1:0]   BRANCH = BRANCH_ON,
  parameter logic [M_ROWS-1:0]   OPEN   = '0,
  parameter logic [N_MTFT-1:0]   SHORT  = '0
) (
  input  row_code_t r_code,
  input  row_code_t rb_code,
  output logic      acc_gate,
  output logic      driven,
  output logic      contention
);

  row_code_t          c, cb;       // control pins of the network
  logic [M_ROWS-1:0]  conduct;     // branch b has all 5 TFTs on

  always_comb begin
    for (int i = 0; i < R_BITS; i++) begin
      c[i]  = rb_code[WIRING[3*i +: 3]];
      cb[i] = r_code[WIRING[3*i +: 3]];
    end
  end

  always_comb begin
    for (int b = 0; b < M_ROWS; b++) begin
      conduct[b] = 1'b1;
      for (int i = 0; i < R_BITS; i++)
        conduct[b] = conduct[b] & (SHORT[b*R_BITS + i] | (b[i] ? c[i] : cb[i]));
    end
  end

  logic pull_on, pull_off;

  // The conducting branch ties the gate to its rail.
  assign pull_on    = |(conduct & BRANCH & ~OPEN);
  assign pull_off   = |(conduct & ~BRANCH & ~OPEN);
  assign acc_gate   = pull_on;
  assign driven     = pull_on | pull_off;
  assign contention = pull_on & pull_off;

endmodule
