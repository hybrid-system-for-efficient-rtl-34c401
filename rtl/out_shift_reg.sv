// out_shift_reg: per-channel output shift register for ADC codes.
//
// load copies the channel's 10-bit ADC code in parallel. Each shift cycle moves the
// register one place towards the MSB: sout always shows the current MSB and sin enters
// at the LSB. Chaining sout of channel k+1 into sin of channel k makes the eight
// channels one 80-bit serial register: the chip output first carries the code of
// channel 1, MSB first, then channel 2, and so on.
//
// Timing: load and shift act at the clock edge; load wins if both are high.
//
// A shift register per channel follows the source design; bit order, chaining order
// and the load/shift controls are own choices.
module out_shift_reg
  import cs_pkg::*;
#(
  parameter int unsigned WIDTH = ADC_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] pdata,
  input  logic             shift,
  input  logic             sin,
  output logic             sout
);

  logic [WIDTH-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= pdata;
    else if (shift) q <= {q[WIDTH-2:0], sin};
  end

  assign sout = q[WIDTH-1];

endmodule
