// sar_logic: successive-approximation register of the 10-bit SAR ADC.
//
// A conversion starts with a one-cycle start pulse. The next cycle asserts sample, in
// which the capacitor DAC tracks and then holds the input. Then one bit is decided per
// cycle, MSB first: the trial code (bits decided so far plus the current bit set) is
// driven on dac_code, and the comparator answer comp (1 = input at or above the DAC
// level) keeps or clears the bit at the clock edge. After the LSB, result holds the
// code and done pulses for one cycle.
//
// Timing: start high in cycle t -> sample in t+1 -> bits in t+2 .. t+11 -> done high in
// cycle t+12. With a 1.2 MHz clock this is 100 kS/s when starts are issued back to
// back (12 cycles per conversion). A start while busy is ignored.
//
// The 10-bit resolution and 100 kS/s rate follow the source design; the cycle budget,
// clock and handshake are own choices.
module sar_logic
  import cs_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            comp,
  output logic            sample,
  output logic [BITS-1:0] dac_code,
  output logic            busy,
  output logic            done,
  output logic [BITS-1:0] result
);

  typedef enum logic [1:0] {S_IDLE, S_SAMPLE, S_CONV} state_t;

  state_t                    state;
  logic [BITS-1:0]           sar;
  logic [$clog2(BITS)-1:0]   bit_idx;
  logic [BITS-1:0]           decided;

  assign sample   = (state == S_SAMPLE);
  assign busy     = (state != S_IDLE);
  assign dac_code = sar;

  // Trial result with the current bit kept or cleared.
  always_comb begin
    decided = sar;
    if (!comp) decided[bit_idx] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sar     <= '0;
      bit_idx <= '0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_SAMPLE;
        S_SAMPLE: begin
          sar          <= '0;
          sar[BITS-1]  <= 1'b1;
          bit_idx      <= ($clog2(BITS))'(BITS - 1);
          state        <= S_CONV;
        end
        S_CONV: begin
          if (bit_idx == '0) begin
            sar    <= decided;
            result <= decided;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            sar              <= decided;
            sar[bit_idx - 1] <= 1'b1;
            bit_idx          <= bit_idx - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
