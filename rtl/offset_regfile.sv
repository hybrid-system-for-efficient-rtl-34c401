// offset_regfile: 32-word register file of per-row I-DAC offset codes.
//
// Each word holds the 7-bit I-DAC code applied while one matrix row is read. The words
// are written during start-up calibration (no force on the sensors) and read once per
// row during normal acquisition.
//
// Interface: one synchronous write port (we, waddr, wdata) and one combinational read
// port (raddr -> rdata). A write is visible on rdata the cycle after it. Reset clears
// every word to code 0 (PMOS bank, zero units: no correction current).
//
// The word count and width follow the source design; port style and reset value are
// own choices.
module offset_regfile
  import cs_pkg::*;
#(
  parameter int unsigned WORDS = M_ROWS,
  parameter int unsigned WIDTH = IDAC_BITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
