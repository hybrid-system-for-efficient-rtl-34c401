// digital_ctrl: sequencer of the CMOS read-out IC.
//
// It steps the matrix-row-selection code R/Rb[4:0] through the 32 rows of the
// measurement matrix and, for every row, tells the channels when to convert and when
// to shift their results out. It also runs the start-up offset calibration that fills
// each channel's register file.
//
// Acquisition (run_en high, after calibration or without it): every row lasts exactly
// ROW_CYCLES clock cycles (1200 at 1.2 MHz = 1 kHz row rate, 32 rows = 31.25 frames/s).
// At the start of a row the new code is driven on R/Rb and the channels apply the
// offset code stored for that row. After SETTLE_CYCLES the ADCs are started; when they
// finish the results are loaded into the shift registers and shifted out in
// N_CH * ADC_BITS cycles (sr_shift high). The rest of the row is idle. frame_start
// marks the first cycle of row 0.
//
// Calibration (pulse on cal_req while idle, no force on the sensors): for each row the
// channels search the 7-bit offset value bit by bit, MSB first. For every bit the
// controller pulses cal_set (channels set that bit on trial), waits SETTLE_CYCLES,
// converts, and pulses cal_decide (channels clear the bit if the ADC code lies above
// their target). After the LSB it pulses cal_write (channels store the result for the
// row). cal_done goes high when all 32 rows are stored; acquisition may then start.
//
// Follows the source design: 32 codes of R/Rb[4:0], the 1 kHz row rate, one offset code
// per row found at start-up with no force. Own choices: the clock rate, settle time,
// row order (binary count), search method, and the read-out schedule.
module digital_ctrl
  import cs_pkg::*;
#(
  parameter int unsigned ROW_CYCLES    = 1200,
  parameter int unsigned SETTLE_CYCLES = 600,
  parameter int unsigned N_CHANNELS    = N_CH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cal_req,
  input  logic                 run_en,
  input  logic                 adc_done,
  output row_code_t            r_code,
  output row_code_t            rb_code,
  output logic                 cal_active,
  output logic                 cal_set,
  output logic [IDAC_BITS-1:0] cal_bit,
  output logic                 cal_decide,
  output logic                 cal_write,
  output logic                 cal_done,
  output logic                 adc_start,
  output logic                 sr_load,
  output logic                 sr_shift,
  output logic                 frame_start,
  output logic                 busy
);

  localparam int unsigned SHIFT_BITS = N_CHANNELS * ADC_BITS;
  localparam int unsigned CW         = $clog2(ROW_CYCLES + SETTLE_CYCLES + SHIFT_BITS + 2);

  typedef enum logic [3:0] {
    S_IDLE, S_CSET, S_CSETTLE, S_CCONV, S_CDEC, S_CWRITE,
    S_RSETTLE, S_RCONV, S_RLOAD, S_RSHIFT, S_RWAIT
  } state_t;

  state_t                          state;
  row_code_t                       row;
  logic [CW-1:0]                   cyc;        // cycles since the row (or trial) began
  logic [$clog2(IDAC_BITS)-1:0]    bit_idx;
  logic [$clog2(SHIFT_BITS+1)-1:0] nshift;

  assign r_code     = row;
  assign rb_code    = ~row;
  assign cal_active = (state inside {S_CSET, S_CSETTLE, S_CCONV, S_CDEC, S_CWRITE});
  assign busy       = (state != S_IDLE);

  always_comb begin
    cal_bit = '0;
    cal_bit[bit_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      row         <= '0;
      cyc         <= '0;
      bit_idx     <= '0;
      nshift      <= '0;
      cal_set     <= 1'b0;
      cal_decide  <= 1'b0;
      cal_write   <= 1'b0;
      cal_done    <= 1'b0;
      adc_start   <= 1'b0;
      sr_load     <= 1'b0;
      sr_shift    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      cal_set     <= 1'b0;
      cal_decide  <= 1'b0;
      cal_write   <= 1'b0;
      adc_start   <= 1'b0;
      sr_load     <= 1'b0;
      frame_start <= 1'b0;
      cyc         <= cyc + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (cal_req) begin
            row      <= '0;
            bit_idx  <= ($clog2(IDAC_BITS))'(IDAC_BITS - 1);
            cal_done <= 1'b0;
            cal_set  <= 1'b1;
            state    <= S_CSET;
          end else if (run_en) begin
            row         <= '0;
            cyc         <= '0;
            frame_start <= 1'b1;
            state       <= S_RSETTLE;
          end
        end
        // ---------------- start-up calibration ----------------
        S_CSET: begin
          cyc   <= '0;
          state <= S_CSETTLE;
        end
        S_CSETTLE: if (cyc == CW'(SETTLE_CYCLES - 1)) begin
          adc_start <= 1'b1;
          state     <= S_CCONV;
        end
        S_CCONV: if (adc_done) begin
          cal_decide <= 1'b1;
          state      <= S_CDEC;
        end
        S_CDEC: begin
          if (bit_idx == '0) begin
            cal_write <= 1'b1;
            state     <= S_CWRITE;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            cal_set <= 1'b1;
            state   <= S_CSET;
          end
        end
        S_CWRITE: begin
          if (row == row_code_t'(M_ROWS - 1)) begin
            row      <= '0;
            cal_done <= 1'b1;
            state    <= S_IDLE;
          end else begin
            row     <= row + 1'b1;
            bit_idx <= ($clog2(IDAC_BITS))'(IDAC_BITS - 1);
            cal_set <= 1'b1;
            state   <= S_CSET;
          end
        end
        // ---------------- acquisition ----------------
        S_RSETTLE: if (cyc == CW'(SETTLE_CYCLES - 1)) begin
          adc_start <= 1'b1;
          state     <= S_RCONV;
        end
        S_RCONV: if (adc_done) begin
          sr_load <= 1'b1;
          state   <= S_RLOAD;
        end
        S_RLOAD: begin
          sr_shift <= 1'b1;
          nshift   <= '0;
          state    <= S_RSHIFT;
        end
        S_RSHIFT: begin
          nshift <= nshift + 1'b1;
          if (nshift == ($clog2(SHIFT_BITS+1))'(SHIFT_BITS - 1)) begin
            sr_shift <= 1'b0;
            state    <= S_RWAIT;
          end
        end
        S_RWAIT: if (cyc == CW'(ROW_CYCLES - 1)) begin
          cyc <= '0;
          if (row == row_code_t'(M_ROWS - 1)) begin
            row <= '0;
            if (run_en) begin
              frame_start <= 1'b1;
              state       <= S_RSETTLE;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            row   <= row + 1'b1;
            state <= S_RSETTLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The read-out of a row must end before the next row begins.
  initial assert (SETTLE_CYCLES + ADC_BITS + 4 + SHIFT_BITS < ROW_CYCLES)
    else $error("digital_ctrl: ROW_CYCLES too short for settle, conversion and read-out");

endmodule
