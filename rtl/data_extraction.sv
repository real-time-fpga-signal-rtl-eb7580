// data_extraction: finds the bunch in the first NSAMP samples of the ADC rate
// buffer and defines the window used for the amplitude calculation.
//
// After `start`, addresses 0..NSAMP-1 are read one per clock (read data
// arrives one clock later). A sample exceeds the threshold when its magnitude
// |x| is above `threshold`; the first sample index at which any of the four
// channels does so is the threshold position t0 (`found` is set). The window
// is PRETRIGGER samples before t0 and POSTTRIGGER samples from t0 on:
//   [max(t0 - pretrig, 0), min(t0 + posttrig, NSAMP))
// given as win_start/win_len (win_len is 0 when nothing crossed). The peak
// magnitude of each channel over the NSAMP samples is reported for the
// interlock. `done` pulses NSAMP+3 clocks after `start`.
// The batch size, the threshold rule (any channel, first crossing) and the
// PRETRIGGER/POSTTRIGGER window follow the original design; comparing the magnitude
// rather than the signed value and the exact window bounds are this design's
// reading of it.
module data_extraction
  import sp_pkg::*;
#(
  parameter int unsigned NSAMP  = 150,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  peak_t             threshold,
  input  logic [ADDR_W-1:0] pretrig,
  input  logic [ADDR_W-1:0] posttrig,
  output logic [ADDR_W-1:0] rd_addr,
  input  sample_vec_t       rd_data,
  output logic              done,
  output logic              found,
  output logic [ADDR_W-1:0] t0,
  output logic [ADDR_W-1:0] win_start,
  output logic [ADDR_W-1:0] win_len,
  output peak_vec_t         peak
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN, S_WIN} state_t;
  state_t            state;
  logic [ADDR_W-1:0] idx;        // index of the sample on rd_data
  logic              rd_valid;   // rd_data holds a requested sample
  peak_vec_t         mag;
  logic              over;

  always_comb begin
    over = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      mag[c] = rd_data[c][ADC_W-1] ? peak_t'(-rd_data[c]) : peak_t'(rd_data[c]);
      if (mag[c] > threshold) over = 1'b1;
    end
  end

  // Window bounds, computed one bit wider to clamp at 0 and NSAMP.
  logic [ADDR_W:0] lo, hi;
  always_comb begin
    lo = ({1'b0, t0} >= {1'b0, pretrig}) ? {1'b0, t0} - {1'b0, pretrig} : '0;
    hi = {1'b0, t0} + {1'b0, posttrig};
    if (hi > (ADDR_W+1)'(NSAMP)) hi = (ADDR_W+1)'(NSAMP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_addr   <= '0;
      idx       <= '0;
      rd_valid  <= 1'b0;
      done      <= 1'b0;
      found     <= 1'b0;
      t0        <= '0;
      win_start <= '0;
      win_len   <= '0;
      peak      <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= (state == S_SCAN);
      if (rd_valid) begin
        for (int c = 0; c < NCH; c++)
          if (mag[c] > peak[c]) peak[c] <= mag[c];
        if (over && !found) begin
          found <= 1'b1;
          t0    <= idx;
        end
        idx <= idx + 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_SCAN;
          rd_addr  <= '0;
          idx      <= '0;
          found    <= 1'b0;
          t0       <= '0;
          peak     <= '0;
        end
        S_SCAN: begin
          if (rd_addr == ADDR_W'(NSAMP - 1)) begin
            state <= S_WIN;
          end else begin
            rd_addr <= rd_addr + 1'b1;
          end
        end
        S_WIN: begin
          // The last sample is on rd_data now; t0 settles at this edge.
          state <= S_DRAIN;
        end
        S_DRAIN: begin
          state     <= S_IDLE;
          done      <= 1'b1;
          win_start <= found ? lo[ADDR_W-1:0] : '0;
          win_len   <= found ? ADDR_W'(hi - lo) : '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
