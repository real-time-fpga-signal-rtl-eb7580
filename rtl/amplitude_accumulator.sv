// amplitude_accumulator: sum of squared samples of each channel over the
// extracted window, the radicand of the amplitude formula
//   V = sqrt( sum_{n = window} x[n]^2 ).
//
// After `start` it reads win_len consecutive buffer addresses from win_start
// on, one per clock (read data arrives one clock later), squares the four
// samples and adds them to four SUMSQ_W-bit accumulators. `done` pulses
// win_len+3 clocks after `start` and `sumsq` then holds the sums; with
// win_len = 0 the sums are zero. Squaring and summing over the window
// follow the original design; the one-sample-per-clock schedule and widths are this
// design's choices (SUMSQ_W = 40 holds 150 full-scale squares without overflow).
module amplitude_accumulator
  import sp_pkg::*;
#(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] win_start,
  input  logic [ADDR_W-1:0] win_len,
  output logic [ADDR_W-1:0] rd_addr,
  input  sample_vec_t       rd_data,
  output logic              done,
  output sumsq_vec_t        sumsq
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LAST, S_DONE} state_t;
  state_t            state;
  logic [ADDR_W-1:0] left;      // addresses still to be issued
  logic              rd_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rd_addr  <= '0;
      left     <= '0;
      rd_valid <= 1'b0;
      done     <= 1'b0;
      sumsq    <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= (state == S_READ);
      if (rd_valid) begin
        for (int c = 0; c < NCH; c++)
          sumsq[c] <= sumsq[c] + SUMSQ_W'(unsigned'(32'(rd_data[c]) * 32'(rd_data[c])));
      end
      unique case (state)
        S_IDLE: if (start) begin
          sumsq   <= '0;
          rd_addr <= win_start;
          left    <= win_len;
          state   <= (win_len == '0) ? S_LAST : S_READ;
        end
        S_READ: begin
          if (left == ADDR_W'(1)) state <= S_LAST;
          else rd_addr <= rd_addr + 1'b1;
          left <= left - 1'b1;
        end
        S_LAST: state <= S_DONE;   // last read data is being added
        S_DONE: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
