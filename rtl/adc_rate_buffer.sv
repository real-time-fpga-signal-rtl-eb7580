// adc_rate_buffer: ADC rate buffer holding DEPTH samples of each of the four
// channels acquired after a trigger.
//
// A `start` pulse (ignored while a capture runs) writes the next DEPTH clock
// samples of all four channels, side by side, into addresses 0..DEPTH-1 of a
// single-port memory; `done` pulses when the last sample is written and
// `full` stays high until the next start. The contents can be read at any
// time on rd_addr/rd_data with one clock of latency. The original design gives the
// size (4 x 1024 samples) and the role; the one-sample-per-clock write, the
// memory organisation and the handshake are this design's choices. The
// system uses two of these: one read by the host computer, one by the
// single-pass calculation.
module adc_rate_buffer
  import sp_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sample_vec_t       adc,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              full,
  input  logic [ADDR_W-1:0] rd_addr,
  output sample_vec_t       rd_data
);

  sample_vec_t       mem [DEPTH];
  logic [ADDR_W-1:0] wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      full    <= 1'b0;
      wr_addr <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (wr_addr == ADDR_W'(DEPTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          full <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end else if (start) begin
        busy    <= 1'b1;
        full    <= 1'b0;
        wr_addr <= '0;
      end
    end
  end

  // Memory write and read, no reset so it maps onto block RAM.
  always_ff @(posedge clk) begin
    if (busy) mem[wr_addr] <= adc;
    rd_data <= mem[rd_addr];
  end

endmodule
