// trigger_delay: internal trigger delay in front of the ADC rate buffers.
//
// An external trigger pulse (trig_in, one clock wide) starts a down-counter
// loaded with `delay`; when it runs out, trig_out pulses for one clock. The
// delay positions the bunch inside the acquired ADC rate buffer. The delay
// itself is a control-system parameter in the original system. This
// design's choices: the counter width; the latency, trig_out rising delay+1
// clock edges after the edge that samples trig_in; and that a trigger
// arriving while one is pending is ignored and flagged on `dropped`.
module trigger_delay #(
  parameter int unsigned DLY_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig_in,
  input  logic [DLY_W-1:0] delay,
  output logic             trig_out,
  output logic             dropped
);

  logic             pending;
  logic [DLY_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      cnt      <= '0;
      trig_out <= 1'b0;
      dropped  <= 1'b0;
    end else begin
      trig_out <= 1'b0;
      dropped  <= 1'b0;
      if (pending) begin
        if (cnt == '0) begin
          pending  <= 1'b0;
          trig_out <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
        if (trig_in) dropped <= 1'b1;
      end else if (trig_in) begin
        pending <= 1'b1;
        cnt     <= delay;
      end
    end
  end

endmodule
