// trigger_counter: CNT_W-bit count of triggers (bunches).
//
// Each `trig` pulse adds one, wrapping at 2^CNT_W. A `sync_reset` pulse, an
// external trigger shared by several units, clears it so that their counts
// line up; when both arrive on the same clock the counter clears. The
// 16-bit width and the external reset follow the original design; the priority is
// this design's choice.
module trigger_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic             sync_reset,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (sync_reset) count <= '0;
    else if (trig)       count <= count + 1'b1;
  end

endmodule
