// isqrt: integer square root, floor(sqrt(radicand)), one result bit per clock.
//
// Classic digit-by-digit (non-restoring, base 4) method: each clock brings
// down two radicand bits into a partial remainder and tries to subtract
// 4*root+1. `start` loads the radicand; `done` pulses OUT_W+1 clocks later
// with `root` valid (it holds until the next start). Only the function,
// a square root of the sum of squares, comes from the original design; the method
// is this design's choice.
module isqrt #(
  parameter int unsigned IN_W  = 40,
  parameter int unsigned OUT_W = (IN_W + 1) / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IN_W-1:0]  radicand,
  output logic             done,
  output logic [OUT_W-1:0] root
);

  localparam int unsigned RW = 2 * OUT_W;   // radicand width, padded to even

  logic [RW-1:0]            rad;
  logic [OUT_W:0]           rem;
  logic [$clog2(OUT_W+1):0] steps;
  logic                     busy;

  // The remainder never exceeds 2*root, so OUT_W+1 of its bits are kept.
  logic [OUT_W+2:0] trial_rem;
  logic [OUT_W+2:0] trial_sub;
  always_comb begin
    trial_rem = {rem[OUT_W:0], rad[RW-1 -: 2]};
    trial_sub = {1'b0, root, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad   <= '0;
      rem   <= '0;
      root  <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rad   <= RW'(radicand);
        rem   <= '0;
        root  <= '0;
        steps <= ($clog2(OUT_W+1)+1)'(OUT_W);
        busy  <= 1'b1;
      end else if (busy) begin
        rad <= rad << 2;
        if (trial_rem >= trial_sub) begin
          rem  <= (OUT_W+1)'(trial_rem - trial_sub);
          root <= {root[OUT_W-2:0], 1'b1};
        end else begin
          rem  <= (OUT_W+1)'(trial_rem);
          root <= {root[OUT_W-2:0], 1'b0};
        end
        steps <= steps - 1'b1;
        if (steps == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
