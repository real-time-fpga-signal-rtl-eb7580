// interlock: per-bunch position and charge interlock.
//
// On each `eval` pulse (once per processed trigger) a violation is raised if
// any channel peak is above cfg.peak_max, or, when the bunch was found
// (`beam`), if X or Y lies outside [min, max]. A filter counts violations on
// consecutive evaluations; when it reaches cfg.filter (0 is taken as 1) the
// interlock fires and stays active for the next IL_HOLD evaluations, a
// further firing restarting the hold. The output is the filtered state
// gated by the enable cfg.il_on, one clock after `eval`.
// From the original design: checking the input peaks and the position in both
// planes, the filtering parameter, the hold of 100 triggers, the IL_ON
// enable. This design's choices: limits as min/max windows, "consecutive"
// violations for the filter, and the position check being skipped when no
// bunch crossed the threshold.
module interlock
  import sp_pkg::*;
#(
  parameter int unsigned IL_HOLD = 100
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      eval,
  input  logic      beam,
  input  pos_t      x,
  input  pos_t      y,
  input  peak_vec_t peak,
  input  il_cfg_t   cfg,
  output logic      violation,   // registered violation of the last evaluation
  output logic      fired,       // pulses when the filter fires
  output logic      il_out
);

  localparam int HOLD_W = $clog2(IL_HOLD + 1);

  logic              pos_bad, peak_bad, viol;
  logic [7:0]        run;        // consecutive violations so far
  logic [7:0]        need;
  logic [HOLD_W-1:0] hold;

  always_comb begin
    pos_bad  = beam && (x < cfg.x_min || x > cfg.x_max || y < cfg.y_min || y > cfg.y_max);
    peak_bad = 1'b0;
    for (int c = 0; c < NCH; c++)
      if (peak[c] > cfg.peak_max) peak_bad = 1'b1;
    viol = pos_bad | peak_bad;
    need = (cfg.filter == '0) ? 8'd1 : cfg.filter;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= '0;
      hold      <= '0;
      violation <= 1'b0;
      fired     <= 1'b0;
    end else begin
      fired <= 1'b0;
      if (eval) begin
        violation <= viol;
        if (viol && ({1'b0, run} + 9'd1 >= {1'b0, need})) begin
          hold  <= HOLD_W'(IL_HOLD);
          fired <= 1'b1;
        end else if (hold != '0) begin
          hold <= hold - 1'b1;
        end
        if (!viol)               run <= '0;
        else if (run != 8'hff)   run <= run + 1'b1;
      end
    end
  end

  assign il_out = cfg.il_on && (hold != '0);

endmodule
