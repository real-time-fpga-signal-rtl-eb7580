// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// `start` loads dividend and divisor; `done` pulses N+1 clocks later with
// quotient = floor(dividend / divisor) and remainder. A zero divisor gives an
// all-ones quotient and sets `div_zero`. Used by the position calculation for
// its difference-over-sum ratios.
module seq_divider #(
  parameter int unsigned N = 50,   // dividend and quotient width
  parameter int unsigned D = 26    // divisor width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [D-1:0] divisor,
  output logic         done,
  output logic [N-1:0] quotient,
  output logic [D-1:0] remainder,
  output logic         div_zero
);

  logic [D-1:0]           dvs;
  logic [$clog2(N+1):0]   steps;
  logic                   busy;

  logic [D:0] shifted;
  always_comb shifted = {remainder, quotient[N-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvs       <= '0;
      quotient  <= '0;
      remainder <= '0;
      steps     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      div_zero  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dvs       <= divisor;
        quotient  <= dividend;
        remainder <= '0;
        steps     <= ($clog2(N+1)+1)'(N);
        busy      <= 1'b1;
        div_zero  <= (divisor == '0);
      end else if (busy) begin
        if (shifted >= {1'b0, dvs}) begin
          remainder <= D'(shifted - {1'b0, dvs});
          quotient  <= {quotient[N-2:0], 1'b1};
        end else begin
          remainder <= shifted[D-1:0];
          quotient  <= {quotient[N-2:0], 1'b0};
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
