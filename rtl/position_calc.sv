// position_calc: beam position and charge from the four corrected
// amplitudes V'_A..V'_D.
//
// DIAGONAL pickups (S = A+B+C+D):
//   X = K_X*((A+D)-(B+C))/S - X_OFF     Y = K_Y*((A+B)-(C+D))/S - Y_OFF
//   Q = K_Q*((A+C)-(B+D))/S - Q_OFF     SUM = K_SUM*S + SUM_OFF
// ORTHOGONAL pickups:
//   X = K_X*(A-C)/(A+C) - X_OFF         Y = K_Y*(B-D)/(B+D) - Y_OFF
//   SUM = K_SUM*S + SUM_OFF             Q = 0 (no formula defined)
// These formulas and the mode selection follow the original design.
//
// Implementation (this design's choice): on `start` the numerators and
// denominators are formed and three sequential dividers compute the ratios
// r = trunc(n * 2^RATIO_FRAC / d), |r| <= 2^RATIO_FRAC. One more clock scales
// them: X = (K_X * r) >>> RATIO_FRAC - X_OFF, saturated to 32 bits, and
// SUM = (K_SUM * S) >> K_FRAC + SUM_OFF, saturated. A zero denominator gives
// a ratio of 0 and sets `div_zero`. `done` pulses DIV_N+2 clocks after
// `start` (52 with the default widths) and the results hold until the next
// start.
module position_calc
  import sp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  pickup_mode_t mode,
  input  vcorr_vec_t   vc,
  input  geom_cfg_t    geom,
  output logic         done,
  output pos_t         x,
  output pos_t         y,
  output pos_t         q,
  output pos_t         sum,
  output logic         div_zero
);

  localparam int SW    = VC_W + 2;            // width of a sum of four V'
  localparam int DIV_N = SW + RATIO_FRAC;     // dividend width
  localparam int RW    = RATIO_FRAC + 2;      // signed ratio width

  typedef logic signed [SW:0] num_t;          // signed difference

  // Numerators and denominators of the three ratios.
  num_t          n_x, n_y, n_q;
  logic [SW-1:0] d_x, d_y, d_q, s_all;
  always_comb begin
    logic [SW-1:0] a, b, c, d;
    a = SW'(vc[0]);
    b = SW'(vc[1]);
    c = SW'(vc[2]);
    d = SW'(vc[3]);
    s_all = a + b + c + d;
    if (mode == PICKUP_DIAGONAL) begin
      n_x = num_t'({1'b0, a + d}) - num_t'({1'b0, b + c});
      n_y = num_t'({1'b0, a + b}) - num_t'({1'b0, c + d});
      n_q = num_t'({1'b0, a + c}) - num_t'({1'b0, b + d});
      d_x = s_all;
      d_y = s_all;
      d_q = s_all;
    end else begin
      n_x = num_t'({1'b0, a}) - num_t'({1'b0, c});
      n_y = num_t'({1'b0, b}) - num_t'({1'b0, d});
      n_q = '0;
      d_x = a + c;
      d_y = b + d;
      d_q = '0;
    end
  end

  function automatic logic [DIV_N-1:0] mag_shifted(input num_t n);
    logic [SW-1:0] m;
    m = n[SW] ? SW'(-n) : SW'(n);
    return DIV_N'(m) << RATIO_FRAC;
  endfunction

  // Latched per start: signs, mode and the charge sum.
  logic          neg_x, neg_y, neg_q;
  pickup_mode_t  mode_q;
  logic [SW-1:0] s_q;
  logic          busy;

  logic             dn_x, dn_y, dn_q;
  logic [DIV_N-1:0] qu_x, qu_y, qu_q;
  logic             z_x, z_y, z_q;

  seq_divider #(.N(DIV_N), .D(SW)) u_div_x (
    .clk, .rst_n, .start, .dividend(mag_shifted(n_x)), .divisor(d_x),
    .done(dn_x), .quotient(qu_x), .remainder(), .div_zero(z_x));
  seq_divider #(.N(DIV_N), .D(SW)) u_div_y (
    .clk, .rst_n, .start, .dividend(mag_shifted(n_y)), .divisor(d_y),
    .done(dn_y), .quotient(qu_y), .remainder(), .div_zero(z_y));
  seq_divider #(.N(DIV_N), .D(SW)) u_div_q (
    .clk, .rst_n, .start, .dividend(mag_shifted(n_q)), .divisor(d_q),
    .done(dn_q), .quotient(qu_q), .remainder(), .div_zero(z_q));

  function automatic logic signed [RW-1:0] ratio(input logic [DIV_N-1:0] qu,
                                                  input logic zero, input logic neg);
    logic signed [RW-1:0] r;
    r = zero ? '0 : RW'(qu);
    return neg ? -r : r;
  endfunction

  function automatic pos_t sat(input logic signed [63:0] v);
    if (v > 64'sd2147483647)       return pos_t'(32'sh7fffffff);
    else if (v < -64'sd2147483648) return pos_t'(32'sh80000000);
    else                           return pos_t'(v);
  endfunction

  function automatic pos_t scale(input logic [KPOS_W-1:0] k,
                                 input logic signed [RW-1:0] r, input pos_t off);
    logic signed [63:0] p;
    p = $signed({32'b0, k}) * 64'(r);
    return sat((p >>> RATIO_FRAC) - 64'(off));
  endfunction

  logic signed [RW-1:0] r_x, r_y, r_q;
  always_comb begin
    r_x = ratio(qu_x, z_x, neg_x);
    r_y = ratio(qu_y, z_y, neg_y);
    r_q = ratio(qu_q, z_q, neg_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_x    <= 1'b0;
      neg_y    <= 1'b0;
      neg_q    <= 1'b0;
      mode_q   <= PICKUP_DIAGONAL;
      s_q      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      x        <= '0;
      y        <= '0;
      q        <= '0;
      sum      <= '0;
      div_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        neg_x  <= n_x[SW];
        neg_y  <= n_y[SW];
        neg_q  <= n_q[SW];
        mode_q <= mode;
        s_q    <= s_all;
        busy   <= 1'b1;
      end else if (busy && dn_x) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        x        <= scale(geom.kx, r_x, geom.x_off);
        y        <= scale(geom.ky, r_y, geom.y_off);
        q        <= (mode_q == PICKUP_DIAGONAL) ? scale(geom.kq, r_q, geom.q_off) : '0;
        sum      <= sat(64'((64'(s_q) * 64'(geom.ksum)) >> K_FRAC) + 64'(geom.sum_off));
        div_zero <= z_x | z_y | ((mode_q == PICKUP_DIAGONAL) & z_q);
      end
    end
  end

  // The three dividers run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) dn_x == dn_y && dn_x == dn_q);

endmodule
