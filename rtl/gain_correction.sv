// gain_correction: applies the calibration coefficients to the four channel
// amplitudes, V'_i = K_i * V_i.
//
// K_i is unsigned fixed point with K_FRAC fractional bits (1.0 = 2^K_FRAC);
// the product is truncated to VC_W bits, which holds every result since
// V < 2^AMP_W and K < 2^(K_W-K_FRAC). One register stage: `out_valid`
// follows `in_valid` by one clock. The multiplication follows the original
// system; the number format is this design's choice. With the default widths
// the top two bits of each V' are always zero: VC_W keeps that headroom so
// that the position stage need not change if K or V are widened.
module gain_correction
  import sp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  amp_vec_t   v,
  input  kgain_vec_t k,
  output logic       out_valid,
  output vcorr_vec_t vc
);

  localparam int PROD_W = AMP_W + K_W;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      vc        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < NCH; c++)
          vc[c] <= VC_W'((PROD_W'(v[c]) * PROD_W'(k[c])) >> K_FRAC);
    end
  end

endmodule
