// sp_pkg: types and constants shared by the single-pass beam position
// processing chain.
//
// The four pickup channels are kept in the order A, B, C, D (index 0..3).
// ADC samples are 16-bit two's complement. The fixed-point formats below are
// this design's choice. They are sized so that nothing overflows for
// 150-sample windows of full-scale 16-bit data:
//   sum of squares   40 bits unsigned  (150 * 2^30 < 2^38)
//   amplitude V      20 bits unsigned  (square root of the above)
//   K_A..K_D, K_SUM  18 bits unsigned, 16 fractional bits (0 .. <4.0)
//   corrected V'     24 bits unsigned
//   position ratio   signed, RATIO_FRAC fractional bits, |ratio| <= 1
//   K_X, K_Y, K_Q    32 bits unsigned, result units per unit ratio (e.g. nm)
//   X, Y, Q, SUM     32 bits signed
package sp_pkg;

  localparam int NCH        = 4;
  localparam int ADC_W      = 16;
  localparam int SUMSQ_W    = 40;
  localparam int AMP_W      = 20;
  localparam int K_W        = 18;
  localparam int K_FRAC     = 16;
  localparam int VC_W       = 24;
  localparam int RATIO_FRAC = 24;
  localparam int KPOS_W     = 32;
  localparam int POS_W      = 32;
  localparam int CNT_W      = 16;
  localparam int STATUS_W   = 16;

  typedef logic signed [ADC_W-1:0] sample_t;
  typedef sample_t [NCH-1:0]       sample_vec_t;   // [0]=A [1]=B [2]=C [3]=D
  typedef logic [ADC_W-1:0]        peak_t;         // magnitude of a sample
  typedef peak_t [NCH-1:0]         peak_vec_t;
  typedef logic [SUMSQ_W-1:0]      sumsq_t;
  typedef sumsq_t [NCH-1:0]        sumsq_vec_t;
  typedef logic [AMP_W-1:0]        amp_t;
  typedef amp_t [NCH-1:0]          amp_vec_t;
  typedef logic [K_W-1:0]          kgain_t;
  typedef kgain_t [NCH-1:0]        kgain_vec_t;
  typedef logic [VC_W-1:0]         vcorr_t;
  typedef vcorr_t [NCH-1:0]        vcorr_vec_t;
  typedef logic signed [POS_W-1:0] pos_t;

  // Pickup arrangement, a boot-time selection.
  typedef enum logic {
    PICKUP_DIAGONAL   = 1'b0,
    PICKUP_ORTHOGONAL = 1'b1
  } pickup_mode_t;

  // STATUS word bit positions (this design's encoding).
  localparam int ST_BEAM      = 0;  // a channel exceeded THRESHOLD in the batch
  localparam int ST_ORTHO     = 1;  // ORTHOGONAL formulas were used
  localparam int ST_DIVZERO   = 2;  // a position denominator was zero
  localparam int ST_IL_VIOL   = 3;  // this bunch violated an interlock limit
  localparam int ST_IL_ACTIVE = 4;  // interlock output active after this bunch
  localparam int ST_OVERRUN   = 5;  // a trigger was ignored while busy

  // Geometric coefficients and offsets of the position calculation.
  typedef struct packed {
    logic [KPOS_W-1:0] kx;
    logic [KPOS_W-1:0] ky;
    logic [KPOS_W-1:0] kq;
    kgain_t            ksum;
    pos_t              x_off;
    pos_t              y_off;
    pos_t              q_off;
    pos_t              sum_off;
  } geom_cfg_t;

  // Interlock limits.
  typedef struct packed {
    pos_t    x_min;
    pos_t    x_max;
    pos_t    y_min;
    pos_t    y_max;
    peak_t   peak_max;   // a channel peak above this is a violation
    logic [7:0] filter;  // violations in a row needed before the output fires
    logic    il_on;      // IL_ON enable
  } il_cfg_t;

  // Processed data of one bunch, in stream order.
  typedef struct packed {
    vcorr_t              va;
    vcorr_t              vb;
    vcorr_t              vc;
    vcorr_t              vd;
    pos_t                sum;
    pos_t                q;
    pos_t                x;
    pos_t                y;
    logic [STATUS_W-1:0] status;
    logic [CNT_W-1:0]    counter;
  } sp_result_t;

  localparam int RESULT_WORDS = 10;

endpackage
