// libera_sp_top: FPGA single-pass beam position processing for a four-button
// beam position monitor.
//
// A single bunch passing the pickups leaves a short ringing burst on each of
// the four ADC channels (A, B, C, D). For every external trigger this block
//   1. delays the trigger (trig_delay clocks) and acquires BUF_DEPTH samples
//      per channel into two ADC rate buffers: one kept for the host computer
//      (read on sbc_rd_addr/sbc_rd_data), one used by the calculation;
//   2. scans the first NSAMP samples, finds the first sample above
//      `threshold` on any channel and takes the PRETRIGGER/POSTTRIGGER
//      window around it (data_extraction);
//   3. sums the squares over the window, takes the square root, applies the
//      calibration gains K_A..K_D (amplitude_accumulator, isqrt,
//      gain_correction);
//   4. computes X, Y, Q and SUM for diagonal or orthogonal pickups with
//      scales and offsets (position_calc);
//   5. updates the interlock (interlock) and publishes the record
//      Va, Vb, Vc, Vd, SUM, Q, X, Y, STATUS, COUNTER to the host
//      (`result`, `result_valid`) and to the Gigabit Ethernet payload stream,
//      standard or extended with raw samples (gbe_stream).
// COUNTER is the 16-bit trigger count (trigger_counter), latched when the
// delayed trigger starts the acquisition.
//
// One clock domain, the ADC sample clock; one sample per channel per clock.
// A bunch is processed in about BUF_DEPTH + NSAMP + window + 100 clocks plus
// the time the Ethernet side takes for the packet; triggers that come while
// a bunch is being processed are ignored and flagged in STATUS (ST_OVERRUN).
// The block structure and the formulas follow the original design; the sequencing
// by one controller, the number formats and the STATUS encoding (see
// sp_pkg) are this design's choices.
module libera_sp_top
  import sp_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 1024,
  parameter int unsigned NSAMP     = 150,
  parameter int unsigned IL_HOLD   = 100,
  parameter int unsigned ADDR_W    = $clog2(BUF_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ADC samples and triggers
  input  sample_vec_t       adc,
  input  logic              trig_in,
  input  logic              cnt_sync_reset,
  // control-system parameters
  input  logic [15:0]       trig_delay,
  input  peak_t             threshold,
  input  logic [ADDR_W-1:0] pretrig,
  input  logic [ADDR_W-1:0] posttrig,
  input  kgain_vec_t        kgain,
  input  pickup_mode_t      pickup_mode,
  input  geom_cfg_t         geom,
  input  il_cfg_t           il_cfg,
  input  logic [7:0]        gbe_raw_n,
  input  logic              gbe_init,
  // host computer: raw ADC rate buffer and processed data
  input  logic [ADDR_W-1:0] sbc_rd_addr,
  output sample_vec_t       sbc_rd_data,
  output logic              sbc_buf_full,
  output sp_result_t        result,
  output logic              result_valid,
  // interlock output
  output logic              il_out,
  // Gigabit Ethernet payload stream
  output logic [31:0]       gbe_tdata,
  output logic              gbe_tvalid,
  input  logic              gbe_tready,
  output logic              gbe_tlast,
  output logic              busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_CAPTURE, S_EXTRACT, S_ACCUM, S_SQRT, S_GAIN, S_POS, S_EVAL,
    S_PUBLISH, S_GBE
  } state_t;
  state_t state;

  // ---------------------------------------------------------------- trigger
  logic trig_dly, trig_dropped;
  trigger_delay #(.DLY_W(16)) u_trig_delay (
    .clk, .rst_n, .trig_in, .delay(trig_delay),
    .trig_out(trig_dly), .dropped(trig_dropped));

  logic [CNT_W-1:0] count;
  trigger_counter #(.CNT_W(CNT_W)) u_counter (
    .clk, .rst_n, .trig(trig_in), .sync_reset(cnt_sync_reset), .count);

  // ---------------------------------------------------------------- buffers
  logic raw_busy, raw_done;
  adc_rate_buffer #(.DEPTH(BUF_DEPTH), .ADDR_W(ADDR_W)) u_raw_buf (
    .clk, .rst_n, .adc, .start(trig_dly), .busy(raw_busy), .done(raw_done),
    .full(sbc_buf_full), .rd_addr(sbc_rd_addr), .rd_data(sbc_rd_data));

  logic              calc_start, calc_busy, calc_done, calc_full;
  logic [ADDR_W-1:0] calc_addr, ext_addr, acc_addr, gbe_addr;
  sample_vec_t       calc_data;
  assign calc_start = (state == S_IDLE) && trig_dly;
  adc_rate_buffer #(.DEPTH(BUF_DEPTH), .ADDR_W(ADDR_W)) u_calc_buf (
    .clk, .rst_n, .adc, .start(calc_start), .busy(calc_busy), .done(calc_done),
    .full(calc_full), .rd_addr(calc_addr), .rd_data(calc_data));

  // The calculation buffer's read port belongs to one stage at a time.
  always_comb begin
    unique case (state)
      S_EXTRACT: calc_addr = ext_addr;
      S_ACCUM:   calc_addr = acc_addr;
      default:   calc_addr = gbe_addr;
    endcase
  end

  // ------------------------------------------------------------- extraction
  logic              ext_done, ext_found;
  logic [ADDR_W-1:0] ext_t0, win_start, win_len;
  peak_vec_t         peak;
  data_extraction #(.NSAMP(NSAMP), .ADDR_W(ADDR_W)) u_extract (
    .clk, .rst_n, .start(calc_done), .threshold, .pretrig, .posttrig,
    .rd_addr(ext_addr), .rd_data(calc_data), .done(ext_done),
    .found(ext_found), .t0(ext_t0), .win_start, .win_len, .peak);

  // ------------------------------------------------------------ calculation
  logic       acc_start, acc_done;
  sumsq_vec_t sumsq;
  assign acc_start = (state == S_EXTRACT) && ext_done && ext_found;
  amplitude_accumulator #(.ADDR_W(ADDR_W)) u_accum (
    .clk, .rst_n, .start(acc_start), .win_start, .win_len,
    .rd_addr(acc_addr), .rd_data(calc_data), .done(acc_done), .sumsq);

  logic [NCH-1:0] sqrt_done;
  amp_vec_t       amp;
  for (genvar c = 0; c < NCH; c++) begin : g_sqrt
    isqrt #(.IN_W(SUMSQ_W), .OUT_W(AMP_W)) u_isqrt (
      .clk, .rst_n, .start(acc_done), .radicand(sumsq[c]),
      .done(sqrt_done[c]), .root(amp[c]));
  end

  logic       gain_valid;
  vcorr_vec_t vcorr;
  gain_correction u_gain (
    .clk, .rst_n, .in_valid(sqrt_done[0]), .v(amp), .k(kgain),
    .out_valid(gain_valid), .vc(vcorr));

  logic pos_done, pos_divzero;
  pos_t pos_x, pos_y, pos_q, pos_sum;
  position_calc u_pos (
    .clk, .rst_n, .start(gain_valid), .mode(pickup_mode), .vc(vcorr), .geom,
    .done(pos_done), .x(pos_x), .y(pos_y), .q(pos_q), .sum(pos_sum),
    .div_zero(pos_divzero));

  // --------------------------------------------------------------- interlock
  logic il_eval, il_viol, il_fired;
  interlock #(.IL_HOLD(IL_HOLD)) u_il (
    .clk, .rst_n, .eval(il_eval), .beam(ext_found), .x(pos_x), .y(pos_y),
    .peak, .cfg(il_cfg), .violation(il_viol), .fired(il_fired), .il_out);

  // ---------------------------------------------------------------- record
  logic [CNT_W-1:0] cnt_q;
  logic             overrun;
  sp_result_t       rec;
  always_comb begin
    rec         = '0;
    rec.counter = cnt_q;
    rec.status[ST_BEAM]      = ext_found;
    rec.status[ST_ORTHO]     = (pickup_mode == PICKUP_ORTHOGONAL);
    rec.status[ST_DIVZERO]   = ext_found && pos_divzero;
    rec.status[ST_IL_VIOL]   = il_viol;
    rec.status[ST_IL_ACTIVE] = il_out;
    rec.status[ST_OVERRUN]   = overrun;
    if (ext_found) begin
      rec.va  = vcorr[0];
      rec.vb  = vcorr[1];
      rec.vc  = vcorr[2];
      rec.vd  = vcorr[3];
      rec.sum = pos_sum;
      rec.q   = pos_q;
      rec.x   = pos_x;
      rec.y   = pos_y;
    end
  end

  logic gbe_send, gbe_busy, gbe_ext;
  assign gbe_send = (state == S_PUBLISH);
  gbe_stream #(.NSAMP_MAX(NSAMP), .ADDR_W(ADDR_W)) u_gbe (
    .clk, .rst_n, .init(gbe_init), .cfg_raw_n(gbe_raw_n), .send(gbe_send),
    .result(rec), .busy(gbe_busy), .rd_addr(gbe_addr), .rd_data(calc_data),
    .tdata(gbe_tdata), .tvalid(gbe_tvalid), .tready(gbe_tready),
    .tlast(gbe_tlast), .extended(gbe_ext));

  // -------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt_q        <= '0;
      overrun      <= 1'b0;
      il_eval      <= 1'b0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      il_eval      <= 1'b0;
      result_valid <= 1'b0;
      if ((trig_dly && state != S_IDLE) || trig_dropped) overrun <= 1'b1;
      unique case (state)
        S_IDLE: if (trig_dly) begin
          cnt_q <= count;
          state <= S_CAPTURE;
        end
        S_CAPTURE: if (calc_done) state <= S_EXTRACT;
        S_EXTRACT: if (ext_done) begin
          if (ext_found) begin
            state <= S_ACCUM;
          end else begin
            il_eval <= 1'b1;
            state   <= S_EVAL;
          end
        end
        S_ACCUM: if (acc_done)      state <= S_SQRT;
        S_SQRT:  if (sqrt_done[0])  state <= S_GAIN;
        S_GAIN:  if (gain_valid)    state <= S_POS;
        S_POS:   if (pos_done) begin
          il_eval <= 1'b1;
          state   <= S_EVAL;
        end
        S_EVAL:  state <= S_PUBLISH;
        S_PUBLISH: begin
          result       <= rec;
          result_valid <= 1'b1;
          overrun      <= 1'b0;
          state        <= S_GBE;
        end
        S_GBE: if (!gbe_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The four square roots start together and finish together.
  a_sqrt_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    sqrt_done[0] |-> &sqrt_done);

endmodule
