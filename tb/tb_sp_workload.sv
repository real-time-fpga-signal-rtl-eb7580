// tb_sp_workload: laboratory-style run of the single-pass processor at its
// default sizes: a fixed off-centre beam seen at several signal levels and
// at several trigger spacings.
//
// Signal levels: bursts of 600 to 24000 ADC counts peak with 40 counts of
// noise (levels in ADC counts; no charge calibration is implied). For each
// level 40 bunches are processed; the mean X and Y must match the position
// given by the button amplitude ratios, and the spread (RMS) of X must fall
// as the signal grows. Trigger spacings: a spacing longer than the
// processing time must give one record per trigger with no ignored
// trigger; a shorter spacing must give fewer records, each one following
// an ignored trigger flagged in STATUS bit 5, and records plus ignored
// triggers must account for every trigger.
module tb_sp_workload;
  import sp_pkg::*;

  localparam int DELAY = 20;

  logic         clk = 1'b0, rst_n = 1'b0;
  sample_vec_t  adc;
  logic         trig_in = 1'b0, cnt_sync_reset = 1'b0;
  logic [15:0]  trig_delay = 16'(DELAY);
  peak_t        threshold = 16'd300;
  logic [9:0]   pretrig = 10'd2, posttrig = 10'd43;
  kgain_vec_t   kgain;
  pickup_mode_t pickup_mode = PICKUP_DIAGONAL;
  geom_cfg_t    geom;
  il_cfg_t      il_cfg;
  logic [7:0]   gbe_raw_n = 8'd0;
  logic         gbe_init = 1'b0;
  logic [9:0]   sbc_rd_addr = '0;
  sample_vec_t  sbc_rd_data;
  logic         sbc_buf_full;
  sp_result_t   result;
  logic         result_valid, il_out;
  logic [31:0]  gbe_tdata;
  logic         gbe_tvalid, gbe_tready, gbe_tlast, busy;

  libera_sp_top dut (.*);

  int          checks = 0, failures = 0;
  int unsigned cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  assign gbe_tready = 1'b1;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ADC scene: one burst per trigger, 30 samples into the batch
  int  burst_at = -1000000;
  real amp [NCH];
  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      real v;
      int  k;
      k = int'(cycle) - burst_at;
      v = 40.0 * (($urandom_range(0, 2000) / 1000.0) - 1.0);
      if (k >= 0 && k < 90)
        v += amp[c] * $exp(-k / 18.0) * $sin(2.0 * 3.14159265 * 0.23 * k + 0.4);
      adc[c] = sample_t'($rtoi(v));
    end
  end

  // records seen
  int   n_rec = 0, n_rec_ovr = 0;
  real  sx = 0, sxx = 0, sy = 0, syy = 0;
  always @(posedge clk) if (result_valid) begin
    n_rec++;
    if (result.status[ST_OVERRUN]) n_rec_ovr++;
    sx  += real'(result.x);
    sxx += real'(result.x) * real'(result.x);
    sy  += real'(result.y);
    syy += real'(result.y) * real'(result.y);
  end

  task automatic fire();
    @(negedge clk);
    trig_in = 1'b1;
    burst_at = int'(cycle) + DELAY + 3 + 30;
    @(negedge clk);
    trig_in = 1'b0;
  endtask

  // button amplitudes of the beam: X ratio ((A+D)-(B+C))/S = 0.1, Y ratio 0
  real rel [NCH] = '{1.05, 0.95, 0.85, 1.15};

  initial begin
    real rms_prev, lvl [5];
    lvl = '{600.0, 1500.0, 4000.0, 10000.0, 24000.0};
    for (int c = 0; c < NCH; c++) kgain[c] = 18'd65536;
    geom = '0;
    geom.kx = 32'd10_000_000; geom.ky = 32'd10_000_000; geom.kq = 32'd10_000_000;
    geom.ksum = 18'd65536;
    il_cfg = '0;
    il_cfg.x_min = -32'sd2_000_000; il_cfg.x_max = 32'sd2_000_000;
    il_cfg.y_min = -32'sd2_000_000; il_cfg.y_max = 32'sd2_000_000;
    il_cfg.peak_max = 16'hffff;
    il_cfg.il_on = 1'b1;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // ---- signal levels
    rms_prev = 1.0e12;
    foreach (lvl[i]) begin
      real mx, my, rms, rms_y, tol_x, tol_y;
      for (int c = 0; c < NCH; c++) amp[c] = lvl[i] * rel[c];
      n_rec = 0; sx = 0; sxx = 0; sy = 0; syy = 0;
      for (int b = 0; b < 40; b++) begin
        fire();
        while (!result_valid) @(negedge clk);
        while (busy) @(negedge clk);
        repeat (10) @(negedge clk);
      end
      mx  = sx / n_rec;
      my  = sy / n_rec;
      rms = $sqrt(sxx / n_rec - mx * mx);
      rms_y = $sqrt(syy / n_rec - my * my);
      // four standard errors of the mean plus 0.05 % of the scale
      tol_x = 4.0 * rms / $sqrt(real'(n_rec)) + 5_000.0;
      tol_y = 4.0 * rms_y / $sqrt(real'(n_rec)) + 5_000.0;
      $display("level %6.0f counts: mean X %9.0f  mean Y %9.0f  RMS X %7.0f (units of K_X/1e7 per ratio)",
               lvl[i], mx, my, rms);
      check(n_rec == 40, $sformatf("records %0d of 40", n_rec));
      // ratio 0.1 -> X = 1 000 000, ratio 0 -> Y = 0
      check(mx > 1_000_000.0 - tol_x && mx < 1_000_000.0 + tol_x, $sformatf("mean X %0f", mx));
      check(my > -tol_y && my < tol_y, $sformatf("mean Y %0f", my));
      check(rms < rms_prev, $sformatf("RMS X %0f did not fall below %0f", rms, rms_prev));
      rms_prev = rms;
    end

    // ---- trigger spacings
    for (int c = 0; c < NCH; c++) amp[c] = 8000.0 * rel[c];
    for (int s = 0; s < 3; s++) begin
      int spacing, n_trig;
      spacing = (s == 0) ? 4000 : (s == 1) ? 1400 : 900;
      n_trig = 30;
      while (busy) @(negedge clk);
      repeat (50) @(negedge clk);
      n_rec = 0; n_rec_ovr = 0;
      for (int t = 0; t < n_trig; t++) begin
        fire();
        repeat (spacing - 2) @(negedge clk);
      end
      while (busy) @(negedge clk);
      repeat (20) @(negedge clk);
      $display("spacing %0d clocks: %0d triggers, %0d records, %0d flagged after an ignored trigger",
               spacing, n_trig, n_rec, n_rec_ovr);
      if (spacing >= 1400) begin
        check(n_rec == n_trig, $sformatf("spacing %0d: %0d records", spacing, n_rec));
        check(n_rec_ovr == 0, "no trigger ignored");
      end else begin
        check(n_rec < n_trig && n_rec > 0, $sformatf("spacing %0d: %0d records", spacing, n_rec));
        check(n_rec_ovr > 0, "ignored triggers flagged");
        // each ignored trigger falls between two records (or after the last)
        check(n_trig - n_rec >= n_rec_ovr && n_trig - n_rec <= n_rec_ovr + 1,
              $sformatf("ignored %0d, flagged records %0d", n_trig - n_rec, n_rec_ovr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
