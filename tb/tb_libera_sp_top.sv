// tb_libera_sp_top: end-to-end test of the single-pass processor at its
// default sizes (1024-sample buffers, 150-sample batch, 100-bunch interlock
// hold).
//
// The testbench plays synthetic bunch signals (decaying 0.23-cycle/sample
// ringing with noise, a different amplitude per button) into the ADC inputs
// and triggers the processor. For every bunch a reference model in the
// testbench, working only from the samples it drove, recomputes the
// threshold position, window, sums of squares, amplitudes, gains,
// positions, interlock state and counter, and the record published to the
// host, the Ethernet payload and the raw buffer read by the host are
// compared with it. The run makes each mechanism happen at least once and
// counts it: bunch found / no bunch, window clamped at sample 0, diagonal
// and orthogonal pickups, zero denominator, trigger ignored while busy and
// while delayed, counter synchronisation reset, interlock filtered / fired /
// expired after the hold / masked by IL_ON, standard and extended Ethernet
// stream with re-initialisation, and receiver back-pressure.
module tb_libera_sp_top;
  import sp_pkg::*;

  localparam int DEPTH  = 1024;
  localparam int NSAMP  = 150;
  localparam int HOLD   = 100;
  localparam int HIST   = 1 << 20;
  localparam int DELAY  = 20;

  logic         clk = 1'b0, rst_n = 1'b0;
  sample_vec_t  adc;
  logic         trig_in = 1'b0, cnt_sync_reset = 1'b0;
  logic [15:0]  trig_delay = 16'(DELAY);
  peak_t        threshold = 16'd500;
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

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------- ADC scene
  sample_vec_t hist [HIST];
  int          burst_at = -1000000;      // cycle of the first burst sample
  real         amp [NCH];
  real         noise [NCH];

  always @(negedge clk) begin
    sample_vec_t s;
    for (int c = 0; c < NCH; c++) begin
      real v;
      int  k;
      k = int'(cycle) - burst_at;
      v = noise[c] * (($urandom_range(0, 2000) / 1000.0) - 1.0);
      if (k >= 0 && k < 90)
        v += amp[c] * $exp(-k / 18.0) * $sin(2.0 * 3.14159265 * 0.23 * k + 0.4);
      if (v > 32767.0)  v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      s[c] = sample_t'($rtoi(v));
    end
    adc = s;
    hist[cycle % HIST] = s;
  end

  // ----------------------------------------------------- Ethernet receiver
  logic [31:0] gbe_got [$];
  int          n_stall = 0;
  always @(negedge clk) gbe_tready <= ($urandom_range(0, 4) != 0);
  always @(posedge clk) begin
    if (gbe_tvalid && gbe_tready) gbe_got.push_back(gbe_tdata);
    if (gbe_tvalid && !gbe_tready) n_stall++;
  end

  // ------------------------------------------------------- reference model
  int ref_cnt = 0;
  int il_run = 0, il_hold = 0;

  function automatic longint iabs(input longint v);
    return v < 0 ? -v : v;
  endfunction

  function automatic longint isqrt_ref(input longint n);
    longint r;
    r = longint'($floor($sqrt(real'(n))));
    while (r * r > n) r--;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

  function automatic longint ratio_ref(input longint n, input longint d);
    longint m;
    if (d == 0) return 0;
    m = (iabs(n) * (longint'(1) << 24)) / d;
    return n < 0 ? -m : m;
  endfunction

  function automatic longint clamp32(input longint v);
    longint hi = 64'sh0000_0000_7fff_ffff;
    longint lo = 64'shffff_ffff_8000_0000;
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic longint scale_ref(input longint k, input longint r, input longint off);
    return clamp32(((k * r) >>> 24) - off);
  endfunction

  // mechanism counters
  int n_beam = 0, n_nobeam = 0, n_clamp = 0, n_diag = 0, n_orth = 0, n_divzero = 0;
  int n_overrun = 0, n_dropped = 0, n_syncrst = 0, n_il_filtered = 0, n_il_fire = 0;
  int n_il_expire = 0, n_il_masked = 0, n_std = 0, n_ext = 0, n_reinit = 0;

  // One bunch. pos: sample index of the burst in the batch (<0: no bunch).
  task automatic bunch(input int pos, input real a0, input real a1, input real a2,
                       input real a3, input bit extra_in_delay, input bit extra_busy);
    int unsigned t_trig, sc, t_res;
    sample_vec_t smp [NSAMP];
    int  t0, lo, hi, exp_cnt;
    bit  found, viol, fire, divz, ovr;
    longint pk [NCH];
    longint v [NCH], vc [NCH];
    longint ex, ey, eq, es, s;
    sp_result_t e;
    logic [31:0] exp_words [$];
    int n_raw;

    amp[0] = a0; amp[1] = a1; amp[2] = a2; amp[3] = a3;
    ovr = extra_in_delay || extra_busy;
    // trigger
    @(negedge clk);
    trig_in = 1'b1; t_trig = cycle;
    ref_cnt = (ref_cnt + 1) % 65536;
    sc = t_trig + DELAY + 3;                 // cycle of the first buffered sample
    burst_at = (pos >= 0) ? int'(sc) + pos : -1000000;
    @(negedge clk); trig_in = 1'b0;
    if (extra_in_delay) begin
      repeat (4) @(negedge clk);
      trig_in = 1'b1; ref_cnt = (ref_cnt + 1) % 65536; n_dropped++;
      @(negedge clk); trig_in = 1'b0;
    end
    exp_cnt = ref_cnt;
    if (extra_busy) begin
      repeat (300) @(negedge clk);
      trig_in = 1'b1; ref_cnt = (ref_cnt + 1) % 65536; n_overrun++;
      @(negedge clk); trig_in = 1'b0;
    end
    gbe_got.delete();
    while (!result_valid) @(negedge clk);
    t_res = cycle;
    while (busy) @(negedge clk);
    repeat (4) @(negedge clk);

    // --- reference
    for (int i = 0; i < NSAMP; i++) smp[i] = hist[(sc + i) % HIST];
    found = 0; t0 = 0;
    for (int c = 0; c < NCH; c++) pk[c] = 0;
    for (int i = 0; i < NSAMP; i++)
      for (int c = 0; c < NCH; c++) begin
        longint m;
        m = iabs(longint'(smp[i][c]));
        if (m > pk[c]) pk[c] = m;
        if (m > longint'(threshold) && !found) begin found = 1; t0 = i; end
      end
    lo = t0 - int'(pretrig);  if (lo < 0) begin lo = 0; if (found) n_clamp++; end
    hi = t0 + int'(posttrig); if (hi > NSAMP) hi = NSAMP;
    e = '0;
    divz = 0;
    if (found) begin
      for (int c = 0; c < NCH; c++) begin
        longint ss;
        ss = 0;
        for (int i = lo; i < hi; i++) ss += longint'(smp[i][c]) * longint'(smp[i][c]);
        v[c]  = isqrt_ref(ss);
        vc[c] = (v[c] * longint'(kgain[c])) >> 16;
      end
      s = vc[0] + vc[1] + vc[2] + vc[3];
      if (pickup_mode == PICKUP_DIAGONAL) begin
        ex = scale_ref(geom.kx, ratio_ref((vc[0] + vc[3]) - (vc[1] + vc[2]), s), geom.x_off);
        ey = scale_ref(geom.ky, ratio_ref((vc[0] + vc[1]) - (vc[2] + vc[3]), s), geom.y_off);
        eq = scale_ref(geom.kq, ratio_ref((vc[0] + vc[2]) - (vc[1] + vc[3]), s), geom.q_off);
        divz = (s == 0);
      end else begin
        ex = scale_ref(geom.kx, ratio_ref(vc[0] - vc[2], vc[0] + vc[2]), geom.x_off);
        ey = scale_ref(geom.ky, ratio_ref(vc[1] - vc[3], vc[1] + vc[3]), geom.y_off);
        eq = 0;
        divz = (vc[0] + vc[2] == 0) || (vc[1] + vc[3] == 0);
      end
      es = clamp32(((s * longint'(geom.ksum)) >> 16) + longint'(geom.sum_off));
      e.va = vcorr_t'(vc[0]); e.vb = vcorr_t'(vc[1]); e.vc = vcorr_t'(vc[2]); e.vd = vcorr_t'(vc[3]);
      e.sum = pos_t'(es); e.q = pos_t'(eq); e.x = pos_t'(ex); e.y = pos_t'(ey);
      n_beam++;
      if (divz) n_divzero++;
    end else begin
      n_nobeam++;
    end
    if (pickup_mode == PICKUP_DIAGONAL) n_diag++; else n_orth++;
    // interlock
    viol = 0;
    for (int c = 0; c < NCH; c++) if (pk[c] > longint'(il_cfg.peak_max)) viol = 1;
    if (found && (e.x < il_cfg.x_min || e.x > il_cfg.x_max ||
                  e.y < il_cfg.y_min || e.y > il_cfg.y_max)) viol = 1;
    fire = viol && (il_run + 1 >= (il_cfg.filter == 0 ? 1 : int'(il_cfg.filter)));
    if (viol && !fire) n_il_filtered++;
    if (fire) begin il_hold = HOLD; n_il_fire++; end
    else if (il_hold > 0) begin il_hold--; if (il_hold == 0) n_il_expire++; end
    il_run = viol ? il_run + 1 : 0;
    if (!il_cfg.il_on && il_hold > 0) n_il_masked++;
    e.counter = 16'(exp_cnt);
    e.status[ST_BEAM]      = found;
    e.status[ST_ORTHO]     = (pickup_mode == PICKUP_ORTHOGONAL);
    e.status[ST_DIVZERO]   = found && divz;
    e.status[ST_IL_VIOL]   = viol;
    e.status[ST_IL_ACTIVE] = il_cfg.il_on && il_hold > 0;
    e.status[ST_OVERRUN]   = ovr;

    // --- compare the record
    check(result.va == e.va && result.vb == e.vb && result.vc == e.vc && result.vd == e.vd,
          $sformatf("V %0d %0d %0d %0d expected %0d %0d %0d %0d", result.va, result.vb,
                    result.vc, result.vd, e.va, e.vb, e.vc, e.vd));
    check(result.x == e.x, $sformatf("X %0d expected %0d", result.x, e.x));
    check(result.y == e.y, $sformatf("Y %0d expected %0d", result.y, e.y));
    check(result.q == e.q, $sformatf("Q %0d expected %0d", result.q, e.q));
    check(result.sum == e.sum, $sformatf("SUM %0d expected %0d", result.sum, e.sum));
    check(result.status == e.status, $sformatf("STATUS %b expected %b", result.status, e.status));
    check(result.counter == e.counter, $sformatf("COUNTER %0d expected %0d", result.counter, e.counter));
    check(il_out == (il_cfg.il_on && il_hold > 0), "interlock output");
    // latency from trigger to record: delay, acquisition, batch scan,
    // window, square root, gain, position and interlock stages
    check(t_res - t_trig == DELAY + 2 + DEPTH + 1 + (NSAMP + 3) +
                            (found ? (hi - lo + 3) + 21 + 1 + 52 : 0) + 3,
          $sformatf("latency %0d", t_res - t_trig));

    // --- Ethernet payload
    exp_words.push_back(32'(e.va)); exp_words.push_back(32'(e.vb));
    exp_words.push_back(32'(e.vc)); exp_words.push_back(32'(e.vd));
    exp_words.push_back(e.sum); exp_words.push_back(e.q);
    exp_words.push_back(e.x); exp_words.push_back(e.y);
    exp_words.push_back(32'(e.status)); exp_words.push_back(32'(e.counter));
    n_raw = (gbe_raw_n > 150) ? 150 : int'(gbe_raw_n);
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < n_raw; i++) exp_words.push_back(32'(int'(smp[i][c])));
    if (n_raw == 0) n_std++; else n_ext++;
    check(gbe_got.size() == exp_words.size(),
          $sformatf("GbE %0d words, expected %0d", gbe_got.size(), exp_words.size()));
    for (int i = 0; i < exp_words.size() && i < gbe_got.size(); i++)
      check(gbe_got[i] == exp_words[i], $sformatf("GbE word %0d: %h expected %h", i, gbe_got[i], exp_words[i]));

    // --- raw buffer read by the host: spot addresses
    for (int k = 0; k < 24; k++) begin
      int a;
      a = (k < 8) ? k * 127 : int'($urandom_range(0, DEPTH - 1));
      sbc_rd_addr = 10'(a);
      @(negedge clk);
      check(sbc_rd_data == hist[(sc + a) % HIST], $sformatf("host buffer addr %0d", a));
    end
    check(sbc_buf_full, "host buffer full");
    repeat ($urandom_range(5, 40)) @(negedge clk);
  endtask

  task automatic reinit(input int n);
    gbe_raw_n = 8'(n);
    @(negedge clk); gbe_init = 1'b1;
    @(negedge clk); gbe_init = 1'b0;
    n_reinit++;
  endtask

  function automatic real ra();
    return real'($urandom_range(3000, 15000));
  endfunction

  real base;

  // within 5 % of b: a beam near the centre
  function automatic real near(input real b);
    return b * (0.95 + $urandom_range(0, 100) / 1000.0);
  endfunction

  initial begin
    for (int c = 0; c < NCH; c++) begin
      kgain[c] = kgain_t'($urandom_range(60000, 71000));
      amp[c] = 0.0;
      noise[c] = 40.0;
    end
    geom = '0;
    geom.kx = 32'd10_000_000; geom.ky = 32'd10_000_000; geom.kq = 32'd10_000_000;
    geom.ksum = 18'd65536;
    geom.x_off = 32'sd12000; geom.y_off = -32'sd5000; geom.q_off = 32'sd0;
    geom.sum_off = 32'sd100;
    il_cfg = '0;
    il_cfg.x_min = -32'sd2_000_000; il_cfg.x_max = 32'sd2_000_000;
    il_cfg.y_min = -32'sd2_000_000; il_cfg.y_max = 32'sd2_000_000;
    il_cfg.peak_max = 16'd20000;
    il_cfg.filter = 8'd2;
    il_cfg.il_on = 1'b1;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // ordinary bunches, diagonal pickups, standard stream
    bunch(28, 8000, 8000, 8000, 8000, 0, 0);
    bunch(40, 9000, 7000, 6000, 8000, 0, 0);
    bunch(-1, 0, 0, 0, 0, 0, 0);                       // no bunch
    bunch(0, 8000, 6000, 9000, 7000, 0, 0);            // clamped window
    // extended stream after re-initialisation
    reinit(5);
    bunch(30, ra(), ra(), ra(), ra(), 0, 0);
    reinit(150);
    bunch(50, ra(), ra(), ra(), ra(), 0, 0);
    reinit(0);
    // triggers while delayed and while busy
    bunch(33, ra(), ra(), ra(), ra(), 1, 0);
    bunch(33, ra(), ra(), ra(), ra(), 0, 1);
    bunch(33, ra(), ra(), ra(), ra(), 0, 0);
    // counter synchronisation reset
    @(negedge clk); cnt_sync_reset = 1'b1; @(negedge clk); cnt_sync_reset = 1'b0;
    ref_cnt = 0; n_syncrst++;
    bunch(33, ra(), ra(), ra(), ra(), 0, 0);
    // orthogonal pickups, then a zero denominator (B and D silent)
    pickup_mode = PICKUP_ORTHOGONAL;
    bunch(25, ra(), ra(), ra(), ra(), 0, 0);
    noise[1] = 0.0; noise[3] = 0.0;
    bunch(25, 9000, 0, 7000, 0, 0, 0);
    noise[1] = 40.0; noise[3] = 40.0;
    pickup_mode = PICKUP_DIAGONAL;
    // interlock: one large beam is filtered, two in a row fire
    bunch(30, 26000, 26000, 26000, 26000, 0, 0);
    bunch(30, 8000, 8000, 8000, 8000, 0, 0);
    bunch(30, 26000, 26000, 26000, 26000, 0, 0);
    bunch(30, 2000, 15000, 15000, 2000, 0, 0);        // far off centre in X
    check(il_out, "interlock active");
    // the hold runs out after HOLD clean bunches, with IL_ON off for a while
    for (int i = 0; i < HOLD + 2; i++) begin
      il_cfg.il_on = !(i >= 10 && i < 15);
      if (i == 50) reinit(3);
      if (i == 51) reinit(0);
      base = ra();
      bunch($urandom_range(5, 100), near(base), near(base), near(base), near(base), 0, 0);
    end
    check(!il_out, "interlock released");

    $display("beam=%0d nobeam=%0d clamp=%0d diag=%0d orth=%0d divzero=%0d overrun=%0d dropped=%0d",
             n_beam, n_nobeam, n_clamp, n_diag, n_orth, n_divzero, n_overrun, n_dropped);
    $display("syncrst=%0d il_filtered=%0d il_fire=%0d il_expire=%0d il_masked=%0d std=%0d ext=%0d reinit=%0d stall=%0d",
             n_syncrst, n_il_filtered, n_il_fire, n_il_expire, n_il_masked, n_std, n_ext, n_reinit, n_stall);
    check(n_beam > 0,        "mechanism: bunch found");
    check(n_nobeam > 0,      "mechanism: no bunch");
    check(n_clamp > 0,       "mechanism: window clamped");
    check(n_diag > 0,        "mechanism: diagonal");
    check(n_orth > 0,        "mechanism: orthogonal");
    check(n_divzero > 0,     "mechanism: zero denominator");
    check(n_overrun > 0,     "mechanism: trigger while busy");
    check(n_dropped > 0,     "mechanism: trigger while delayed");
    check(n_syncrst > 0,     "mechanism: counter sync reset");
    check(n_il_filtered > 0, "mechanism: interlock filtered");
    check(n_il_fire > 0,     "mechanism: interlock fired");
    check(n_il_expire > 0,   "mechanism: interlock hold expired");
    check(n_il_masked > 0,   "mechanism: interlock masked by IL_ON");
    check(n_std > 0,         "mechanism: standard stream");
    check(n_ext > 0,         "mechanism: extended stream");
    check(n_reinit > 0,      "mechanism: stream re-initialised");
    check(n_stall > 0,       "mechanism: stream back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
