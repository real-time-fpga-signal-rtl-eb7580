// tb_interlock: a long random sequence of bunches, some with X, Y or a
// channel peak out of limits, under several filter settings and with the
// IL_ON enable toggled; violation, firing and the output are compared each
// bunch with a reference model, and the hold of IL_HOLD bunches is checked
// by letting it expire.
module tb_interlock;
  import sp_pkg::*;
  localparam int HOLD = 100;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      eval = 1'b0, beam;
  pos_t      x, y;
  peak_vec_t peak;
  il_cfg_t   cfg;
  logic      violation, fired, il_out;
  int        checks = 0, failures = 0;
  int        m_run = 0, m_hold = 0;
  int        n_fire = 0, n_expire = 0, n_filtered = 0, n_gated = 0;

  interlock #(.IL_HOLD(HOLD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // kind: 0 clean, 1 X out, 2 Y out, 3 peak out, 4 no beam with X out
  task automatic bunch(input int kind);
    bit v, f;
    int need;
    beam = (kind != 4);
    x = pos_t'(int'($urandom_range(0, 2000)) - 1000);
    y = pos_t'(int'($urandom_range(0, 2000)) - 1000);
    for (int c = 0; c < NCH; c++) peak[c] = peak_t'($urandom_range(0, 20000));
    if (kind == 1 || kind == 4) x = ($urandom_range(0, 1)) ? 32'sd5000 : -32'sd5000;
    if (kind == 2) y = ($urandom_range(0, 1)) ? 32'sd1001 : -32'sd1001;
    if (kind == 3) peak[$urandom_range(0, 3)] = 16'd30001;
    v = (kind >= 1 && kind <= 3);
    need = (cfg.filter == 0) ? 1 : int'(cfg.filter);
    f = v && (m_run + 1 >= need);
    if (v && !f) n_filtered++;
    if (f) begin
      m_hold = HOLD; n_fire++;
    end else if (m_hold > 0) begin
      m_hold--;
      if (m_hold == 0) n_expire++;
    end
    m_run = v ? m_run + 1 : 0;
    @(negedge clk); eval = 1'b1;
    @(negedge clk); eval = 1'b0;
    check(violation == v, $sformatf("violation %0d expected %0d (kind %0d)", violation, v, kind));
    check(fired == f, $sformatf("fired %0d expected %0d", fired, f));
    check(il_out == (cfg.il_on && m_hold > 0), $sformatf("il_out %0d hold %0d", il_out, m_hold));
    if (!cfg.il_on && m_hold > 0) n_gated++;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    cfg = '0;
    cfg.x_min = -32'sd1000; cfg.x_max = 32'sd1000;
    cfg.y_min = -32'sd1000; cfg.y_max = 32'sd1000;
    cfg.peak_max = 16'd30000;
    cfg.filter = 8'd3;
    cfg.il_on = 1'b1;
    beam = 1'b1; x = '0; y = '0; peak = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // two violations then a clean bunch: filter of 3 does not fire
    bunch(1); bunch(2); bunch(0);
    check(!il_out, "filtered out");
    // three in a row fire, then the hold runs out after exactly HOLD bunches
    bunch(1); bunch(3); bunch(2);
    check(il_out, "fired after three");
    for (int i = 0; i < HOLD - 1; i++) bunch(0);
    check(il_out, "still active after HOLD-1 clean bunches");
    bunch(0);
    check(!il_out, "released after HOLD clean bunches");
    bunch(4);   // no beam: position not checked
    // filter 0 and 1: every violation fires
    cfg.filter = 8'd0; bunch(3);
    cfg.filter = 8'd1; bunch(0); bunch(1);
    // enable off masks the output but not the state
    cfg.il_on = 1'b0; bunch(0); bunch(0);
    cfg.il_on = 1'b1; bunch(0);
    for (int i = 0; i < 1500; i++) begin
      if (i % 300 == 0) cfg.filter = 8'($urandom_range(0, 5));
      if (i % 97 == 0) cfg.il_on = ~cfg.il_on;
      bunch($urandom_range(0, 9) < 7 ? 0 : $urandom_range(1, 4));
    end
    check(n_fire > 0 && n_expire > 0 && n_filtered > 0 && n_gated > 0,
          $sformatf("mechanisms fire=%0d expire=%0d filtered=%0d gated=%0d",
                    n_fire, n_expire, n_filtered, n_gated));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
