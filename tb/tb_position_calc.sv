// tb_position_calc: random corrected amplitudes and geometry for both
// pickup arrangements; X, Y, Q and SUM are compared with the formulas
// evaluated in the testbench in 64-bit integer arithmetic (ratio truncated
// toward zero to 24 fractional bits, then scaled, offset and saturated).
// Also checks zero amplitudes (div_zero), saturation and the latency.
module tb_position_calc;
  import sp_pkg::*;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0;
  pickup_mode_t mode;
  vcorr_vec_t   vc;
  geom_cfg_t    geom;
  logic         done, div_zero;
  pos_t         x, y, q, sum;
  int           checks = 0, failures = 0;
  int unsigned  cycle = 0;
  int           n_diag = 0, n_orth = 0, n_zero = 0, n_sat = 0;

  position_calc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint ref_ratio(input longint n, input longint d);
    longint m;
    if (d == 0) return 0;
    m = ((n < 0 ? -n : n) * (longint'(1) << 24)) / d;
    return n < 0 ? -m : m;
  endfunction

  function automatic longint clamp32(input longint v);
    longint hi = 64'sh0000_0000_7fff_ffff;
    longint lo = 64'shffff_ffff_8000_0000;
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  function automatic longint ref_scale(input longint k, input longint r, input longint off);
    return clamp32(((k * r) >>> 24) - off);
  endfunction

  task automatic trial(input pickup_mode_t m, input longint a, input longint b,
                       input longint c, input longint d);
    longint s, ex, ey, eq, es;
    bit ez;
    int unsigned ts;
    mode = m;
    vc[0] = vcorr_t'(a); vc[1] = vcorr_t'(b); vc[2] = vcorr_t'(c); vc[3] = vcorr_t'(d);
    s = a + b + c + d;
    if (m == PICKUP_DIAGONAL) begin
      ex = ref_scale(geom.kx, ref_ratio((a + d) - (b + c), s), geom.x_off);
      ey = ref_scale(geom.ky, ref_ratio((a + b) - (c + d), s), geom.y_off);
      eq = ref_scale(geom.kq, ref_ratio((a + c) - (b + d), s), geom.q_off);
      ez = (s == 0);
      n_diag++;
    end else begin
      ex = ref_scale(geom.kx, ref_ratio(a - c, a + c), geom.x_off);
      ey = ref_scale(geom.ky, ref_ratio(b - d, b + d), geom.y_off);
      eq = 0;
      ez = (a + c == 0) || (b + d == 0);
      n_orth++;
    end
    es = clamp32(((s * longint'(geom.ksum)) >> 16) + longint'(geom.sum_off));
    if (ez) n_zero++;
    @(negedge clk); start = 1'b1; ts = cycle;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check(cycle - ts == 52, $sformatf("latency %0d", cycle - ts));
    check(longint'(x) == ex, $sformatf("X %0d expected %0d", x, ex));
    check(longint'(y) == ey, $sformatf("Y %0d expected %0d", y, ey));
    check(longint'(q) == eq, $sformatf("Q %0d expected %0d", q, eq));
    check(longint'(sum) == es, $sformatf("SUM %0d expected %0d", sum, es));
    check(div_zero == ez, "div_zero");
  endtask

  function automatic longint rv();
    return longint'($urandom_range(0, (1 << 22) - 1));
  endfunction

  initial begin
    geom = '0;
    geom.kx = 32'd10_000_000;  geom.ky = 32'd10_000_000;  geom.kq = 32'd1_000_000;
    geom.ksum = 18'd65536;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // centred beam, then off-centre beams
    trial(PICKUP_DIAGONAL, 1000, 1000, 1000, 1000);
    trial(PICKUP_DIAGONAL, 1200, 1000, 800, 1000);
    trial(PICKUP_ORTHOGONAL, 1200, 1000, 800, 1000);
    trial(PICKUP_DIAGONAL, 0, 0, 0, 0);
    trial(PICKUP_ORTHOGONAL, 500, 0, 700, 0);
    trial(PICKUP_DIAGONAL, 5000, 0, 0, 0);            // ratio exactly +1
    trial(PICKUP_DIAGONAL, 0, 5000, 0, 0);            // ratio exactly -1
    for (int i = 0; i < 200; i++) begin
      geom.kx      = $urandom_range(0, 20_000_000);
      geom.ky      = $urandom_range(0, 20_000_000);
      geom.kq      = $urandom_range(0, 20_000_000);
      geom.ksum    = kgain_t'($urandom);
      geom.x_off   = pos_t'(int'($urandom_range(0, 200000)) - 100000);
      geom.y_off   = pos_t'(int'($urandom_range(0, 200000)) - 100000);
      geom.q_off   = pos_t'(int'($urandom_range(0, 200000)) - 100000);
      geom.sum_off = pos_t'(int'($urandom_range(0, 200000)) - 100000);
      trial(i % 2 ? PICKUP_ORTHOGONAL : PICKUP_DIAGONAL, rv(), rv(), rv(), rv());
    end
    // saturation: a huge scale and offset
    geom.kx = 32'hffff_ffff; geom.x_off = 32'sh8000_0000;
    trial(PICKUP_DIAGONAL, 9000, 0, 0, 0);
    check(x == 32'sh7fff_ffff, "X saturates high");
    geom.sum_off = 32'sh7fff_ff00; geom.ksum = '1;
    trial(PICKUP_DIAGONAL, 4000000, 4000000, 4000000, 4000000);
    check(sum == 32'sh7fff_ffff, "SUM saturates high");
    check(n_diag > 0 && n_orth > 0 && n_zero > 0, "both modes and a zero denominator exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
