// tb_data_extraction: random noise with a bunch burst at a random position
// in a model of the ADC rate buffer; the expected threshold position,
// window and peaks are computed in the testbench and compared. Covers
// no crossing, a crossing on each channel, window clamping at both ends,
// and the NSAMP+3 clock latency.
module tb_data_extraction;
  import sp_pkg::*;
  localparam int NSAMP = 150;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  peak_t       threshold;
  logic [9:0]  pretrig, posttrig, rd_addr, t0, win_start, win_len;
  sample_vec_t rd_data;
  logic        done, found;
  peak_vec_t   peak;
  int          checks = 0, failures = 0;
  int unsigned cycle = 0;

  data_extraction #(.NSAMP(NSAMP), .ADDR_W(10)) dut (.*);

  sample_vec_t mem [1024];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

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

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // burst_at < 0: no burst. ch: channel that leads.
  task automatic trial(input int burst_at, input int lead, input int thr,
                       input int pre, input int post);
    int exp_t0, exp_lo, exp_hi, exp_pk[NCH];
    bit exp_found;
    int unsigned ts;
    for (int a = 0; a < 1024; a++)
      for (int c = 0; c < NCH; c++) begin
        int v;
        v = int'($urandom_range(0, 60)) - 30;
        if (burst_at >= 0 && a >= burst_at + (c == lead ? 0 : 2) && a < burst_at + 40)
          v = ((a - burst_at) % 2 == 0 ? 1 : -1) * int'($urandom_range(thr + 1, 32000));
        if (a == 200) v = -32768;   // outside the batch: must not count
        mem[a][c] = sample_t'(v);
      end
    exp_found = 0; exp_t0 = 0;
    for (int c = 0; c < NCH; c++) exp_pk[c] = 0;
    for (int a = 0; a < NSAMP; a++)
      for (int c = 0; c < NCH; c++) begin
        int m;
        m = iabs(int'(mem[a][c]));
        if (m > exp_pk[c]) exp_pk[c] = m;
        if (m > thr && !exp_found) begin exp_found = 1; exp_t0 = a; end
      end
    exp_lo = exp_t0 - pre;  if (exp_lo < 0) exp_lo = 0;
    exp_hi = exp_t0 + post; if (exp_hi > NSAMP) exp_hi = NSAMP;
    threshold = peak_t'(thr);
    pretrig = 10'(pre);
    posttrig = 10'(post);
    @(negedge clk); start = 1'b1; ts = cycle;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check(cycle - ts == NSAMP + 3, $sformatf("latency %0d", cycle - ts));
    check(found == exp_found, $sformatf("found %0d expected %0d", found, exp_found));
    if (exp_found) begin
      check(t0 == 10'(exp_t0), $sformatf("t0 %0d expected %0d", t0, exp_t0));
      check(win_start == 10'(exp_lo), $sformatf("win_start %0d expected %0d", win_start, exp_lo));
      check(win_len == 10'(exp_hi - exp_lo), $sformatf("win_len %0d expected %0d", win_len, exp_hi - exp_lo));
    end else begin
      check(win_len == 0, "window of a missing bunch");
    end
    for (int c = 0; c < NCH; c++)
      check(peak[c] == peak_t'(exp_pk[c]), $sformatf("peak %0d: %0d expected %0d", c, peak[c], exp_pk[c]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    trial(-1, 0, 500, 2, 40);          // noise only
    trial(30, 0, 500, 2, 43);          // like the figure
    trial(30, 1, 500, 2, 43);
    trial(60, 2, 1000, 5, 60);
    trial(80, 3, 200, 10, 20);
    trial(1, 0, 500, 8, 30);           // clamp at the start
    trial(135, 1, 500, 3, 40);         // clamp at the end
    trial(0, 2, 500, 0, 150);          // whole batch
    for (int i = 0; i < 10; i++)
      trial($urandom_range(0, 149), $urandom_range(0, 3), $urandom_range(100, 5000),
            $urandom_range(0, 20), $urandom_range(1, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
