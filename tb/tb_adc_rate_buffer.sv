// tb_adc_rate_buffer: feeds a known sample sequence, triggers a capture,
// checks that `done` comes DEPTH+1 clocks after `start`, that a start during
// a capture is ignored, and reads back every address of all four channels.
module tb_adc_rate_buffer;
  import sp_pkg::*;
  localparam int DEPTH = 1024;
  logic        clk = 1'b0, rst_n = 1'b0;
  sample_vec_t adc;
  logic        start = 1'b0, busy, done, full;
  logic [9:0]  rd_addr = '0;
  sample_vec_t rd_data;
  int          checks = 0, failures = 0;
  int unsigned cycle = 0;

  adc_rate_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Sample of channel c at clock n: a different pattern per channel.
  function automatic sample_t pattern(input int unsigned n, input int c, input int seed);
    return sample_t'((n * (c + 3) * 7919 + seed * 131 + c * 1000) & 16'hffff);
  endfunction

  int seed = 0;
  always_comb for (int c = 0; c < NCH; c++) adc[c] = pattern(cycle, c, seed);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic capture(input int s);
    int unsigned t0, first;
    seed = s;
    @(negedge clk); start = 1'b1; t0 = cycle;
    @(negedge clk); start = 1'b0;
    first = cycle;          // first written sample is the one of this clock
    check(busy && !full, "busy after start");
    repeat (10) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;   // must be ignored
    while (!done) @(negedge clk);
    check(cycle - t0 == DEPTH + 1, $sformatf("done after %0d clocks", cycle - t0));
    @(negedge clk);
    check(full && !busy, "full after done");
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = 10'(a);
      @(negedge clk);
      for (int c = 0; c < NCH; c++)
        check(rd_data[c] == pattern(first + a, c, s),
              $sformatf("addr %0d ch %0d: %h", a, c, rd_data[c]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !full, "idle after reset");
    capture(1);
    repeat (17) @(negedge clk);
    capture(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
