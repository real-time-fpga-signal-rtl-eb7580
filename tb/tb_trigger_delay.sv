// tb_trigger_delay: checks that the delayed trigger comes exactly delay+1
// clock edges after the edge that samples the input trigger for several delays, and that a trigger
// arriving while one is pending is dropped and flagged.
module tb_trigger_delay;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        trig_in = 1'b0;
  logic [15:0] delay = '0;
  logic        trig_out, dropped;
  int          checks = 0, failures = 0;
  int unsigned cycle = 0;

  trigger_delay #(.DLY_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pulse trig_in and measure clocks until trig_out.
  task automatic one(input int d, input int extra_at);
    int t0, n_drop;
    bit seen;
    delay   = 16'(d);
    @(negedge clk); trig_in = 1'b1; t0 = cycle + 1;   // edge that samples it
    @(negedge clk); trig_in = 1'b0;
    seen = 0; n_drop = 0;
    for (int i = 1; i < d + 10; i++) begin
      if (i == extra_at) trig_in = 1'b1;
      @(posedge clk); #1;
      trig_in = 1'b0;
      if (dropped) n_drop++;
      if (trig_out) begin
        check(!seen && (cycle - t0) == d + 1, $sformatf("delay %0d: out after %0d", d, cycle - t0));
        seen = 1;
      end
    end
    check(seen, $sformatf("delay %0d: no output", d));
    if (extra_at > 0) check(n_drop == 1, $sformatf("delay %0d: dropped %0d", d, n_drop));
    else              check(n_drop == 0, "unexpected drop");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one(0, 0);
    one(1, 0);
    one(5, 0);
    one(37, 0);
    one(300, 0);
    one(20, 6);       // second trigger while pending
    for (int i = 0; i < 10; i++) one($urandom_range(0, 200), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
