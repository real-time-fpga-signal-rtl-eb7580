// tb_trigger_counter: counts random trigger pulses against a reference,
// applies the external synchronisation reset (alone and together with a
// trigger) and checks the 16-bit wrap.
module tb_trigger_counter;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        trig = 1'b0, sync_reset = 1'b0;
  logic [15:0] count;
  int          checks = 0, failures = 0;
  int unsigned ref_cnt = 0;

  trigger_counter #(.CNT_W(16)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(count == 0, "reset value");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      trig       = ($urandom_range(0, 3) == 0);
      sync_reset = ($urandom_range(0, 300) == 0);
      if (sync_reset) ref_cnt = 0;
      else if (trig)  ref_cnt = (ref_cnt + 1) % 65536;
      @(negedge clk);
      trig = 1'b0; sync_reset = 1'b0;
      check(count == 16'(ref_cnt), $sformatf("count %0d expected %0d", count, ref_cnt));
    end
    // wrap-around
    @(negedge clk); sync_reset = 1'b1; @(negedge clk); sync_reset = 1'b0;
    trig = 1'b1;
    repeat (65537) @(negedge clk);
    trig = 1'b0;
    @(negedge clk);
    check(count == 16'd1, $sformatf("wrap: count %0d", count));
    // reset together with a trigger clears
    trig = 1'b1; sync_reset = 1'b1; @(negedge clk); trig = 1'b0; sync_reset = 1'b0;
    @(negedge clk);
    check(count == 0, "sync reset priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
