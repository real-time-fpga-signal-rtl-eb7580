// tb_isqrt: square roots of edge values and random 40-bit radicands; each
// result r must satisfy r^2 <= n < (r+1)^2, and arrive OUT_W+1 clocks after
// start.
module tb_isqrt;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, done;
  logic [39:0] radicand;
  logic [19:0] root;
  int          checks = 0, failures = 0;
  int unsigned cycle = 0;

  isqrt #(.IN_W(40), .OUT_W(20)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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

  task automatic one(input longint unsigned n);
    int unsigned ts;
    longint unsigned r;
    radicand = 40'(n);
    @(negedge clk); start = 1'b1; ts = cycle;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check(cycle - ts == 21, $sformatf("latency %0d", cycle - ts));
    r = longint'(root);
    check(r * r <= n && (r + 1) * (r + 1) > n, $sformatf("sqrt(%0d) gave %0d", n, r));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one(0); one(1); one(2); one(3); one(4); one(15); one(16); one(17);
    one(64'd1 << 39); one((64'd1 << 40) - 1); one(64'd999999 * 999999);
    one(64'd1048575 * 1048575);
    for (int i = 0; i < 300; i++) one({$urandom, $urandom} & 64'hff_ffff_ffff);
    for (int i = 0; i < 100; i++) one(64'($urandom_range(0, 1 << 20)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
