// tb_amplitude_accumulator: random buffer contents (full-scale samples
// included) and random windows; the sums of squares are compared with sums
// worked out in the testbench, and the win_len+3 clock latency is checked.
module tb_amplitude_accumulator;
  import sp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  logic [9:0]  win_start, win_len, rd_addr;
  sample_vec_t rd_data;
  logic        done;
  sumsq_vec_t  sumsq;
  int          checks = 0, failures = 0;
  int unsigned cycle = 0;

  amplitude_accumulator #(.ADDR_W(10)) dut (.*);

  sample_vec_t mem [1024];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

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

  task automatic trial(input int s, input int len, input bit full_scale);
    longint unsigned ref_sum[NCH];
    int unsigned ts;
    for (int a = 0; a < 1024; a++)
      for (int c = 0; c < NCH; c++)
        mem[a][c] = full_scale ? -16'sd32768 : sample_t'($urandom);
    for (int c = 0; c < NCH; c++) begin
      ref_sum[c] = 0;
      for (int a = s; a < s + len; a++)
        ref_sum[c] += longint'(int'(mem[a][c])) * longint'(int'(mem[a][c]));
    end
    win_start = 10'(s);
    win_len   = 10'(len);
    @(negedge clk); start = 1'b1; ts = cycle;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check(cycle - ts == len + 3, $sformatf("latency %0d for %0d samples", cycle - ts, len));
    for (int c = 0; c < NCH; c++)
      check(sumsq[c] == SUMSQ_W'(ref_sum[c]),
            $sformatf("ch %0d sum %0d expected %0d", c, sumsq[c], ref_sum[c]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    trial(28, 45, 0);
    trial(0, 150, 1);      // largest window, full scale
    trial(10, 1, 0);
    trial(5, 0, 0);        // empty window
    for (int i = 0; i < 10; i++) trial($urandom_range(0, 100), $urandom_range(1, 150), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
