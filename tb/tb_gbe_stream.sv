// tb_gbe_stream: sends processed-data records through the payload former
// with a receiver that stalls at random, and compares every packet with the
// expected word list: standard (10 words) and extended (10 words plus
// raw_n samples of A, then B, C, D). Covers the configuration latched at
// boot, re-initialisation while running, the clamp to 150 samples and a
// send while busy being ignored.
module tb_gbe_stream;
  import sp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        init = 1'b0, send = 1'b0;
  logic [7:0]  cfg_raw_n;
  sp_result_t  result;
  logic        busy, tvalid, tready, tlast, extended;
  logic [9:0]  rd_addr;
  sample_vec_t rd_data;
  logic [31:0] tdata;
  int          checks = 0, failures = 0;

  gbe_stream #(.NSAMP_MAX(150), .ADDR_W(10)) dut (.*);

  sample_vec_t mem [1024];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  always #5 clk = ~clk;

  // receiver: random ready, collects words
  logic [31:0] got [$];
  int          pkts = 0;
  always @(posedge clk) begin
    if (tvalid && tready) begin
      got.push_back(tdata);
      if (tlast) pkts++;
    end
  end
  always @(negedge clk) tready <= ($urandom_range(0, 3) != 0);

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

  task automatic packet(input int n_raw);
    logic [31:0] exp [$];
    int p0;
    result = sp_result_t'({$urandom, $urandom, $urandom, $urandom, $urandom,
                           $urandom, $urandom, $urandom, $urandom, $urandom});
    for (int a = 0; a < 1024; a++)
      for (int c = 0; c < NCH; c++) mem[a][c] = sample_t'($urandom);
    exp.push_back(32'(result.va)); exp.push_back(32'(result.vb));
    exp.push_back(32'(result.vc)); exp.push_back(32'(result.vd));
    exp.push_back(result.sum); exp.push_back(result.q);
    exp.push_back(result.x); exp.push_back(result.y);
    exp.push_back(32'(result.status)); exp.push_back(32'(result.counter));
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < n_raw; i++) exp.push_back(32'(int'(mem[i][c])));
    got.delete();
    p0 = pkts;
    @(negedge clk); send = 1'b1;
    @(negedge clk); send = 1'b0;
    check(busy, "busy after send");
    repeat (3) @(negedge clk);
    send = 1'b1; @(negedge clk); send = 1'b0;       // ignored while busy
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    check(pkts == p0 + 1, $sformatf("packets %0d", pkts - p0));
    check(got.size() == exp.size(), $sformatf("%0d words, expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("word %0d: %h expected %h", i, got[i], exp[i]));
  endtask

  initial begin
    cfg_raw_n = 8'd4;          // boot configuration: extended, 4 samples
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    cfg_raw_n = 8'd0;          // not taken until re-initialised
    check(extended, "boot configuration latched");
    packet(4);
    init = 1'b1; @(negedge clk); init = 1'b0;
    check(!extended, "standard after re-init");
    packet(0);
    cfg_raw_n = 8'd150; init = 1'b1; @(negedge clk); init = 1'b0;
    packet(150);
    cfg_raw_n = 8'd200; init = 1'b1; @(negedge clk); init = 1'b0;
    packet(150);               // clamped
    for (int i = 0; i < 6; i++) begin
      cfg_raw_n = 8'($urandom_range(0, 20)); init = 1'b1; @(negedge clk); init = 1'b0;
      packet(int'(cfg_raw_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
