// tb_gain_correction: random amplitudes and coefficients (1.0 and the
// extremes included); V' must equal floor(V*K / 2^16), one clock after the
// input is valid.
module tb_gain_correction;
  import sp_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, out_valid;
  amp_vec_t   v;
  kgain_vec_t k;
  vcorr_vec_t vc;
  int         checks = 0, failures = 0;

  gain_correction dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      for (int c = 0; c < NCH; c++) begin
        v[c] = amp_t'($urandom);
        unique case (i % 4)
          0: k[c] = kgain_t'(65536);              // 1.0
          1: k[c] = kgain_t'($urandom);
          2: k[c] = '1;                           // just below 4.0
          default: k[c] = kgain_t'($urandom_range(60000, 70000));
        endcase
      end
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      check(out_valid, "out_valid one clock later");
      for (int c = 0; c < NCH; c++) begin
        longint unsigned e;
        e = (longint'(v[c]) * longint'(k[c])) / 65536;
        check(vc[c] == vcorr_t'(e), $sformatf("V=%0d K=%0d gave %0d expected %0d", v[c], k[c], vc[c], e));
      end
      @(negedge clk);
      check(!out_valid, "out_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
