// tb_error_analysis: error analysis of the MAC unit's approximate multiplier over all
// 65536 unsigned 8x8 operand pairs, run through the complete unit.
//
// Every cycle one pair is issued with valid and clear high, so the accumulator holds the
// approximate product one cycle later; one pair is issued per cycle, back to back, which
// also checks the throughput of one MAC per cycle. The products are compared with the exact
// product and the usual metrics are printed: error rate ER (share of wrong products), mean
// error distance MED, NMED = MED / (255*255) and mean relative error distance MRED (over
// non-zero exact products). The number of wrong products and the summed error distance must
// match a separate bit-level model of the compressor network; a zero operand must give 0.
module tb_error_analysis;
  import mac_pkg::*;

  localparam int     REF_ERRORS = 64062;
  localparam longint REF_SUM_ED = 29993152;

  logic             clk = 1'b0, rst_n = 1'b0, valid = 1'b0, clear = 1'b0;
  logic [N-1:0]     a = '0, b = '0;
  logic [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  approx_mac dut (.clk(clk), .rst_n(rst_n), .valid(valid), .clear(clear),
                  .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ex, p, ed;
    int nerr, zero_bad;
    longint sum_ed;
    real mred;
    nerr = 0; zero_bad = 0; sum_ed = 0; mred = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 65536; k++) begin
      @(negedge clk);
      valid = 1'b1;
      clear = 1'b1;
      {a, b} = 16'(k);
      @(posedge clk);
      #1;
      p  = int'(acc);
      ex = int'(a) * int'(b);
      ed = (p > ex) ? p - ex : ex - p;
      if (ed != 0) nerr++;
      sum_ed += ed;
      if (ex != 0) mred += real'(ed) / real'(ex);
      else if (p != 0) zero_bad++;
    end
    checks++;
    if (nerr != REF_ERRORS) begin
      failures++;
      $display("FAIL erroneous products %0d, reference %0d", nerr, REF_ERRORS);
    end
    checks++;
    if (sum_ed != REF_SUM_ED) begin
      failures++;
      $display("FAIL summed error distance %0d, reference %0d", sum_ed, REF_SUM_ED);
    end
    checks++;
    if (zero_bad != 0) begin
      failures++;
      $display("FAIL %0d products with a zero operand are not zero", zero_bad);
    end
    $display("ER=%0.2f%% MED=%0.2f NMED=%0.3e MRED=%0.3e", 100.0 * nerr / 65536.0,
             real'(sum_ed) / 65536.0, real'(sum_ed) / 65536.0 / (255.0 * 255.0), mred / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
