// tb_mac_accumulator: checks the accumulator register: cleared by the asynchronous reset
// (also between clock edges), loads d on a rising edge with en high, holds with en low.
// A model register in the testbench is updated on the same edges and compared each cycle.
module tb_mac_accumulator;
  import mac_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [ACC_W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  mac_accumulator dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = ACC_W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d (en=%b)", i, q, model, en);
      end
    end
    // asynchronous reset between edges
    @(negedge clk);
    en = 1'b1; d = '1;
    @(posedge clk);
    #2;
    rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL asynchronous reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
