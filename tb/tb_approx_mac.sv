// tb_approx_mac: end-to-end test of the MAC unit at its default size.
//
// Streams the 300 operand pairs of tb/dadda8_vectors.hex through the unit as dot products
// of 25 terms each: the first term of each dot product is issued with clear high, and idle
// cycles (valid low) are inserted at random. After every rising edge the accumulator is
// compared with a model that adds the reference products from the file, modulo 2^17, so
// the one-cycle latency is checked on every cycle. The test counts how often each
// mechanism happened - a new accumulation started by clear, a held cycle with valid low,
// and a wrap-around of the 17-bit accumulator - and fails if one never did.
module tb_approx_mac;
  import mac_pkg::*;

  localparam int NVEC   = 300;
  localparam int TERMS  = 25;

  logic             clk = 1'b0, rst_n = 1'b0, valid = 1'b0, clear = 1'b0;
  logic [N-1:0]     a = '0, b = '0;
  logic [ACC_W-1:0] acc;
  logic [35:0]      vec [NVEC];
  longint           model;
  int checks = 0, failures = 0;
  int n_clear = 0, n_hold = 0, n_wrap = 0, n_mac = 0, cycles = 0;

  approx_mac dut (.clk(clk), .rst_n(rst_n), .valid(valid), .clear(clear),
                  .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_acc(input string what);
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      $display("FAIL %s: acc=%0d expected %0d", what, acc, model);
    end
  endtask

  initial begin
    int i;
    $readmemh("tb/dadda8_vectors.hex", vec);
    model = 0;
    repeat (2) @(posedge clk);
    #1 check_acc("reset");
    rst_n = 1'b1;
    i = 0;
    while (i < NVEC) begin
      @(negedge clk);
      if (($urandom % 5) == 0) begin
        valid = 1'b0;
        a = 8'($urandom); b = 8'($urandom); clear = 1'($urandom);
        @(posedge clk);
        n_hold++;
      end else begin
        valid = 1'b1;
        clear = (i % TERMS) == 0;
        {a, b} = vec[i][35:20];
        @(posedge clk);
        if (clear) begin
          model = longint'(vec[i][16:0]);
          n_clear++;
        end else begin
          model = model + longint'(vec[i][16:0]);
          if (model >= (longint'(1) << ACC_W)) begin
            model -= (longint'(1) << ACC_W);
            n_wrap++;
          end
        end
        n_mac++;
        i++;
      end
      cycles++;
      #1 check_acc($sformatf("cycle %0d", cycles));
    end
    $display("MACs %0d, new accumulations %0d, held cycles %0d, accumulator wraps %0d",
             n_mac, n_clear, n_hold, n_wrap);
    checks++;
    if (n_clear == 0) begin failures++; $display("FAIL clear never exercised"); end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL hold never exercised"); end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL wrap-around never exercised"); end
    checks++;
    if (n_mac != NVEC) begin failures++; $display("FAIL %0d MACs issued", n_mac); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
