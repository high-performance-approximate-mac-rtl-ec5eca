// tb_dadda8_reduce: checks the approximate 8x8 reduction tree.
//
// Part 1 compares row_a + row_b for 300 operand pairs (corner cases, then pseudo-random)
// against tb/dadda8_vectors.hex. Each line of that file is a (2 hex digits), b (2) and the
// expected 17-bit row sum (5), computed by a separate bit-level model of the same
// compressor network.
// Part 2 sweeps all 65536 operand pairs, compares with the exact product a*b and reports
// the error metrics of the multiplier: error rate ER, mean error distance MED, MED
// normalised by 255*255 (NMED) and mean relative error distance MRED (over non-zero
// products). The number of erroneous products and the summed error distance must equal the
// values of the reference model, and any product with a zero operand must be exact.
module tb_dadda8_reduce;
  import mac_pkg::*;

  localparam int NVEC        = 300;
  localparam int REF_ERRORS  = 64062;      // erroneous products over the full sweep
  localparam longint REF_SUM_ED = 29993152; // summed |approx - exact| over the full sweep

  logic [N-1:0]     a, b;
  logic [ROW_W-1:0] row_a, row_b;
  logic [35:0]      vec [NVEC];
  int checks = 0, failures = 0;

  dadda8_reduce dut (.a(a), .b(b), .row_a(row_a), .row_b(row_b));

  function automatic int unsigned prod_of(input logic [ROW_W-1:0] ra, input logic [ROW_W-1:0] rb);
    return int'(ra) + int'(rb);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p, ex, ed;
    longint sum_ed;
    int nerr, zero_bad;
    real mred;

    $readmemh("tb/dadda8_vectors.hex", vec);
    for (int i = 0; i < NVEC; i++) begin
      {a, b} = vec[i][35:20];
      #1;
      checks++;
      if (prod_of(row_a, row_b) != int'(vec[i][16:0])) begin
        failures++;
        $display("FAIL vector %0d: %0d x %0d gives %0d, expected %0d", i, a, b,
                 prod_of(row_a, row_b), vec[i][16:0]);
      end
    end

    nerr = 0; sum_ed = 0; mred = 0.0; zero_bad = 0;
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia); b = 8'(ib);
        #1;
        p  = prod_of(row_a, row_b);
        ex = ia * ib;
        ed = (p > ex) ? p - ex : ex - p;
        if (ed != 0) nerr++;
        sum_ed += ed;
        if (ex != 0) mred += real'(ed) / real'(ex);
        else if (p != 0) zero_bad++;
      end
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
    $display("error metrics over all 65536 pairs: ER=%0.2f%% MED=%0.2f NMED=%0.3e MRED=%0.3e",
             100.0 * nerr / 65536.0, real'(sum_ed) / 65536.0,
             real'(sum_ed) / 65536.0 / (255.0 * 255.0), mred / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
