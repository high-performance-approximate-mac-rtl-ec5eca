// tb_mac_final_adder: drives random rows, feedback values and clear, and compares the sum
// with row_a + row_b + (clear ? 0 : acc_fb) taken modulo 2^17. Includes the extreme values
// so that the wrap-around of the 17-bit result is exercised.
module tb_mac_final_adder;
  import mac_pkg::*;

  logic [ROW_W-1:0] row_a, row_b;
  logic [ACC_W-1:0] acc_fb, sum;
  logic             clear;
  int checks = 0, failures = 0;

  mac_final_adder dut (.row_a(row_a), .row_b(row_b), .acc_fb(acc_fb), .clear(clear), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expv;
    for (int i = 0; i < 2000; i++) begin
      if (i == 0) begin
        row_a = '1; row_b = '1; acc_fb = '1; clear = 1'b0;
      end else if (i == 1) begin
        row_a = '1; row_b = '1; acc_fb = '1; clear = 1'b1;
      end else begin
        row_a  = ROW_W'($urandom);
        row_b  = ROW_W'($urandom);
        acc_fb = ACC_W'($urandom);
        clear  = 1'($urandom);
      end
      #1;
      expv = (longint'(row_a) + longint'(row_b) + (clear ? 0 : longint'(acc_fb))) % (1 << ACC_W);
      checks++;
      if (longint'(sum) != expv) begin
        failures++;
        $display("FAIL %0d + %0d + %0d (clear=%b) gives %0d, expected %0d",
                 row_a, row_b, acc_fb, clear, sum, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
