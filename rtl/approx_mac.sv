// approx_mac: multiply-accumulate unit built on the approximate 8x8 Dadda multiplier with
// majority-logic compressors.
//
// Each cycle with valid high, the unit forms the approximate product of the unsigned
// operands a and b and adds it to the accumulator: acc <= acc + a*b (approximately), modulo
// 2^17. With clear high as well, the accumulator is loaded with the product alone, which
// starts a new dot product. The datapath is: partial products and two-stage reduction
// (dadda8_reduce) -> final adder that also takes the accumulator feedback
// (mac_final_adder) -> 17-bit accumulator register (mac_accumulator).
//
// Timing: a, b, valid and clear are sampled at the rising edge of clk; acc shows the
// updated sum right after that edge, so one MAC completes per cycle with one cycle of
// latency and no stalls. rst_n is active low and asynchronous. The structure and the 2N+1
// accumulator width follow the design; valid, clear and the reset are this design's own.
module approx_mac
  import mac_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             clear,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [ACC_W-1:0] acc
);
  logic [ROW_W-1:0] row_a, row_b;
  logic [ACC_W-1:0] acc_next;

  dadda8_reduce   u_mult (.a(a), .b(b), .row_a(row_a), .row_b(row_b));

  mac_final_adder u_fadd (.row_a(row_a), .row_b(row_b), .acc_fb(acc),
                          .clear(clear), .sum(acc_next));

  mac_accumulator u_acc  (.clk(clk), .rst_n(rst_n), .en(valid), .d(acc_next), .q(acc));
endmodule
