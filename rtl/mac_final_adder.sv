// mac_final_adder: carry-propagate adder that closes both the multiplication and the
// accumulation.
//
// It adds the two rows left by the reduction tree and the accumulator value fed back into
// it, giving the next accumulator value, 2N+1 bits wide, modulo 2^(2N+1). With clear high
// the feedback is ignored, so the result is the new product alone: this starts a new
// accumulation. Feeding the accumulator back into the final adder (rather than adding a
// finished product in a separate adder) follows the block diagram; the clear input is this
// design's own. Written as a behavioural '+' so synthesis picks the adder architecture.
// Combinational.
module mac_final_adder
  import mac_pkg::*;
(
  input  logic [ROW_W-1:0] row_a,
  input  logic [ROW_W-1:0] row_b,
  input  logic [ACC_W-1:0] acc_fb,
  input  logic             clear,
  output logic [ACC_W-1:0] sum
);
  logic [ACC_W-1:0] fb;

  always_comb begin
    fb  = clear ? '0 : acc_fb;
    sum = ACC_W'(row_a) + ACC_W'(row_b) + fb;
  end
endmodule
