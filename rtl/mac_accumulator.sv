// mac_accumulator: the (2N+1)-bit accumulator register of the MAC unit.
//
// On a rising clock edge with en high it stores d, the output of the final adder; with en
// low it holds its value. An active-low asynchronous reset clears it to zero. Its output is
// both the MAC result and the feedback into the final adder. The register and its width
// follow the block diagram; the enable and the reset are this design's own.
module mac_accumulator
  import mac_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [ACC_W-1:0] d,
  output logic [ACC_W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
