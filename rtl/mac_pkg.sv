// mac_pkg: sizes shared by the approximate MAC unit.
//
// The multiplier is the 8x8 unsigned Dadda multiplier of the design, so N = 8. Its two
// reduced rows are 2N bits wide. The accumulator path is 2N+1 bits wide, as the arrow
// between the final adder and the accumulator is labelled. N is fixed by the hand-placed
// compressor netlist in dadda8_reduce; the widths below are derived from it.
package mac_pkg;
  localparam int unsigned N      = 8;          // operand width (8x8 multiplier)
  localparam int unsigned ROW_W  = 2 * N;      // width of each reduced row / exact product
  localparam int unsigned ACC_W  = 2 * N + 1;  // accumulator width, "2N+1"
endpackage
