// mac_pkg: sizes shared by the 32-bit multiply-accumulate unit.
//
// The MAC multiplies two 32-bit unsigned operands into a 64-bit product
// and adds it to a 64-bit running sum. The 64-bit adder is split into
// 8-bit Kogge-Stone blocks. All three sizes are the ones the design is
// specified with; the split of the adder into 8-bit blocks is part of
// that specification too.
package mac_pkg;
  localparam int unsigned MAC_W   = 32;          // operand width (product and accumulator: 2*MAC_W)
  localparam int unsigned KS_BLK  = 8;           // width of one Kogge-Stone block
endpackage
