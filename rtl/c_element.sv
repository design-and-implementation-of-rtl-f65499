// Muller C-element with clear.
//
// The output follows the inputs when they agree (both 1 gives 1, both 0 gives
// 0) and holds its value while they differ; this is the state-holding join of
// every handshake in the core. INV_B inverts the second input, as in the
// "primed" C-elements of a micropipeline control chain. clr forces the output
// to 0, the initial state of all C-elements.
//
// Timing: no clock. The gate is written as the classic majority function with
// its output fed back (y = ab + y(a + b)), which is how a C-element maps onto a
// single FPGA look-up table. The combinational loop through y is the state of
// the gate and is intended: lint tools report it as a loop.
//
// Tool notes: The output feeds back into its own logic: that loop is the state of the gate, and lint
// tools report it as circular combinational logic (and synthesis as a logic loop).
module c_element #(
  parameter bit INV_B = 1'b0
) (
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic y
);
  logic bb;
  assign bb = b ^ INV_B;

  assign y = ~clr & ((a & bb) | (y & (a | bb)));
endmodule
