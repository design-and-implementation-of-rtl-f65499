// One-rail to two-rail converter for the instruction word.
//
// Each one-rail bit y is split into a true rail (strobe AND y) and a false rail
// (strobe AND NOT y). While strobe is low both rails are low, the spacer; this
// stands for the differential line driver being disabled and the pull-down
// resistors on its outputs returning them to zero, which is what ends the
// four-phase handshake with the memory.
//
// Interface: strobe (enable), y (W one-rail bits) in; z_t/z_f (W dual-rail bits)
// out. Timing: combinational; the enable must rise only after y has settled.
//
// Origin: in the original board this is a differential line driver whose outputs float
// when disabled and are pulled low by resistors; here both rails are simply driven low.
module single_to_dual #(
  parameter int unsigned W = 16
) (
  input  logic         strobe,
  input  logic [W-1:0] y,
  output logic [W-1:0] z_t,
  output logic [W-1:0] z_f
);
  assign z_t = {W{strobe}} & y;
  assign z_f = {W{strobe}} & ~y;
endmodule
