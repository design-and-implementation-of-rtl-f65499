// Completion detector for a dual-rail word.
//
// Each bit's two rails are combined by an exclusive OR (a valid bit has exactly
// one rail high); done rises when every bit is valid and falls only when every
// bit has returned to the spacer, the hysteresis coming from a C-element that
// joins "all bits valid" with "any rail high".
//
// Origin: completion detection by XOR of the rails follows the original design; the
// C-element that also waits for the spacer is this design's own choice.
//
// Interface: t/f are the rails of a W-bit word, clr forces done low. Timing: done
// follows the rails after the gate delays only; there is no clock.
//
// Tool notes: the C-element's feedback is reported as circular logic; it is the
// intended hysteresis.
module dr_done #(
  parameter int unsigned W = 8
) (
  input  logic         clr,
  input  logic [W-1:0] t,
  input  logic [W-1:0] f,
  output logic         done
);
  logic all_valid, any_high;
  assign all_valid = &(t ^ f);
  assign any_high  = |(t | f);

  c_element u_c (.clr(clr), .a(all_valid), .b(any_high), .y(done));
endmodule
