// Dual-rail register: one of the LATCH fields of the core (PC, NPC, IR, OPCODE,
// SRC, DST, DST INDEX, DST RESULT, ...).
//
// Capture side: while cap is high the register waits for a complete dual-rail
// word on (d_t, d_f), stores it and raises ack. ack is derived from the stored
// contents (it rises only once the stored value equals the presented word), so
// the acknowledgement cannot overtake the data. Once high, ack stays high until
// the input has returned to the spacer (all rails low), whatever cap does: the
// sender can only start its next word after the register has seen this one
// withdrawn, which keeps the hand-over independent of the sender's delays
// (four-phase return to zero).
// Show side: while show is high the contents are driven as a valid dual-rail
// word on (q_t, q_f); otherwise the outputs rest at the spacer (all zeros).
// val is the contents in plain binary, for local use.
//
// Timing: no clock. Storage is a level-sensitive latch, open while cap is high
// and the input is complete; clr loads RESET_VAL. A register never captures and
// shows in the same handshake in this core, so no path runs through the latch.
// Following the original design, each register is a single latch with four-phase,
// dual-rail hand-over; the single-rail storage inside is this design's choice.
//
// Tool notes: The storage is a level-sensitive latch by design (there is no clock), so synthesis
// infers a latch. ack holds its own state through feedback (like a C-element),
// which lint tools report as circular logic. The val output is only used by some instances; unused copies are
// reported as unused signals.
module dr_reg #(
  parameter int unsigned W         = 8,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clr,
  input  logic         cap,
  input  logic [W-1:0] d_t,
  input  logic [W-1:0] d_f,
  output logic         ack,
  input  logic         show,
  output logic [W-1:0] q_t,
  output logic [W-1:0] q_f,
  output logic [W-1:0] val
);
  logic complete_in;
  assign complete_in = &(d_t ^ d_f);

  always_latch begin
    if (clr)                     val = RESET_VAL;
    else if (cap && complete_in) val = d_t;
  end

  // set: captured and matching; hold: until every input rail is low
  assign ack = ~clr & ((cap & complete_in & (val == d_t)) | (ack & (|(d_t | d_f))));
  assign q_t = show ? val  : '0;
  assign q_f = show ? ~val : '0;
endmodule
