// Q element: a four-phase sequencer cell.
//
// A request on the upper port (ui rising) is turned into one complete
// four-phase handshake on the lower port (lo up, li up, lo down, li down);
// only then is the upper request acknowledged (uo rising). uo falls again after
// ui falls. Chaining uo of one cell into ui of the next runs the lower
// handshakes strictly one after another, which is how the core's stage
// controllers Q1..Q4 and the fetch sub-steps Q1_1..Q1_3 are built.
//
// Structure: a C-element joins ui and li; lo = ui and not C, uo = C and not li.
// The signal names and the order of events (ui, lo, li, lo, li, uo) are those of
// the element's published timing diagram; the gate equations are the simplest
// that produce that order.
//
// Origin: the port names, the gate form (one C-element and two AND gates with one
// inverted input each) and the behaviour follow the original Q element; the clear
// input is this design's own addition.
//
// Tool notes: The C-element inside makes a feedback loop; the circular-logic warnings it causes are
// the intended state holding of the gate.
module q_element (
  input  logic clr,
  input  logic ui,   // request from the upper (calling) side
  output logic uo,   // acknowledge to the upper side
  output logic lo,   // request to the lower (called) side
  input  logic li    // acknowledge from the lower side
);
  logic c;

  c_element u_c (.clr(clr), .a(ui), .b(li), .y(c));

  assign lo = ui & ~c;
  assign uo = c & ~li;
endmodule
