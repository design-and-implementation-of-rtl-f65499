// Two-rail to one-rail converter for the program address.
//
// The one-rail address y is the true rail of each dual-rail bit. For every bit
// the two rails are ORed (the bit is present), and a C-element tree joins those
// ORs into strobe: strobe rises only when every address bit is valid and falls
// only when every bit has returned to the spacer. The strobe is thus later
// than the address it qualifies, and serves as the memory's read enable.
// The OR/C-element structure is the one of the published two-bit circuit,
// extended to W bits by a tree of two-input C-elements.
//
// Origin: the true rails as address and a C-element combination of the rails as strobe
// follow the original interface, as does the OR of each bit's two rails; arranging
// the C-elements as a tree for eight bits is this design's own choice.
//
// Tool notes: The C-element tree holds state through feedback, reported as circular logic.
module dual_to_single #(
  parameter int unsigned W = 8
) (
  input  logic         clr,
  input  logic [W-1:0] x_t,
  input  logic [W-1:0] x_f,
  output logic [W-1:0] y,
  output logic         strobe
);
  // C-element tree over the per-bit ORs; node 1 is the root, leaves W..2W-1
  logic [2*W-1:1] node;

  for (genvar i = 0; i < W; i++) begin : g_leaf
    assign node[W+i] = x_t[i] | x_f[i];
  end

  for (genvar n = 1; n < W; n++) begin : g_tree
    c_element u_c (.clr(clr), .a(node[2*n]), .b(node[2*n+1]), .y(node[n]));
  end

  assign strobe = node[1];

  assign y = x_t;
endmodule
