// Stage controllers Q1 (IF), Q2 (ID), Q3 (EX), Q4 (WB).
//
// Four Q elements in a chain: the external request starts Q1, which runs one
// four-phase handshake with the fetch stage; its acknowledge starts Q2, and so
// on. When Q4 has finished its handshake with the write-back stage, ack rises
// to the outside. After req falls, the chain returns to zero and ack falls.
// One instruction therefore occupies exactly one stage at a time: fetch,
// decode, execute and write back run strictly in sequence.
//
// Interface: lo[i] is the request to stage i (0 = IF ... 3 = WB), li[i] its
// acknowledge. No clock.
//
// Origin: four chained Q elements, one per stage (IF, ID, EX, WB), as in the original
// design. The clear input is an addition of this design.
//
// Tool notes: The Q elements contain C-element feedback loops, reported as circular logic.
module avr_control (
  input  logic       clr,
  input  logic       req,
  output logic       ack,
  output logic [3:0] lo,
  input  logic [3:0] li
);
  logic [4:0] u;
  assign u[0] = req;

  for (genvar i = 0; i < 4; i++) begin : g_q
    q_element u_q (.clr(clr), .ui(u[i]), .uo(u[i+1]), .lo(lo[i]), .li(li[i]));
  end

  assign ack = u[4];
endmodule
