// Behavioural model of the program memory: two byte-wide EPROMs (8K x 8, of
// which the first 256 words are addressed) enabled in parallel, one holding
// bits 0-7 and the other bits 8-15 of each 16-bit word. The output follows the
// address ACCESS time units after a change while the active-low output enable
// is low; while it is high the output floats, modelled as all ones.
//
// The timing figure is this design's own choice; the two-byte organisation follows the
// original board.
module eprom16_model #(
  parameter int ACCESS = 120
) (
  input  logic [7:0]  addr,
  input  logic        oe_n,
  output logic [15:0] data
);
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] lo_byte [256];
  logic [7:0] hi_byte [256];

  initial data = 16'hFFFF;

  always @(addr or oe_n) begin
    #(ACCESS);
    data = oe_n ? 16'hFFFF : {hi_byte[addr], lo_byte[addr]};
  end

  function automatic void load(input int a, input logic [15:0] w);
    lo_byte[a] = w[7:0];
    hi_byte[a] = w[15:8];
  endfunction
endmodule
