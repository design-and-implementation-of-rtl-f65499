// General purpose register file: 32 registers of 8 bits, two read ports, one
// write port, with R31 brought out for observation.
//
// Read ports: an index arrives as a dual-rail word (ra_t/f, rb_t/f). As soon
// as it is complete the port answers with the register's contents as a
// dual-rail word; when the index returns to the spacer so does the answer.
// Write port: while wreq is high and both the index (wa) and the data (wd) are
// complete, the addressed register is loaded; wack rises once it holds the
// data and falls with wreq.
// Observation: r31 is the current contents of R31. r31_out is an output
// register that shows R31 in complemented form (for LEDs that light on a low
// level): it is cleared to 0 by clr and reloaded with ~data on every write to
// R31, so it reads 00 after clear and FF after R31 is first loaded with 0.
//
// Timing: no clock. Every register is a latch open only during its write
// handshake. clr clears all registers to zero.
//
// Tool notes: The 32 registers are level-sensitive latches (no clock), so synthesis infers latches.
module regfile (
  input  logic       clr,
  input  logic [4:0] ra_t, ra_f,
  output logic [7:0] rda_t, rda_f,
  input  logic [4:0] rb_t, rb_f,
  output logic [7:0] rdb_t, rdb_f,
  input  logic       wreq,
  input  logic [4:0] wa_t, wa_f,
  input  logic [7:0] wd_t, wd_f,
  output logic       wack,
  output logic [7:0] r31,
  output logic [7:0] r31_out
);
  logic [7:0] rf [32];
  logic       wr_ok;

  assign wr_ok = wreq & (&(wa_t ^ wa_f)) & (&(wd_t ^ wd_f));

  for (genvar i = 0; i < 32; i++) begin : g_reg
    logic [7:0] r;
    always_latch begin
      if (clr)                              r = 8'h00;
      else if (wr_ok && wa_t == 5'(i))      r = wd_t;
    end
    assign rf[i] = r;
  end

  always_latch begin
    if (clr)                          r31_out = 8'h00;
    else if (wr_ok && wa_t == 5'd31)  r31_out = ~wd_t;
  end

  assign wack = wr_ok & (rf[wa_t] == wd_t);

  logic a_ok, b_ok;
  assign a_ok  = &(ra_t ^ ra_f);
  assign b_ok  = &(rb_t ^ rb_f);
  assign rda_t = a_ok ? rf[ra_t]  : 8'h00;
  assign rda_f = a_ok ? ~rf[ra_t] : 8'h00;
  assign rdb_t = b_ok ? rf[rb_t]  : 8'h00;
  assign rdb_f = b_ok ? ~rf[rb_t] : 8'h00;
  assign r31   = rf[31];
endmodule
