// Dual-rail, four-phase, delay-insensitive micropipeline (STAGES stages).
//
// Each stage is a dual-rail register (one C-element per rail, so a rail goes
// high when the stage is enabled and the data rail is high, and returns low when
// both are low). The stage enable is a C-element joining the completion of the
// stage's input word (exclusive OR per bit) with the inverted acknowledge of
// the following stage. A stage's acknowledge is the completion of its own
// contents. A word presented at d_in_t/f is acknowledged on a_in; it ripples to
// d_out_t/f, where the receiver acknowledges it on a_out. Words alternate with
// spacers (all rails low), as four-phase dual-rail signalling requires.
//
// This is the thesis' replacement for the two-phase bundled-data micropipeline:
// one register per stage, dual-rail data, no matched delays. STAGES=4 and the
// structure follow the thesis; the per-rail C-element register is this
// design's reading of its "REG" box.
//
// Tool notes: Every stage is built from C-elements whose outputs feed back, so lint tools report
// circular logic and synthesis reports logic loops; both are the handshake's state.
// The acknowledge and completion vectors have one entry more than the stages so the
// generate loop stays uniform; the last entries are unused.
module dr_micropipeline #(
  parameter int unsigned W      = 8,
  parameter int unsigned STAGES = 4
) (
  input  logic         clr,
  input  logic [W-1:0] d_in_t,
  input  logic [W-1:0] d_in_f,
  output logic         a_in,
  output logic [W-1:0] d_out_t,
  output logic [W-1:0] d_out_f,
  input  logic         a_out
);
  logic [W-1:0] st_t [STAGES+1];
  logic [W-1:0] st_f [STAGES+1];
  logic [STAGES:0] ack;   // ack[i]: completion of stage i (ack[STAGES+1] is a_out)
  logic [STAGES-1:0] en;
  logic [STAGES:0] in_done;

  assign st_t[0] = d_in_t;
  assign st_f[0] = d_in_f;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic next_ack;
    if (s == STAGES - 1) begin : g_last
      assign next_ack = a_out;
    end else begin : g_mid
      assign next_ack = ack[s+1];
    end

    dr_done #(.W(W)) u_in_done (.clr(clr), .t(st_t[s]), .f(st_f[s]), .done(in_done[s]));
    c_element #(.INV_B(1'b1)) u_en (.clr(clr), .a(in_done[s]), .b(next_ack), .y(en[s]));

    for (genvar b = 0; b < W; b++) begin : g_bit
      c_element u_t (.clr(clr), .a(en[s]), .b(st_t[s][b]), .y(st_t[s+1][b]));
      c_element u_f (.clr(clr), .a(en[s]), .b(st_f[s][b]), .y(st_f[s+1][b]));
    end

    dr_done #(.W(W)) u_out_done (.clr(clr), .t(st_t[s+1]), .f(st_f[s+1]), .done(ack[s]));
  end

  assign in_done[STAGES] = 1'b0;
  assign ack[STAGES]     = a_out;
  assign a_in    = ack[0];
  assign d_out_t = st_t[STAGES];
  assign d_out_f = st_f[STAGES];
endmodule
