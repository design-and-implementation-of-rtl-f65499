// Asynchronous AVR microcontroller on its test board (top level).
//
// The clockless core (async_avr) is run by a small synchronous control block
// (test_controller, 50 MHz) that clears it and hands it one instruction
// request after another. Program words come from an external memory of two
// byte-wide EPROMs read in parallel (bits 0-7 and 8-15). Between the core's
// dual-rail world and the one-rail memory sit two converters: dual_to_single
// turns the dual-rail address into a one-rail address plus a read strobe,
// single_to_dual turns the returned word into dual-rail under the line driver
// enable. R31 is visible on led (complemented, for LEDs that light on low).
//
// Beside the processor, and not connected to it, the top carries the
// stand-alone dual-rail four-stage micropipeline (mp_* ports) that shows the
// pipeline style the core is built in.
//
// Ports:
//   clk_50mhz, reset_btn_n  board clock and reset button (active low)
//   eprom_addr, eprom_oe_n  memory address and active-low output enable
//   eprom_data              16-bit program word from the memory
//   led                     complemented R31 output register
//   instr_count             completed instructions
//   mp_*                    micropipeline data in/out and acknowledges
//
// Origin: the block split (control block with 50 MHz clock and reset stretching, converters,
// two EPROMs, R31 on LEDs) follows the original test board. The complemented LED register,
// the delayed data-driver enable and the side-by-side micropipeline are own choices.
//
// Tool notes: The core's handshake loops appear here as circular logic and latches (see async_avr).
// The r31, sreg and wb_bypass outputs of the core are left unconnected at this level
// (reported as unused); the testbench observes them through the hierarchy.
module avr_system #(
  parameter int unsigned RESET_CYCLES  = 1_000_000,
  parameter int unsigned ACCESS_CYCLES = 13,
  parameter int unsigned MP_W          = 8,
  parameter int unsigned MP_STAGES     = 4
) (
  input  logic                 clk_50mhz,
  input  logic                 reset_btn_n,
  output logic [7:0]           eprom_addr,
  output logic                 eprom_oe_n,
  input  logic [15:0]          eprom_data,
  output logic [7:0]           led,
  output logic [31:0]          instr_count,
  input  logic                 mp_clr,
  input  logic [MP_W-1:0]      mp_in_t, mp_in_f,
  output logic                 mp_in_ack,
  output logic [MP_W-1:0]      mp_out_t, mp_out_f,
  input  logic                 mp_out_ack
);
  logic        sim_clr, sim_req, sim_ack;
  logic [7:0]  addr_t, addr_f;
  logic [15:0] instr_t, instr_f;
  logic        read_enable, drv_enable;
  logic [7:0]  r31, sreg;
  logic        wb_bypass;

  test_controller #(.RESET_CYCLES(RESET_CYCLES), .ACCESS_CYCLES(ACCESS_CYCLES)) u_ctl (
    .clk(clk_50mhz), .rst_btn_n(reset_btn_n), .sim_clr(sim_clr), .sim_req(sim_req),
    .sim_ack(sim_ack), .inv_enb_in(read_enable), .inv_enb_out(eprom_oe_n),
    .drv_enable(drv_enable), .instr_count(instr_count));

  async_avr u_avr (
    .clr(sim_clr), .req(sim_req), .ack(sim_ack), .addr_t(addr_t), .addr_f(addr_f),
    .instr_t(instr_t), .instr_f(instr_f), .r31(r31), .r31_out(led), .sreg(sreg),
    .wb_bypass(wb_bypass));

  dual_to_single #(.W(8)) u_d2s (
    .clr(sim_clr), .x_t(addr_t), .x_f(addr_f), .y(eprom_addr), .strobe(read_enable));

  single_to_dual #(.W(16)) u_s2d (
    .strobe(drv_enable), .y(eprom_data), .z_t(instr_t), .z_f(instr_f));

  dr_micropipeline #(.W(MP_W), .STAGES(MP_STAGES)) u_mp (
    .clr(mp_clr), .d_in_t(mp_in_t), .d_in_f(mp_in_f), .a_in(mp_in_ack),
    .d_out_t(mp_out_t), .d_out_f(mp_out_f), .a_out(mp_out_ack));
endmodule
