// Test control block: the synchronous logic that runs the asynchronous core on
// the prototype board.
//
// Clocked by the board's 50 MHz oscillator. Its jobs:
//   Reset: while the reset button (active low) is pressed, and for
//     RESET_CYCLES clock cycles after it is released (20 ms at 50 MHz), sim_clr
//     is held high to clear the core.
//   Instruction handshake: after the clear it raises sim_req, waits for the
//     core's sim_ack, lowers sim_req, waits for sim_ack to fall, and starts
//     the next instruction, one four-phase handshake per instruction. A new
//     request is only raised while the memory interface is idle.
//   Memory enable: the core's read enable (inv_enb_in, active high) is
//     inverted for the memory's active-low output enable (inv_enb_out).
//     drv_enable, the enable of the one-rail to two-rail converter, follows
//     the read enable after the memory access time (ACCESS_CYCLES cycles) and
//     falls with it, so the instruction word is only presented once the memory
//     output has settled.
// sim_ack and inv_enb_in come from clockless logic and are synchronised by two
// flip-flops. instr_count counts completed instruction handshakes.
// The reset length and the handshake follow the thesis' description of the
// block; the access-time wait and the instruction counter are this design's.
module test_controller #(
  parameter int unsigned RESET_CYCLES  = 1_000_000,
  parameter int unsigned ACCESS_CYCLES = 13
) (
  input  logic        clk,
  input  logic        rst_btn_n,
  output logic        sim_clr,
  output logic        sim_req,
  input  logic        sim_ack,
  input  logic        inv_enb_in,
  output logic        inv_enb_out,
  output logic        drv_enable,
  output logic [31:0] instr_count
);
  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_REQ, S_RELEASE} state_e;

  state_e      state;
  logic [31:0] rst_cnt;
  logic [7:0]  acc_cnt;
  logic [1:0]  ack_sync, enb_sync;
  logic        ack_s, enb_s;

  assign ack_s = ack_sync[1];
  assign enb_s = enb_sync[1];

  always_ff @(posedge clk or negedge rst_btn_n) begin
    if (!rst_btn_n) begin
      ack_sync <= '0;
      enb_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], sim_ack};
      enb_sync <= {enb_sync[0], inv_enb_in};
    end
  end

  always_ff @(posedge clk or negedge rst_btn_n) begin
    if (!rst_btn_n) begin
      state       <= S_CLEAR;
      rst_cnt     <= '0;
      sim_clr     <= 1'b1;
      sim_req     <= 1'b0;
      instr_count <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          sim_clr <= 1'b1;
          sim_req <= 1'b0;
          if (rst_cnt >= RESET_CYCLES - 1) begin
            sim_clr <= 1'b0;
            state   <= S_IDLE;
          end else begin
            rst_cnt <= rst_cnt + 1;
          end
        end
        S_IDLE: begin
          if (!ack_s && !enb_s && !drv_enable) begin
            sim_req <= 1'b1;
            state   <= S_REQ;
          end
        end
        S_REQ: begin
          if (ack_s) begin
            sim_req <= 1'b0;
            state   <= S_RELEASE;
          end
        end
        S_RELEASE: begin
          if (!ack_s) begin
            instr_count <= instr_count + 1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  // memory access wait for the line driver enable
  always_ff @(posedge clk or negedge rst_btn_n) begin
    if (!rst_btn_n) begin
      acc_cnt    <= '0;
      drv_enable <= 1'b0;
    end else if (!enb_s) begin
      acc_cnt    <= '0;
      drv_enable <= 1'b0;
    end else if (acc_cnt >= 8'(ACCESS_CYCLES)) begin
      drv_enable <= 1'b1;
    end else begin
      acc_cnt <= acc_cnt + 1;
    end
  end

  assign inv_enb_out = ~inv_enb_in;
endmodule
