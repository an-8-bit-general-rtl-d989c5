// apb_gpio_fsm: control state machine of the APB GPIO controller.
//
// Eight states: START (entered from reset and after every transfer), SELECT,
// a write loop WRITE -> (DELAY) -> END_WRITE and a read loop
// READ -> (DELAY) -> END_READ. As in the AXI4-Lite controller, vel high
// skips the DELAY state.
//
//   START      one idle cycle, then SELECT.
//   SELECT     waits for the access phase (PSEL and PENABLE high), captures
//              PADDR and branches on PWRITE: high to WRITE, low to READ.
//   WRITE      enables the write decoder while PSEL is high (PWDATA is
//              stable for the whole access phase).
//   READ       enables the read decoder while PSEL is high.
//   END_*      raise PREADY for one cycle, which ends the access phase.
// The read-data register loads as the state before END_READ is left, so
// PRDATA is valid while PREADY is high.
//
// Timing: with vel=1 a transfer has an access phase of three cycles (two
// wait states); vel=0 adds one. The START cycle after each transfer falls
// in the next transfer's setup phase, so back-to-back transfers need no
// extra idle cycle.
//
// The states and the PWRITE/VEL transitions follow the published state
// diagram, and PENABLE/PSEL as the address-register and decoder enables
// follow the published datapath. Waiting in SELECT for the access phase and
// the meaning given to vel are this design's own choices.
module apb_gpio_fsm
  import gpio_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       vel,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  output logic       pready,
  output dp_ctrl_t   ctrl,
  output apb_state_e state
);

  apb_state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= APB_START;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d = state_q;
    pready  = 1'b0;
    ctrl    = '0;
    unique case (state_q)
      APB_START: state_d = APB_SELECT;
      APB_SELECT: begin
        if (psel && penable) begin
          ctrl.wa_load = 1'b1;
          ctrl.ra_load = 1'b1;
          state_d      = pwrite ? APB_WRITE : APB_READ;
        end
      end
      APB_WRITE: begin
        ctrl.wdec_en = psel;
        state_d      = vel ? APB_END_WRITE : APB_WDELAY;
      end
      APB_WDELAY: state_d = APB_END_WRITE;
      APB_END_WRITE: begin
        pready  = 1'b1;
        state_d = APB_START;
      end
      APB_READ: begin
        ctrl.rdec_en    = psel;
        ctrl.rdata_load = vel;
        state_d         = vel ? APB_END_READ : APB_RDELAY;
      end
      APB_RDELAY: begin
        ctrl.rdata_load = 1'b1;
        state_d         = APB_END_READ;
      end
      APB_END_READ: begin
        pready  = 1'b1;
        state_d = APB_START;
      end
      default: state_d = APB_START;
    endcase
  end

  assign state = state_q;

endmodule
