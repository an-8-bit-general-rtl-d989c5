// axi_gpio_fsm: control state machine of the AXI4-Lite GPIO controller.
//
// Seven states: START, a write loop WRITE -> (DELAY) -> END_WRITE and a
// read loop READ -> (DELAY) -> END_READ, both returning to START. The
// input vel selects the fast path: with vel high a loop goes straight to its
// END state, with vel low it passes through its DELAY state, which gives a
// pin that has just been switched to input one cycle to settle before it is
// sampled.
//
//   START      waits for AWVALID (write) or ARVALID (read); the address
//              is captured in the datapath as the state is left. A write
//              is taken first when both arrive together.
//   WRITE      waits for WVALID, then raises AWREADY and WREADY together
//              and enables the write decoder for that one cycle.
//   END_WRITE  holds BVALID (response OKAY) until BREADY.
//   READ       raises ARREADY and enables the read decoder for one cycle.
//   END_READ   holds RVALID until RREADY.
// The read-data register loads as the state before END_READ is left.
//
// Timing (vel=1): write AWVALID seen in cycle 0, AW/W handshake in cycle 1
// at the earliest, BVALID from cycle 2. Read ARVALID seen in cycle 0,
// ARREADY in cycle 1, RVALID from cycle 2. vel=0 adds one cycle to each.
//
// The states and their transitions on AWVALID, ARVALID, VEL, BREADY and
// RREADY follow the published state diagram. Waiting in WRITE for WVALID,
// the write-first priority, the meaning given to vel and the placement of
// the ready and decoder strobes are this design's own choices.
module axi_gpio_fsm
  import gpio_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     vel,
  input  logic     awvalid,
  output logic     awready,
  input  logic     wvalid,
  output logic     wready,
  output logic     bvalid,
  input  logic     bready,
  input  logic     arvalid,
  output logic     arready,
  output logic     rvalid,
  input  logic     rready,
  output dp_ctrl_t ctrl,
  output axi_state_e state
);

  axi_state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= AXI_START;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d = state_q;
    awready = 1'b0;
    wready  = 1'b0;
    bvalid  = 1'b0;
    arready = 1'b0;
    rvalid  = 1'b0;
    ctrl    = '0;
    unique case (state_q)
      AXI_START: begin
        if (awvalid) begin
          ctrl.wa_load = 1'b1;
          state_d      = AXI_WRITE;
        end else if (arvalid) begin
          ctrl.ra_load = 1'b1;
          state_d      = AXI_READ;
        end
      end
      AXI_WRITE: begin
        if (wvalid) begin
          awready      = 1'b1;
          wready       = 1'b1;
          ctrl.wdec_en = 1'b1;
          state_d      = vel ? AXI_END_WRITE : AXI_WDELAY;
        end
      end
      AXI_WDELAY: state_d = AXI_END_WRITE;
      AXI_END_WRITE: begin
        bvalid = 1'b1;
        if (bready) state_d = AXI_START;
      end
      AXI_READ: begin
        arready         = 1'b1;
        ctrl.rdec_en    = 1'b1;
        ctrl.rdata_load = vel;
        state_d         = vel ? AXI_END_READ : AXI_RDELAY;
      end
      AXI_RDELAY: begin
        ctrl.rdata_load = 1'b1;
        state_d         = AXI_END_READ;
      end
      AXI_END_READ: begin
        rvalid = 1'b1;
        if (rready) state_d = AXI_START;
      end
      default: state_d = AXI_START;
    endcase
  end

  assign state = state_q;

endmodule
