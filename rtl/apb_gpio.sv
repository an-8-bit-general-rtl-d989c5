// apb_gpio: APB controller for an 8-bit GPIO port.
//
// Same register behaviour as the AXI4-Lite controller: a write to PADDR
// makes pin PADDR[2:0] an output driving PWDATA[0] with drive strength
// PWDATA[1]; a read makes it an input and returns its level in PRDATA[0].
// Address bits above [2:0] and the upper write-data bits are not used.
//
// The controller is the state machine apb_gpio_fsm steering the register
// datapath gpio_datapath. PREADY is raised for one cycle at the end of
// every transfer; with vel=1 the access phase lasts three cycles, vel=0
// adds one. PSLVERR is not provided (every transfer succeeds).
//
// The pad-side ports connect straight to eight GPIO pad cells, as in
// axi_gpio.
//
// The state machine / datapath split, PADDR feeding both address registers
// and the pad-side signal names follow the original design; leaving out
// PSLVERR and ignoring the upper address bits are this design's choices.
// The state output of the state machine is for observation in simulation
// and is not used here.
module apb_gpio
  import gpio_pkg::*;
#(
  parameter int unsigned PINS = NUM_PINS
) (
  input  logic              pclk,
  input  logic              presetn,
  input  logic              vel,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [ADDR_W-1:0] paddr,
  input  logic [DATA_W-1:0] pwdata,
  output logic [DATA_W-1:0] prdata,
  output logic              pready,
  // pad cells
  input  logic [PINS-1:0]   pad_c,
  output logic [PINS-1:0]   pad_i,
  output logic [PINS-1:0]   pad_ds,
  output logic [PINS-1:0]   pad_ie,
  output logic [PINS-1:0]   pad_oen
);

  dp_ctrl_t   ctrl;
  apb_state_e state;

  apb_gpio_fsm u_fsm (
    .clk     (pclk),
    .rst_n   (presetn),
    .vel     (vel),
    .psel    (psel),
    .penable (penable),
    .pwrite  (pwrite),
    .pready  (pready),
    .ctrl    (ctrl),
    .state   (state)
  );

  gpio_datapath #(.PINS(PINS)) u_dp (
    .clk     (pclk),
    .rst_n   (presetn),
    .ctrl    (ctrl),
    .waddr   (paddr),
    .wdata   (pwdata[WBITS-1:0]),
    .raddr   (paddr),
    .rdata   (prdata),
    .pad_c   (pad_c),
    .pad_i   (pad_i),
    .pad_ds  (pad_ds),
    .pad_ie  (pad_ie),
    .pad_oen (pad_oen)
  );

  // APB rule: PREADY completes an access phase, so it is only raised while
  // the slave is selected and enabled.
  a_pready_in_access : assert property (@(posedge pclk) disable iff (!presetn)
    pready |-> psel && penable);

endmodule
