// axi_gpio: AXI4-Lite controller for an 8-bit GPIO port.
//
// A write to address A (pin A[2:0]) makes that pin an output: write-data
// bit 0 is the level it drives and bit 1 its drive strength. A read from
// address A makes pin A[2:0] an input and returns its level in RDATA[0]
// (RDATA[31:1] are zero). Address bits above [2:0], WSTRB and the
// protection signals are not used, so the controller answers to any
// address the interconnect routes to it; every response is OKAY.
//
// The controller is the state machine axi_gpio_fsm steering the register
// datapath gpio_datapath. One transaction is handled at a time. Latency
// with vel=1: BVALID two cycles after AWVALID (with WVALID present),
// RVALID two cycles after ARVALID; vel=0 adds one cycle to each.
//
// The pad-side ports connect straight to eight GPIO pad cells: pad_i (data
// out, I), pad_ds (drive strength, DS), pad_ie (input enable, IE, active
// high), pad_oen (output enable, OEN, active low) and pad_c (input level
// from the cell, C).
//
// The split into a state machine and a datapath, the pad-side signal names
// and the 32-bit bus follow the original design; ignoring the upper address
// bits, WSTRB and the protection signals, and answering OKAY only, are this
// design's choices. The state output of the state machine is for
// observation in simulation and is not used here.
module axi_gpio
  import gpio_pkg::*;
#(
  parameter int unsigned PINS = NUM_PINS
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic              vel,
  // write address channel
  input  logic              awvalid,
  output logic              awready,
  input  logic [ADDR_W-1:0] awaddr,
  // write data channel
  input  logic              wvalid,
  output logic              wready,
  input  logic [DATA_W-1:0] wdata,
  // write response channel
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  // read address channel
  input  logic              arvalid,
  output logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  // read data channel
  output logic              rvalid,
  input  logic              rready,
  output logic [DATA_W-1:0] rdata,
  output logic [1:0]        rresp,
  // pad cells
  input  logic [PINS-1:0]   pad_c,
  output logic [PINS-1:0]   pad_i,
  output logic [PINS-1:0]   pad_ds,
  output logic [PINS-1:0]   pad_ie,
  output logic [PINS-1:0]   pad_oen
);

  dp_ctrl_t   ctrl;
  axi_state_e state;

  axi_gpio_fsm u_fsm (
    .clk     (aclk),
    .rst_n   (aresetn),
    .vel     (vel),
    .awvalid (awvalid),
    .awready (awready),
    .wvalid  (wvalid),
    .wready  (wready),
    .bvalid  (bvalid),
    .bready  (bready),
    .arvalid (arvalid),
    .arready (arready),
    .rvalid  (rvalid),
    .rready  (rready),
    .ctrl    (ctrl),
    .state   (state)
  );

  gpio_datapath #(.PINS(PINS)) u_dp (
    .clk     (aclk),
    .rst_n   (aresetn),
    .ctrl    (ctrl),
    .waddr   (awaddr),
    .wdata   (wdata[WBITS-1:0]),
    .raddr   (araddr),
    .rdata   (rdata),
    .pad_c   (pad_c),
    .pad_i   (pad_i),
    .pad_ds  (pad_ds),
    .pad_ie  (pad_ie),
    .pad_oen (pad_oen)
  );

  assign bresp = RESP_OKAY;
  assign rresp = RESP_OKAY;

  // AXI handshake rules on the slave side: a raised VALID stays up, with
  // its payload unchanged, until the matching READY.
  a_bvalid_hold : assert property (@(posedge aclk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid);
  a_rvalid_hold : assert property (@(posedge aclk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid && $stable(rdata));
  a_aw_w_together : assert property (@(posedge aclk) disable iff (!aresetn)
    awready == wready);

endmodule
