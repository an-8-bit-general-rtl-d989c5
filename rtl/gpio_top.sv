// gpio_top: the two proposed GPIO controllers side by side.
//
// The GPIO port can be served by either of two bus controllers of equal
// function: axi_gpio on an AXI4-Lite bus or apb_gpio on an APB bus. Each
// has its own clock, reset, bus port, speed select (vel) and set of eight
// pad-cell control ports, so either can be connected to its own eight pad
// cells. The pad cells themselves (ESD protection, Schmitt trigger, level
// shifters, pull-down, tri-state control and drivers) are analog circuits
// outside this RTL; their digital pins C, I, DS, IE and OEN are the ports
// below.
//
// Both controllers are proposed in the original design as alternatives for
// the same port; placing them side by side in one top, each with separate
// clocks and ports, is this design's choice so that both can be built and
// simulated together. No logic is shared between them.
module gpio_top
  import gpio_pkg::*;
#(
  parameter int unsigned PINS = NUM_PINS
) (
  // AXI4-Lite controller
  input  logic              axi_aclk,
  input  logic              axi_aresetn,
  input  logic              axi_vel,
  input  logic              axi_awvalid,
  output logic              axi_awready,
  input  logic [ADDR_W-1:0] axi_awaddr,
  input  logic              axi_wvalid,
  output logic              axi_wready,
  input  logic [DATA_W-1:0] axi_wdata,
  output logic              axi_bvalid,
  input  logic              axi_bready,
  output logic [1:0]        axi_bresp,
  input  logic              axi_arvalid,
  output logic              axi_arready,
  input  logic [ADDR_W-1:0] axi_araddr,
  output logic              axi_rvalid,
  input  logic              axi_rready,
  output logic [DATA_W-1:0] axi_rdata,
  output logic [1:0]        axi_rresp,
  input  logic [PINS-1:0]   axi_pad_c,
  output logic [PINS-1:0]   axi_pad_i,
  output logic [PINS-1:0]   axi_pad_ds,
  output logic [PINS-1:0]   axi_pad_ie,
  output logic [PINS-1:0]   axi_pad_oen,
  // APB controller
  input  logic              apb_pclk,
  input  logic              apb_presetn,
  input  logic              apb_vel,
  input  logic              apb_psel,
  input  logic              apb_penable,
  input  logic              apb_pwrite,
  input  logic [ADDR_W-1:0] apb_paddr,
  input  logic [DATA_W-1:0] apb_pwdata,
  output logic [DATA_W-1:0] apb_prdata,
  output logic              apb_pready,
  input  logic [PINS-1:0]   apb_pad_c,
  output logic [PINS-1:0]   apb_pad_i,
  output logic [PINS-1:0]   apb_pad_ds,
  output logic [PINS-1:0]   apb_pad_ie,
  output logic [PINS-1:0]   apb_pad_oen
);

  axi_gpio #(.PINS(PINS)) u_axi_gpio (
    .aclk    (axi_aclk),
    .aresetn (axi_aresetn),
    .vel     (axi_vel),
    .awvalid (axi_awvalid),
    .awready (axi_awready),
    .awaddr  (axi_awaddr),
    .wvalid  (axi_wvalid),
    .wready  (axi_wready),
    .wdata   (axi_wdata),
    .bvalid  (axi_bvalid),
    .bready  (axi_bready),
    .bresp   (axi_bresp),
    .arvalid (axi_arvalid),
    .arready (axi_arready),
    .araddr  (axi_araddr),
    .rvalid  (axi_rvalid),
    .rready  (axi_rready),
    .rdata   (axi_rdata),
    .rresp   (axi_rresp),
    .pad_c   (axi_pad_c),
    .pad_i   (axi_pad_i),
    .pad_ds  (axi_pad_ds),
    .pad_ie  (axi_pad_ie),
    .pad_oen (axi_pad_oen)
  );

  apb_gpio #(.PINS(PINS)) u_apb_gpio (
    .pclk    (apb_pclk),
    .presetn (apb_presetn),
    .vel     (apb_vel),
    .psel    (apb_psel),
    .penable (apb_penable),
    .pwrite  (apb_pwrite),
    .paddr   (apb_paddr),
    .pwdata  (apb_pwdata),
    .prdata  (apb_prdata),
    .pready  (apb_pready),
    .pad_c   (apb_pad_c),
    .pad_i   (apb_pad_i),
    .pad_ds  (apb_pad_ds),
    .pad_ie  (apb_pad_ie),
    .pad_oen (apb_pad_oen)
  );

endmodule
