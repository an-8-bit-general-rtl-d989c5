// gpio_pkg: constants and state types shared by the 8-bit GPIO controllers.
//
// The GPIO port has eight pins, each selected by the low three bits of a
// 32-bit bus address. Every write transfers two bits per pin (pad data and
// drive strength); every read returns the level of one pin zero-extended to
// the 32-bit bus. The two controller state machines (AXI4-Lite and APB) share
// the same shape: a start state, a write loop and a read loop, each loop
// with an optional DELAY state that gives the pad one more cycle.
//
// The pin count, the 3-bit pin select, the 32-bit bus and the two write
// bits come from the original design; the bit positions of the two write
// bits, the state encodings and the strobe bundle are this design's choices.
package gpio_pkg;

  localparam int unsigned NUM_PINS = 8;   // pins of the GPIO port
  localparam int unsigned ADDR_W   = 32;  // bus address width
  localparam int unsigned DATA_W   = 32;  // bus data width
  localparam int unsigned WBITS    = 2;   // write-data bits used per transfer

  // Position of the two used write-data bits.
  localparam int unsigned WBIT_DOUT = 0;  // value driven on the pad (I)
  localparam int unsigned WBIT_DS   = 1;  // drive-strength select (DS)

  // AXI4-Lite response code.
  localparam logic [1:0] RESP_OKAY = 2'b00;

  typedef enum logic [2:0] {
    AXI_START     = 3'd0,
    AXI_WRITE     = 3'd1,
    AXI_WDELAY    = 3'd2,
    AXI_END_WRITE = 3'd3,
    AXI_READ      = 3'd4,
    AXI_RDELAY    = 3'd5,
    AXI_END_READ  = 3'd6
  } axi_state_e;

  typedef enum logic [2:0] {
    APB_START     = 3'd0,
    APB_SELECT    = 3'd1,
    APB_WRITE     = 3'd2,
    APB_WDELAY    = 3'd3,
    APB_END_WRITE = 3'd4,
    APB_READ      = 3'd5,
    APB_RDELAY    = 3'd6,
    APB_END_READ  = 3'd7
  } apb_state_e;

  // Control strobes from a controller state machine to the shared datapath.
  typedef struct packed {
    logic wa_load;     // capture the write address
    logic wdec_en;     // enable the write decoder (one W pulse)
    logic ra_load;     // capture the read address
    logic rdec_en;     // enable the read decoder (one R pulse)
    logic rdata_load;  // capture the selected pin into the read-data register
  } dp_ctrl_t;

endpackage
