// gpio_datapath: the register datapath between a 32-bit bus and eight GPIO
// pad cells, shared by the AXI4-Lite and the APB controller.
//
// Write side: a write-address register loads the bus address on
// ctrl.wa_load; its bits [2:0] feed a 3-to-8 decoder that, while
// ctrl.wdec_en is high, raises one bit of W. W[i] loads write-data bits
// [1:0] into pin i's output register: bit 0 becomes the pad data out (I)
// and bit 1 the pad drive strength (DS).
// Read side: a read-address register loads on ctrl.ra_load; its bits [2:0]
// select one of the eight pad inputs (C) through an 8:1 mux, and a second
// decoder, enabled by ctrl.rdec_en, raises one bit of R. The mux output,
// zero-extended to 32 bits, is captured in the read-data register on
// ctrl.rdata_load.
// Direction: a per-pin register turns pin i into an output when W[i] pulses
// (OEN low, IE low) and into an input when R[i] pulses (IE high, OEN high).
// After reset every pin is an input-disabled, undriven pad (IE=0, OEN=1).
//
// Timing: every register updates on the rising clock edge one cycle after
// its strobe is sampled; W and R are combinational from the address
// registers, so IE/OEN change one cycle after the decoder strobe.
//
// The block split (two address registers, two decoders, the data-out/DS
// register, the input mux, the read-data register and the IE/OEN register)
// follows the published datapath drawing. The bit assignment of the write
// data, the OEN polarity, the set/clear meaning of the IE/OEN register, the
// zero-extension of the read data and the load enable on the read-data
// register are this design's own choices.
module gpio_datapath
  import gpio_pkg::*;
#(
  parameter int unsigned PINS = NUM_PINS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dp_ctrl_t          ctrl,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WBITS-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  // pad-cell side
  input  logic [PINS-1:0]   pad_c,    // pad input level after the input cell
  output logic [PINS-1:0]   pad_i,    // pad output data
  output logic [PINS-1:0]   pad_ds,   // drive strength
  output logic [PINS-1:0]   pad_ie,   // input enable, active high
  output logic [PINS-1:0]   pad_oen   // output enable, active low
);

  localparam int unsigned PSEL_W = (PINS > 1) ? $clog2(PINS) : 1;

  logic [PSEL_W-1:0] wsel_q, rsel_q;
  logic [PINS-1:0]   w_dec, r_dec;

  // Address registers: only the pin-select bits are kept.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel_q <= '0;
      rsel_q <= '0;
    end else begin
      if (ctrl.wa_load) wsel_q <= waddr[PSEL_W-1:0];
      if (ctrl.ra_load) rsel_q <= raddr[PSEL_W-1:0];
    end
  end

  // One-hot decoders, gated by their enables.
  always_comb begin
    w_dec = '0;
    r_dec = '0;
    if (ctrl.wdec_en && (32'(wsel_q) < PINS)) w_dec[wsel_q] = 1'b1;
    if (ctrl.rdec_en && (32'(rsel_q) < PINS)) r_dec[rsel_q] = 1'b1;
  end

  // Per-pin output data, drive strength and direction registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pad_i   <= '0;
      pad_ds  <= '0;
      pad_ie  <= '0;
      pad_oen <= '1;
    end else begin
      for (int p = 0; p < PINS; p++) begin
        if (w_dec[p]) begin
          pad_i[p]   <= wdata[WBIT_DOUT];
          pad_ds[p]  <= wdata[WBIT_DS];
          pad_oen[p] <= 1'b0;
          pad_ie[p]  <= 1'b0;
        end else if (r_dec[p]) begin
          pad_oen[p] <= 1'b1;
          pad_ie[p]  <= 1'b1;
        end
      end
    end
  end

  // Input mux and read-data register (no reset, as drawn).
  logic pin_sel;
  assign pin_sel = (32'(rsel_q) < PINS) ? pad_c[rsel_q] : 1'b0;

  always_ff @(posedge clk) begin
    if (ctrl.rdata_load) rdata <= DATA_W'(pin_sel);
  end

endmodule
