// tb_axi_gpio_fsm: self-checking test of the AXI4-Lite controller state
// machine.
//
// Each cycle the testbench sets the inputs, waits for the combinational
// outputs to settle and compares all of them (five handshake outputs, five
// datapath strobes) and the state with the value expected for that step of
// the scenario. Scenarios: fast and delayed write and read, a master that
// is late with WVALID, BREADY and RREADY held low for several cycles, and
// AWVALID and ARVALID raised together (write served first). The number of
// cycles from AWVALID/ARVALID to BVALID/RVALID is checked: 2 with vel=1 and
// 3 with vel=0 when the master responds at once.
module tb_axi_gpio_fsm;
  import gpio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, vel;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  dp_ctrl_t   ctrl;
  axi_state_e state;
  int checks = 0, failures = 0;

  axi_gpio_fsm dut (.*);

  always #5 clk = ~clk;

  // expected output vector: {awready, wready, bvalid, arready, rvalid,
  //                          wa_load, wdec_en, ra_load, rdec_en, rdata_load}
  typedef logic [9:0] outv_t;
  localparam outv_t O_NONE   = 10'b00000_00000;
  localparam outv_t O_WALOAD = 10'b00000_10000;
  localparam outv_t O_RALOAD = 10'b00000_00100;
  localparam outv_t O_WHS    = 10'b11000_01000;
  localparam outv_t O_B      = 10'b00100_00000;
  localparam outv_t O_ARF    = 10'b00010_00011;  // ARREADY, decode, load now
  localparam outv_t O_ARS    = 10'b00010_00010;  // ARREADY, decode
  localparam outv_t O_RLOAD  = 10'b00000_00001;
  localparam outv_t O_R      = 10'b00001_00000;

  // Apply inputs, check outputs and state, then take one clock.
  task automatic step(input logic aw, input logic w, input logic b,
                      input logic ar, input logic r,
                      input axi_state_e exp_state, input outv_t exp,
                      input string what);
    awvalid = aw; wvalid = w; bready = b; arvalid = ar; rready = r;
    #1;
    checks++;
    if ({awready, wready, bvalid, arready, rvalid, ctrl} !== exp ||
        state !== exp_state) begin
      failures++;
      $display("FAIL %s: state %s outputs %b expected %s %b", what,
               state.name(), {awready, wready, bvalid, arready, rvalid, ctrl},
               exp_state.name(), exp);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time t0;
  int  lat;

  initial begin
    vel = 1'b1;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // idle
    step(0,0,0,0,0, AXI_START, O_NONE, "idle");
    step(0,0,0,0,0, AXI_START, O_NONE, "idle");

    // fast write, master answers at once: BVALID two cycles after AWVALID
    t0 = $time;
    step(1,1,1,0,0, AXI_START,     O_WALOAD, "w fast start");
    step(1,1,1,0,0, AXI_WRITE,     O_WHS,    "w fast handshake");
    lat = int'(($time - t0) / 10);
    checks++; if (lat != 2) begin failures++; $display("FAIL write latency %0d", lat); end
    step(0,0,1,0,0, AXI_END_WRITE, O_B,      "w fast resp");
    step(0,0,0,0,0, AXI_START,     O_NONE,   "back to start");

    // delayed write, WVALID late, BREADY held off
    vel = 1'b0;
    step(1,0,0,0,0, AXI_START,     O_WALOAD, "w slow start");
    step(1,0,0,0,0, AXI_WRITE,     O_NONE,   "w wait wvalid");
    step(1,0,0,0,0, AXI_WRITE,     O_NONE,   "w wait wvalid");
    step(1,1,0,0,0, AXI_WRITE,     O_WHS,    "w slow handshake");
    step(0,0,0,0,0, AXI_WDELAY,    O_NONE,   "w delay");
    step(0,0,0,0,0, AXI_END_WRITE, O_B,      "w bvalid held");
    step(0,0,0,0,0, AXI_END_WRITE, O_B,      "w bvalid held");
    step(0,0,1,0,0, AXI_END_WRITE, O_B,      "w bready");
    step(0,0,0,0,0, AXI_START,     O_NONE,   "back to start");

    // fast read: RVALID two cycles after ARVALID
    vel = 1'b1;
    t0 = $time;
    step(0,0,0,1,1, AXI_START,     O_RALOAD, "r fast start");
    step(0,0,0,1,1, AXI_READ,      O_ARF,    "r fast arready");
    lat = int'(($time - t0) / 10);
    checks++; if (lat != 2) begin failures++; $display("FAIL read latency %0d", lat); end
    step(0,0,0,0,1, AXI_END_READ,  O_R,      "r fast data");
    step(0,0,0,0,0, AXI_START,     O_NONE,   "back to start");

    // delayed read, RREADY held off: RVALID three cycles after ARVALID
    vel = 1'b0;
    t0 = $time;
    step(0,0,0,1,0, AXI_START,     O_RALOAD, "r slow start");
    step(0,0,0,1,0, AXI_READ,      O_ARS,    "r slow arready");
    step(0,0,0,0,0, AXI_RDELAY,    O_RLOAD,  "r delay");
    lat = int'(($time - t0) / 10);
    checks++; if (lat != 3) begin failures++; $display("FAIL slow read latency %0d", lat); end
    step(0,0,0,0,0, AXI_END_READ,  O_R,      "r rvalid held");
    step(0,0,0,0,0, AXI_END_READ,  O_R,      "r rvalid held");
    step(0,0,0,0,1, AXI_END_READ,  O_R,      "r rready");
    step(0,0,0,0,0, AXI_START,     O_NONE,   "back to start");

    // write and read requested together: write first, read afterwards
    vel = 1'b1;
    step(1,1,1,1,1, AXI_START,     O_WALOAD, "both start");
    step(1,1,1,1,1, AXI_WRITE,     O_WHS,    "both write");
    step(0,0,1,1,1, AXI_END_WRITE, O_B,      "both bresp");
    step(0,0,0,1,1, AXI_START,     O_RALOAD, "both read start");
    step(0,0,0,1,1, AXI_READ,      O_ARF,    "both arready");
    step(0,0,0,0,1, AXI_END_READ,  O_R,      "both rdata");
    step(0,0,0,0,0, AXI_START,     O_NONE,   "back to start");

    // reset in the middle of a transaction returns to START
    step(0,0,0,1,0, AXI_START,     O_RALOAD, "r before reset");
    rst_n = 1'b0; #1; rst_n = 1'b1;
    step(0,0,0,0,0, AXI_START,     O_NONE,   "after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
