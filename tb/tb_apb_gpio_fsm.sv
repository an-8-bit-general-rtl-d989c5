// tb_apb_gpio_fsm: self-checking test of the APB controller state machine.
//
// Each cycle the testbench sets PSEL, PENABLE and PWRITE, waits for the
// combinational outputs to settle and compares PREADY, the five datapath
// strobes and the state with the value expected for that step. Scenarios:
// fast and delayed write and read, a long setup phase, back-to-back
// transfers, an access phase without PSEL (ignored) and reset in the middle
// of a transfer. The access phase must last 3 cycles with vel=1 and 4 with
// vel=0.
module tb_apb_gpio_fsm;
  import gpio_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, vel;
  logic psel, penable, pwrite, pready;
  dp_ctrl_t   ctrl;
  apb_state_e state;
  int checks = 0, failures = 0;

  apb_gpio_fsm dut (.*);

  always #5 clk = ~clk;

  // expected output vector: {pready, wa_load, wdec_en, ra_load, rdec_en, rdata_load}
  typedef logic [5:0] outv_t;
  localparam outv_t O_NONE  = 6'b0_00000;
  localparam outv_t O_ALOAD = 6'b0_10100;
  localparam outv_t O_WDEC  = 6'b0_01000;
  localparam outv_t O_RDECF = 6'b0_00011;
  localparam outv_t O_RDECS = 6'b0_00010;
  localparam outv_t O_RLOAD = 6'b0_00001;
  localparam outv_t O_READY = 6'b1_00000;

  int access_len;

  task automatic step(input logic s, input logic e, input logic w,
                      input apb_state_e exp_state, input outv_t exp,
                      input string what);
    psel = s; penable = e; pwrite = w;
    #1;
    checks++;
    if ({pready, ctrl} !== exp || state !== exp_state) begin
      failures++;
      $display("FAIL %s: state %s outputs %b expected %s %b", what,
               state.name(), {pready, ctrl}, exp_state.name(), exp);
    end
    if (s && e) access_len++;
    @(posedge clk); #1;
  endtask

  task automatic check_len(input int exp, input string what);
    checks++;
    if (access_len != exp) begin
      failures++;
      $display("FAIL %s access phase %0d cycles, expected %0d", what, access_len, exp);
    end
    access_len = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vel = 1'b1; access_len = 0;
    {psel, penable, pwrite} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    step(0,0,0, APB_START,  O_NONE, "start");
    step(0,0,0, APB_SELECT, O_NONE, "idle in select");
    step(0,0,0, APB_SELECT, O_NONE, "idle in select");

    // fast write: setup, then access of 3 cycles
    step(1,0,1, APB_SELECT,    O_NONE,  "w setup");
    access_len = 0;
    step(1,1,1, APB_SELECT,    O_ALOAD, "w access, address");
    step(1,1,1, APB_WRITE,     O_WDEC,  "w decode");
    step(1,1,1, APB_END_WRITE, O_READY, "w pready");
    check_len(3, "fast write");
    // back-to-back: next setup during START
    vel = 1'b0;
    step(1,0,0, APB_START,     O_NONE,  "r setup in start");
    step(1,1,0, APB_SELECT,    O_ALOAD, "r access, address");
    step(1,1,0, APB_READ,      O_RDECS, "r slow decode");
    step(1,1,0, APB_RDELAY,    O_RLOAD, "r delay load");
    step(1,1,0, APB_END_READ,  O_READY, "r pready");
    check_len(4, "slow read");
    step(0,0,0, APB_START,     O_NONE,  "start");
    // long setup phase
    step(1,0,1, APB_SELECT,    O_NONE,  "w long setup");
    step(1,0,1, APB_SELECT,    O_NONE,  "w long setup");
    access_len = 0;
    step(1,1,1, APB_SELECT,    O_ALOAD, "w slow access");
    step(1,1,1, APB_WRITE,     O_WDEC,  "w slow decode");
    step(1,1,1, APB_WDELAY,    O_NONE,  "w delay");
    step(1,1,1, APB_END_WRITE, O_READY, "w slow pready");
    check_len(4, "slow write");
    vel = 1'b1;
    step(0,0,0, APB_START,     O_NONE,  "start");
    // penable without psel is not a transfer
    step(0,1,0, APB_SELECT,    O_NONE,  "penable alone");
    // fast read
    step(1,0,0, APB_SELECT,    O_NONE,  "r setup");
    access_len = 0;
    step(1,1,0, APB_SELECT,    O_ALOAD, "r access");
    step(1,1,0, APB_READ,      O_RDECF, "r fast decode and load");
    step(1,1,0, APB_END_READ,  O_READY, "r fast pready");
    check_len(3, "fast read");
    step(0,0,0, APB_START,     O_NONE,  "start");
    // reset mid transfer
    step(1,0,1, APB_SELECT,    O_NONE,  "setup");
    step(1,1,1, APB_SELECT,    O_ALOAD, "access");
    rst_n = 1'b0; #1; rst_n = 1'b1;
    step(0,0,0, APB_START,     O_NONE,  "after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
