// tb_gpio_datapath: self-checking test of the shared GPIO register datapath.
//
// Drives the control strobes directly and checks, against a model kept in
// the testbench: the one-hot decode of address bits [2:0] (upper address
// bits are ignored), the data-out and drive-strength registers, the IE/OEN
// direction switch on write and read, the 8:1 input mux into the read-data
// register, the hold of every register while its strobe is low, and the
// reset values.
module tb_gpio_datapath;
  import gpio_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dp_ctrl_t ctrl;
  logic [31:0] waddr, raddr, rdata;
  logic [1:0]  wdata;
  logic [7:0]  pad_c, pad_i, pad_ds, pad_ie, pad_oen;
  int checks = 0, failures = 0;

  // reference model
  logic [7:0] m_i, m_ds, m_ie, m_oen;

  gpio_datapath dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_pads(input string what);
    check(pad_i == m_i,     {what, " pad_i"});
    check(pad_ds == m_ds,   {what, " pad_ds"});
    check(pad_ie == m_ie,   {what, " pad_ie"});
    check(pad_oen == m_oen, {what, " pad_oen"});
  endtask

  task automatic do_write(input logic [31:0] a, input logic [1:0] d);
    // cycle 1: capture address
    ctrl = '0; ctrl.wa_load = 1'b1; waddr = a; wdata = d;
    @(posedge clk); #1;
    // cycle 2: decoder pulse
    ctrl = '0; ctrl.wdec_en = 1'b1; waddr = $urandom;
    @(posedge clk); #1;
    ctrl = '0;
    m_i[a[2:0]] = d[0]; m_ds[a[2:0]] = d[1];
    m_oen[a[2:0]] = 1'b0; m_ie[a[2:0]] = 1'b0;
    check_pads("write");
  endtask

  task automatic do_read(input logic [31:0] a, input logic [7:0] lv);
    ctrl = '0; ctrl.ra_load = 1'b1; raddr = a;
    @(posedge clk); #1;
    ctrl = '0; ctrl.rdec_en = 1'b1; raddr = $urandom;
    @(posedge clk); #1;
    m_oen[a[2:0]] = 1'b1; m_ie[a[2:0]] = 1'b1;
    check_pads("read dir");
    pad_c = lv;
    ctrl = '0; ctrl.rdata_load = 1'b1;
    @(posedge clk); #1;
    ctrl = '0;
    check(rdata == {31'b0, lv[a[2:0]]}, "read data");
    // hold: no strobe, inputs change, nothing moves
    pad_c = ~lv;
    @(posedge clk); #1;
    check(rdata == {31'b0, lv[a[2:0]]}, "read data hold");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; waddr = '0; raddr = '0; wdata = '0; pad_c = '0;
    m_i = '0; m_ds = '0; m_ie = '0; m_oen = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_pads("reset");
    // every pin written with every value, upper address bits random
    for (int p = 0; p < 8; p++)
      for (int d = 0; d < 4; d++)
        do_write({29'($urandom), 3'(p)}, 2'(d));
    // every pin read back with a random input pattern
    for (int p = 0; p < 8; p++)
      do_read({29'($urandom), 3'(p)}, 8'($urandom));
    // random mix
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(0, 1) == 1) do_write($urandom, 2'($urandom));
      else                           do_read($urandom, 8'($urandom));
    end
    // address load without decoder pulse changes nothing
    ctrl = '0; ctrl.wa_load = 1'b1; waddr = 32'h5; wdata = 2'b11;
    @(posedge clk); #1; ctrl = '0;
    repeat (2) @(posedge clk); #1;
    check_pads("no decode");
    // asynchronous reset restores all pins to undriven inputs-off
    rst_n = 1'b0; #1;
    m_i = '0; m_ds = '0; m_ie = '0; m_oen = '1;
    check_pads("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
