// tb_axi_gpio: self-checking test of the AXI4-Lite GPIO controller with
// eight pad-cell models.
//
// An AXI4-Lite master performs random writes and reads with random delays
// on WVALID, BREADY and RREADY, and with random external devices on the
// pins. A model in the testbench tracks what each pin should be (output
// level, drive strength, direction) and what a read must return: the level
// an external device drives on the pin (0 through the pull-down when none
// does), or 0 when vel=1 and the pin's input buffer was off before the read, because
// the input buffer is then sampled in the same cycle it is switched on.
// Latency is checked when the master answers at once: BVALID and RVALID two
// cycles after AWVALID/ARVALID with vel=1, three with vel=0.
module tb_axi_gpio;
  import gpio_pkg::*;

  logic aclk = 1'b0, aresetn = 1'b0, vel;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [1:0]  bresp, rresp;
  logic [7:0]  pad_c, pad_i, pad_ds, pad_ie, pad_oen;
  logic [7:0]  ext_en, ext_level, pad, contention;
  int checks = 0, failures = 0;

  axi_gpio dut (.*);

  for (genvar p = 0; p < 8; p++) begin : g_pad
    gpio_pad_model u_pad (
      .i(pad_i[p]), .oen(pad_oen[p]), .ds(pad_ds[p]), .ie(pad_ie[p]),
      .ext_en(ext_en[p] & pad_oen[p]), .ext_level(ext_level[p]),
      .pad(pad[p]), .c(pad_c[p]), .contention(contention[p]));
  end

  always #5 aclk = ~aclk;

  // reference model of the pins
  logic [7:0] m_i, m_ds, m_out, m_ie;   // m_out: pin is an output

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_pins(input string what);
    check(pad_i == m_i,            {what, ": pad_i"});
    check(pad_ds == m_ds,          {what, ": pad_ds"});
    check(pad_oen == ~m_out,       {what, ": pad_oen"});
    check(pad_ie == m_ie,           {what, ": pad_ie"});
    check(pad == ((m_i & m_out) | (ext_en & ext_level & ~m_out)), {what, ": pad level"});
  endtask

  // AXI4-Lite write; wdly/bdly: cycles before WVALID/BREADY. Returns the
  // cycles from AWVALID to BVALID.
  task automatic axi_write(input logic [31:0] a, input logic [31:0] d,
                           input int wdly, input int bdly, output int lat);
    bit aw_done = 0, w_done = 0;
    int n = 0;
    awaddr = a; awvalid = 1'b1;
    wdata = $urandom; wvalid = 1'b0;
    bready = 1'b0;
    while (!(aw_done && w_done)) begin
      if (n >= wdly && !w_done) begin wvalid = 1'b1; wdata = d; end
      @(posedge aclk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready)   w_done  = 1;
      n++;
      #1;
      if (aw_done) begin awvalid = 1'b0; awaddr = $urandom; end
      if (w_done)  begin wvalid = 1'b0; wdata = $urandom; end
    end
    while (!bvalid) begin @(posedge aclk); n++; #1; end
    lat = n;
    repeat (bdly) begin
      @(posedge aclk); #1;
      check(bvalid, "bvalid held");
    end
    bready = 1'b1;
    check(bresp == RESP_OKAY, "bresp");
    @(posedge aclk); #1;
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [31:0] a, input int rdly,
                          output logic [31:0] d, output int lat);
    int n = 0;
    araddr = a; arvalid = 1'b1; rready = 1'b0;
    do begin @(posedge aclk); n++; end while (!arready);
    #1 arvalid = 1'b0; araddr = $urandom;
    while (!rvalid) begin @(posedge aclk); n++; #1; end
    lat = n;
    d = rdata;
    repeat (rdly) begin
      @(posedge aclk); #1;
      check(rvalid && rdata == d, "rvalid and rdata held");
    end
    rready = 1'b1;
    check(rresp == RESP_OKAY, "rresp");
    @(posedge aclk); #1;
    rready = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat, n_fast_w, n_slow_w, n_fast_r, n_slow_r, n_dir_switch;
  logic [31:0] rd, exp_rd;
  logic [2:0]  pin;

  initial begin
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = '0; wdata = '0; araddr = '0;
    ext_en = '0; ext_level = '0; vel = 1'b1;
    m_i = '0; m_ds = '0; m_out = '0; m_ie = '0;
    n_fast_w = 0; n_slow_w = 0; n_fast_r = 0; n_slow_r = 0; n_dir_switch = 0;
    repeat (3) @(posedge aclk);
    #1 aresetn = 1'b1;
    check(pad_ie == '0 && pad_oen == '1, "reset: pins undriven");

    // latency, master answers at once
    for (int v = 0; v < 2; v++) begin
      vel = v[0];
      axi_write(32'h4000_0003, 32'h1, 0, 0, lat);
      m_i[3] = 1'b1; m_out[3] = 1'b1; m_ie[3] = 1'b0;
      check(lat == (vel ? 2 : 3), $sformatf("write latency %0d vel=%0d", lat, vel));
      axi_read(32'h4000_0005, 0, rd, lat);
      m_ie[5] = 1'b1;
      check(lat == (vel ? 2 : 3), $sformatf("read latency %0d vel=%0d", lat, vel));
    end

    for (int k = 0; k < 400; k++) begin
      vel = 1'($urandom);
      ext_en = 8'($urandom); ext_level = 8'($urandom);
      pin = 3'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        logic [1:0] d;
        d = 2'($urandom);
        axi_write({29'($urandom), pin}, {30'($urandom), d},
                  $urandom_range(0, 3), $urandom_range(0, 3), lat);
        m_i[pin] = d[0]; m_ds[pin] = d[1]; m_out[pin] = 1'b1; m_ie[pin] = 1'b0;
        if (vel) n_fast_w++; else n_slow_w++;
        check_pins("after write");
      end else begin
        if (!vel && m_out[pin]) n_dir_switch++;
        exp_rd = (vel && !m_ie[pin]) ? 32'd0 : {31'd0, ext_en[pin] & ext_level[pin]};
        axi_read({29'($urandom), pin}, $urandom_range(0, 3), rd, lat);
        m_out[pin] = 1'b0; m_ie[pin] = 1'b1;
        if (vel) n_fast_r++; else n_slow_r++;
        check(rd == exp_rd, $sformatf("read pin %0d got %0h expected %0h vel=%0d",
                                      pin, rd, exp_rd, vel));
        check(pad_ie[pin], "read leaves IE on");
        check_pins("after read");
      end
      check(contention == '0, "no pad contention");
    end
    check(n_fast_w > 0 && n_slow_w > 0 && n_fast_r > 0 && n_slow_r > 0 && n_dir_switch > 0,
          "all transaction kinds seen");
    $display("fast writes %0d, delayed writes %0d, fast reads %0d, delayed reads %0d, output-to-input switches %0d",
             n_fast_w, n_slow_w, n_fast_r, n_slow_r, n_dir_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
