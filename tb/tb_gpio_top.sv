// tb_gpio_top: end-to-end test of both GPIO controllers at their default
// size (eight pins each), running at the same time on separate clocks.
//
// Each controller drives eight pad-cell models with random external devices
// on its pins. An AXI4-Lite master and an APB master each run a program of
// random pin writes and reads, and a model per port predicts the pad
// outputs and every read value. The testbench counts each mechanism of the
// design and fails if one never happens: fast (vel=1) and delayed (vel=0)
// writes and reads on both buses, an output pin turned into an input by a
// read, a drive-strength bit set, a late WVALID, BREADY/RREADY held off,
// AWVALID and ARVALID raised together (write served first) and
// back-to-back APB transfers. Latencies: AXI BVALID/RVALID two cycles after
// AWVALID/ARVALID with vel=1 and three with vel=0 when the master answers at
// once; APB access phase of three cycles with vel=1 and four with vel=0.
module tb_gpio_top;
  import gpio_pkg::*;

  // AXI side
  logic axi_aclk = 1'b0, axi_aresetn = 1'b0, axi_vel;
  logic axi_awvalid, axi_awready, axi_wvalid, axi_wready, axi_bvalid, axi_bready;
  logic axi_arvalid, axi_arready, axi_rvalid, axi_rready;
  logic [31:0] axi_awaddr, axi_wdata, axi_araddr, axi_rdata;
  logic [1:0]  axi_bresp, axi_rresp;
  logic [7:0]  axi_pad_c, axi_pad_i, axi_pad_ds, axi_pad_ie, axi_pad_oen;
  // APB side
  logic apb_pclk = 1'b0, apb_presetn = 1'b0, apb_vel;
  logic apb_psel, apb_penable, apb_pwrite, apb_pready;
  logic [31:0] apb_paddr, apb_pwdata, apb_prdata;
  logic [7:0]  apb_pad_c, apb_pad_i, apb_pad_ds, apb_pad_ie, apb_pad_oen;

  logic [7:0] ax_ext_en, ax_ext_lv, ax_pad, ax_cont;
  logic [7:0] ap_ext_en, ap_ext_lv, ap_pad, ap_cont;

  int checks = 0, failures = 0;

  gpio_top dut (.*);

  for (genvar p = 0; p < 8; p++) begin : g_pad
    gpio_pad_model u_axi_pad (
      .i(axi_pad_i[p]), .oen(axi_pad_oen[p]), .ds(axi_pad_ds[p]), .ie(axi_pad_ie[p]),
      .ext_en(ax_ext_en[p] & axi_pad_oen[p]), .ext_level(ax_ext_lv[p]),
      .pad(ax_pad[p]), .c(axi_pad_c[p]), .contention(ax_cont[p]));
    gpio_pad_model u_apb_pad (
      .i(apb_pad_i[p]), .oen(apb_pad_oen[p]), .ds(apb_pad_ds[p]), .ie(apb_pad_ie[p]),
      .ext_en(ap_ext_en[p] & apb_pad_oen[p]), .ext_level(ap_ext_lv[p]),
      .pad(ap_pad[p]), .c(apb_pad_c[p]), .contention(ap_cont[p]));
  end

  always #5 axi_aclk = ~axi_aclk;   // 100 MHz
  always #4 apb_pclk = ~apb_pclk;   // unrelated second clock

  // mechanism counters
  typedef enum int {
    M_AXI_FAST_W, M_AXI_SLOW_W, M_AXI_FAST_R, M_AXI_SLOW_R, M_AXI_DIR_SWITCH,
    M_AXI_DS_SET, M_AXI_LATE_W, M_AXI_B_HELD, M_AXI_R_HELD, M_AXI_BOTH,
    M_APB_FAST_W, M_APB_SLOW_W, M_APB_FAST_R, M_APB_SLOW_R, M_APB_DIR_SWITCH,
    M_APB_DS_SET, M_APB_B2B, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- AXI
  logic [7:0] ax_i, ax_ds, ax_out, ax_ie;

  task automatic ax_check_pins(input string what);
    check(axi_pad_i == ax_i && axi_pad_ds == ax_ds && axi_pad_oen == ~ax_out &&
          axi_pad_ie == ax_ie, {"axi pins ", what});
    check(ax_pad == ((ax_i & ax_out) | (ax_ext_en & ax_ext_lv & ~ax_out)), {"axi pad ", what});
  endtask

  task automatic axi_write(input logic [31:0] a, input logic [31:0] d,
                           input int wdly, input int bdly, input logic with_ar,
                           output int lat);
    bit aw_done = 0, w_done = 0;
    int n = 0;
    axi_awaddr = a; axi_awvalid = 1'b1; axi_wvalid = 1'b0; axi_wdata = $urandom;
    axi_bready = 1'b0;
    if (with_ar) begin axi_arvalid = 1'b1; axi_araddr = a ^ 32'h1; end
    while (!(aw_done && w_done)) begin
      if (n >= wdly && !w_done) begin axi_wvalid = 1'b1; axi_wdata = d; end
      @(posedge axi_aclk);
      check(!(with_ar && axi_arready), "axi write served before read");
      if (axi_awvalid && axi_awready) aw_done = 1;
      if (axi_wvalid && axi_wready)   w_done  = 1;
      n++;
      #1;
      if (aw_done) begin axi_awvalid = 1'b0; axi_awaddr = $urandom; end
      if (w_done)  begin axi_wvalid = 1'b0; axi_wdata = $urandom; end
    end
    while (!axi_bvalid) begin @(posedge axi_aclk); n++; #1; end
    lat = n;
    repeat (bdly) begin @(posedge axi_aclk); #1; check(axi_bvalid, "axi bvalid held"); end
    axi_bready = 1'b1;
    check(axi_bresp == RESP_OKAY, "axi bresp");
    @(posedge axi_aclk); #1;
    axi_bready = 1'b0;
  endtask

  task automatic axi_read(input logic [31:0] a, input int rdly,
                          output logic [31:0] d, output int lat);
    int n = 0;
    axi_araddr = a; axi_arvalid = 1'b1; axi_rready = 1'b0;
    do begin @(posedge axi_aclk); n++; end while (!axi_arready);
    #1 axi_arvalid = 1'b0; axi_araddr = $urandom;
    while (!axi_rvalid) begin @(posedge axi_aclk); n++; #1; end
    lat = n;
    d = axi_rdata;
    repeat (rdly) begin
      @(posedge axi_aclk); #1;
      check(axi_rvalid && axi_rdata == d, "axi rvalid/rdata held");
    end
    axi_rready = 1'b1;
    check(axi_rresp == RESP_OKAY, "axi rresp");
    @(posedge axi_aclk); #1;
    axi_rready = 1'b0;
  endtask

  task automatic axi_program(input int n_ops);
    int lat, wdly, bdly;
    logic [31:0] rd, exp_rd;
    logic [2:0] pin;
    logic [1:0] d;
    logic both;
    for (int k = 0; k < n_ops; k++) begin
      axi_vel = 1'($urandom);
      ax_ext_en = 8'($urandom); ax_ext_lv = 8'($urandom);
      pin = 3'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        d = 2'($urandom);
        wdly = $urandom_range(0, 2); bdly = $urandom_range(0, 2);
        both = ($urandom_range(0, 7) == 0);
        axi_write({29'($urandom), pin}, {30'($urandom), d}, wdly, bdly, both, lat);
        if (wdly == 0 && bdly == 0)
          check(lat == (axi_vel ? 2 : 3), $sformatf("axi write latency %0d", lat));
        ax_i[pin] = d[0]; ax_ds[pin] = d[1]; ax_out[pin] = 1'b1; ax_ie[pin] = 1'b0;
        mech[axi_vel ? M_AXI_FAST_W : M_AXI_SLOW_W]++;
        if (d[1])     mech[M_AXI_DS_SET]++;
        if (wdly > 0) mech[M_AXI_LATE_W]++;
        if (bdly > 0) mech[M_AXI_B_HELD]++;
        if (both)     mech[M_AXI_BOTH]++;
        ax_check_pins("after write");
        if (both) begin
          // the read raised with the write is served next
          pin = 3'(axi_araddr);
          exp_rd = (axi_vel && !ax_ie[pin]) ? 32'd0 : {31'd0, ax_ext_en[pin] & ax_ext_lv[pin]};
          axi_read(axi_araddr, 0, rd, lat);
          ax_out[pin] = 1'b0; ax_ie[pin] = 1'b1;
          check(rd == exp_rd, "axi read after simultaneous write");
          ax_check_pins("after read");
        end
      end else begin
        int rdly = $urandom_range(0, 2);
        if (!axi_vel && ax_out[pin]) mech[M_AXI_DIR_SWITCH]++;
        exp_rd = (axi_vel && !ax_ie[pin]) ? 32'd0 : {31'd0, ax_ext_en[pin] & ax_ext_lv[pin]};
        axi_read({29'($urandom), pin}, rdly, rd, lat);
        if (rdly == 0) check(lat == (axi_vel ? 2 : 3), $sformatf("axi read latency %0d", lat));
        ax_out[pin] = 1'b0; ax_ie[pin] = 1'b1;
        mech[axi_vel ? M_AXI_FAST_R : M_AXI_SLOW_R]++;
        if (rdly > 0) mech[M_AXI_R_HELD]++;
        check(rd == exp_rd, $sformatf("axi read pin %0d got %0h expected %0h", pin, rd, exp_rd));
        ax_check_pins("after read");
      end
      check(ax_cont == '0, "axi no contention");
    end
  endtask

  // ---------------------------------------------------------------- APB
  logic [7:0] ap_i, ap_ds, ap_out, ap_ie;

  task automatic apb_xfer(input logic wr, input logic [31:0] a, input logic [31:0] d,
                          output logic [31:0] rd, output int len);
    apb_psel = 1'b1; apb_penable = 1'b0; apb_pwrite = wr; apb_paddr = a; apb_pwdata = d;
    @(posedge apb_pclk); #1;
    apb_penable = 1'b1;
    len = 0;
    do begin @(posedge apb_pclk); len++; end while (!apb_pready && len < 20);
    rd = apb_prdata;
    #1;
    apb_psel = 1'b0; apb_penable = 1'b0; apb_paddr = $urandom; apb_pwdata = $urandom;
  endtask

  task automatic apb_program(input int n_ops);
    int len;
    logic [31:0] rd, exp_rd;
    logic [2:0] pin;
    logic [1:0] d;
    for (int k = 0; k < n_ops; k++) begin
      apb_vel = 1'($urandom);
      ap_ext_en = 8'($urandom); ap_ext_lv = 8'($urandom);
      pin = 3'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        d = 2'($urandom);
        apb_xfer(1'b1, {29'($urandom), pin}, {30'($urandom), d}, rd, len);
        ap_i[pin] = d[0]; ap_ds[pin] = d[1]; ap_out[pin] = 1'b1; ap_ie[pin] = 1'b0;
        mech[apb_vel ? M_APB_FAST_W : M_APB_SLOW_W]++;
        if (d[1]) mech[M_APB_DS_SET]++;
      end else begin
        if (!apb_vel && ap_out[pin]) mech[M_APB_DIR_SWITCH]++;
        exp_rd = (apb_vel && !ap_ie[pin]) ? 32'd0 : {31'd0, ap_ext_en[pin] & ap_ext_lv[pin]};
        apb_xfer(1'b0, {29'($urandom), pin}, $urandom, rd, len);
        ap_out[pin] = 1'b0; ap_ie[pin] = 1'b1;
        mech[apb_vel ? M_APB_FAST_R : M_APB_SLOW_R]++;
        check(rd == exp_rd, $sformatf("apb read pin %0d got %0h expected %0h", pin, rd, exp_rd));
      end
      check(len == (apb_vel ? 3 : 4), $sformatf("apb access phase %0d cycles", len));
      check(apb_pad_i == ap_i && apb_pad_ds == ap_ds && apb_pad_oen == ~ap_out &&
            apb_pad_ie == ap_ie, "apb pins");
      check(ap_pad == ((ap_i & ap_out) | (ap_ext_en & ap_ext_lv & ~ap_out)), "apb pad");
      check(ap_cont == '0, "apb no contention");
      if ($urandom_range(0, 2) == 0) mech[M_APB_B2B]++;
      else repeat ($urandom_range(1, 3)) @(posedge apb_pclk);
      #1;
    end
  endtask

  initial begin
    repeat (100000) @(posedge axi_aclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mech_e e;

  initial begin
    foreach (mech[m]) mech[m] = 0;
    {axi_awvalid, axi_wvalid, axi_bready, axi_arvalid, axi_rready} = '0;
    axi_awaddr = '0; axi_wdata = '0; axi_araddr = '0; axi_vel = 1'b1;
    {apb_psel, apb_penable, apb_pwrite} = '0;
    apb_paddr = '0; apb_pwdata = '0; apb_vel = 1'b1;
    ax_ext_en = '0; ax_ext_lv = '0; ap_ext_en = '0; ap_ext_lv = '0;
    ax_i = '0; ax_ds = '0; ax_out = '0; ax_ie = '0;
    ap_i = '0; ap_ds = '0; ap_out = '0; ap_ie = '0;
    repeat (3) @(posedge axi_aclk);
    #1 axi_aresetn = 1'b1; apb_presetn = 1'b1;
    check(axi_pad_oen == '1 && axi_pad_ie == '0 && apb_pad_oen == '1 && apb_pad_ie == '0,
          "reset: all pins undriven");
    @(posedge apb_pclk); #1;
    fork
      axi_program(500);
      apb_program(500);
    join
    for (int m = 0; m < M_COUNT; m++) begin
      e = mech_e'(m);
      $display("  %-18s %0d", e.name(), mech[m]);
      check(mech[m] > 0, {"mechanism never exercised: ", e.name()});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
