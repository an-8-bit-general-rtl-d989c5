// tb_apb_gpio: self-checking test of the APB GPIO controller with eight
// pad-cell models.
//
// An APB master performs random writes and reads, with random idle cycles
// between transfers and back-to-back transfers, while random external
// devices drive the pins. A model in the testbench tracks each pin's output
// level, drive strength, direction and input enable, and what a read must
// return: the level on the pin (external drive, or 0 through the
// pull-down), or 0 when vel=1 and the pin's input buffer was off before the
// read. The access phase must last 3 cycles with vel=1 and 4 with vel=0.
module tb_apb_gpio;
  import gpio_pkg::*;

  logic pclk = 1'b0, presetn = 1'b0, vel;
  logic psel, penable, pwrite, pready;
  logic [31:0] paddr, pwdata, prdata;
  logic [7:0]  pad_c, pad_i, pad_ds, pad_ie, pad_oen;
  logic [7:0]  ext_en, ext_level, pad, contention;
  int checks = 0, failures = 0;

  apb_gpio dut (.*);

  for (genvar p = 0; p < 8; p++) begin : g_pad
    gpio_pad_model u_pad (
      .i(pad_i[p]), .oen(pad_oen[p]), .ds(pad_ds[p]), .ie(pad_ie[p]),
      .ext_en(ext_en[p] & pad_oen[p]), .ext_level(ext_level[p]),
      .pad(pad[p]), .c(pad_c[p]), .contention(contention[p]));
  end

  always #5 pclk = ~pclk;

  logic [7:0] m_i, m_ds, m_out, m_ie;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_pins(input string what);
    check(pad_i == m_i,      {what, ": pad_i"});
    check(pad_ds == m_ds,    {what, ": pad_ds"});
    check(pad_oen == ~m_out, {what, ": pad_oen"});
    check(pad_ie == m_ie,    {what, ": pad_ie"});
    check(pad == ((m_i & m_out) | (ext_en & ext_level & ~m_out)), {what, ": pad level"});
  endtask

  // One APB transfer: setup phase, then access phase until PREADY.
  // Returns the access-phase length and, for a read, PRDATA.
  task automatic apb_xfer(input logic wr, input logic [31:0] a, input logic [31:0] d,
                          output logic [31:0] rd, output int len);
    psel = 1'b1; penable = 1'b0; pwrite = wr; paddr = a; pwdata = d;
    @(posedge pclk); #1;
    penable = 1'b1;
    len = 0;
    do begin
      @(posedge pclk); len++;
    end while (!pready && len < 20);
    rd = prdata;
    #1;
    psel = 1'b0; penable = 1'b0; paddr = $urandom; pwdata = $urandom;
    pwrite = 1'($urandom);
  endtask

  initial begin
    repeat (200000) @(posedge pclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int len, n_fast_w, n_slow_w, n_fast_r, n_slow_r, n_dir_switch, n_b2b;
  logic [31:0] rd, exp_rd;
  logic [2:0]  pin;

  initial begin
    {psel, penable, pwrite} = '0;
    paddr = '0; pwdata = '0;
    ext_en = '0; ext_level = '0; vel = 1'b1;
    m_i = '0; m_ds = '0; m_out = '0; m_ie = '0;
    n_fast_w = 0; n_slow_w = 0; n_fast_r = 0; n_slow_r = 0; n_dir_switch = 0; n_b2b = 0;
    repeat (3) @(posedge pclk);
    #1 presetn = 1'b1;
    check(pad_ie == '0 && pad_oen == '1, "reset: pins undriven");

    for (int k = 0; k < 400; k++) begin
      vel = 1'($urandom);
      ext_en = 8'($urandom); ext_level = 8'($urandom);
      pin = 3'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        logic [1:0] d;
        d = 2'($urandom);
        apb_xfer(1'b1, {29'($urandom), pin}, {30'($urandom), d}, rd, len);
        m_i[pin] = d[0]; m_ds[pin] = d[1]; m_out[pin] = 1'b1; m_ie[pin] = 1'b0;
        if (vel) n_fast_w++; else n_slow_w++;
        check_pins("after write");
      end else begin
        if (!vel && m_out[pin]) n_dir_switch++;
        exp_rd = (vel && !m_ie[pin]) ? 32'd0 : {31'd0, ext_en[pin] & ext_level[pin]};
        apb_xfer(1'b0, {29'($urandom), pin}, $urandom, rd, len);
        m_out[pin] = 1'b0; m_ie[pin] = 1'b1;
        if (vel) n_fast_r++; else n_slow_r++;
        check(rd == exp_rd, $sformatf("read pin %0d got %0h expected %0h vel=%0d",
                                      pin, rd, exp_rd, vel));
        check_pins("after read");
      end
      check(len == (vel ? 3 : 4), $sformatf("access phase %0d cycles vel=%0d", len, vel));
      check(contention == '0, "no pad contention");
      // idle cycles between transfers, or none (back-to-back)
      if ($urandom_range(0, 2) == 0) n_b2b++;
      else repeat ($urandom_range(1, 3)) @(posedge pclk);
      #1;
    end
    check(n_fast_w > 0 && n_slow_w > 0 && n_fast_r > 0 && n_slow_r > 0 &&
          n_dir_switch > 0 && n_b2b > 0, "all transfer kinds seen");
    $display("fast writes %0d, delayed writes %0d, fast reads %0d, delayed reads %0d, output-to-input switches %0d, back-to-back %0d",
             n_fast_w, n_slow_w, n_fast_r, n_slow_r, n_dir_switch, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
