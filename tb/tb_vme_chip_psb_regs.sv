// Testbench of vme_chip_psb_regs. A small model of the PSB chip's local bus
// (answer two clocks after the request, optionally never) sits on the
// forwarding port. Checked:
//   * read-back of every writable register with random data, and the pins
//     each one drives (active-low outputs inverted);
//   * chip_id with the card number, version, STAT_INIT/STAT_DONE pins;
//   * DTACK one clock after an own access; BERR for unused offsets, reads of
//     write-only and writes of read-only registers, and unused chips;
//   * forwarding to the PSB chip (address, data, read data) and BERR when
//     the PSB chip does not answer;
//   * CONF_PSB: DIN and one CCLK pulse only with ENPROG set;
//   * command pulses, RESET_MODE, RUNNING, LOCKED_LED, EN_CHLINK gating by
//     CLK_LOCKED, JTAG selection truth table;
//   * serial-link error counters through their registers (clear on read).
module tb_vme_chip_psb_regs;
  logic clk = 0, rst = 1;
  logic vme_req = 0, vme_wr = 0, vme_dtack, vme_berr;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic psb_bus_en, psb_bus_wr, psb_bus_ack = 0;
  logic [19:1] psb_bus_addr;
  logic [15:0] psb_bus_wdata, psb_bus_rdata = '0;
  logic enprog, nprog, ninit_drv, ninit_pin = 0, done_pin = 0, conf_din, conf_cclk;
  logic npwrdwn, res_dcm, reset_psb, reset_mode = 0, clk_locked_psb = 0, locked_led, running;
  logic nen_chlink, nen_robus, vme_conf, jtag_sel_cables, jtag_sel_backpl, jtag_jumper = 0;
  logic [3:0] card_nr = 4'h5;
  logic [3:0] send_sync, line_loopback, ntpwrdwn, entr;
  logic [7:0] nrpwrdwn, enrec, local_loopback, locked = '0;
  logic [15:0] en_ttin;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vme_chip_psb_regs #(.PSB_TIMEOUT(8)) dut (.*);

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, m); end
  endtask

  // ---- PSB chip model ------------------------------------------------------
  bit psb_dead = 0;
  logic [19:1] psb_last_addr;
  logic [15:0] psb_last_wdata;
  bit psb_last_wr;
  int psb_reqs = 0;
  logic [2:0] ack_sr = '0;
  always @(posedge clk) begin
    ack_sr <= {ack_sr[1:0], psb_bus_en && !psb_dead};
    psb_bus_ack <= ack_sr[0];
    psb_bus_rdata <= ack_sr[0] ? {psb_last_addr[15:1], 1'b1} : 16'h0;
    if (psb_bus_en) begin
      psb_reqs++;
      psb_last_addr <= psb_bus_addr; psb_last_wdata <= psb_bus_wdata; psb_last_wr <= psb_bus_wr;
    end
  end

  // ---- counting of command pulses --------------------------------------------
  int n_pwrdwn = 0, n_resdcm = 0, n_reset = 0, n_cclk = 0;
  always @(posedge clk) if (!rst) begin
    if (!npwrdwn) n_pwrdwn++;
    if (res_dcm) n_resdcm++;
    if (reset_psb) n_reset++;
    if (conf_cclk) n_cclk++;
  end

  // ---- VME access: returns 1 for DTACK, 0 for BERR ----------------------------
  task automatic access(input bit w, input logic [23:0] a, input logic [15:0] d,
                        output logic [15:0] q, output bit ok, output int clocks);
    @(negedge clk);
    vme_req = 1; vme_wr = w; vme_addr = a[23:1]; vme_wdata = d;
    @(negedge clk);
    vme_req = 0;
    clocks = 1;
    while (!vme_dtack && !vme_berr && clocks < 40) begin @(negedge clk); clocks++; end
    chk(!(vme_dtack && vme_berr), "DTACK and BERR together");
    ok = vme_dtack; q = vme_rdata;
    @(negedge clk);
    chk(!vme_dtack && !vme_berr, "answer lasts one clock");
  endtask
  task automatic wr_ok(input logic [23:0] a, input logic [15:0] d);
    logic [15:0] q; bit ok; int c;
    access(1, a, d, q, ok, c);
    chk(ok && c == 1, $sformatf("write %h: DTACK after one clock (ok %0d, %0d)", a, ok, c));
  endtask
  task automatic rd_ok(input logic [23:0] a, output logic [15:0] q);
    bit ok; int c;
    access(0, a, 0, q, ok, c);
    chk(ok && c == 1, $sformatf("read %h: DTACK after one clock (ok %0d, %0d)", a, ok, c));
  endtask
  task automatic expect_berr(input bit w, input logic [23:0] a);
    logic [15:0] q; bit ok; int c;
    access(w, a, 16'hFFFF, q, ok, c);
    chk(!ok && vme_berr == 0, $sformatf("%s %h gives BERR", w ? "write" : "read", a));
  endtask

  logic [15:0] q, d;
  bit ok;
  int c, p0, p1;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- reset state --------------------------------------------------------
    chk(nprog && ninit_drv && !enprog && npwrdwn && nen_chlink && nen_robus, "reset outputs");
    chk(ntpwrdwn == 4'hF && nrpwrdwn == 8'hFF && en_ttin == 0, "serial links powered down after reset");
    // ---- identification -----------------------------------------------------
    begin
      logic [31:0] id, ver;
      for (int i = 0; i < 4; i++) begin
        rd_ok(24'h20 + 2 * i, q); id  = {id[23:0], q[7:0]};
        rd_ok(24'h28 + 2 * i, q); ver = {ver[23:0], q[7:0]};
      end
      chk(id == 32'h0001_8521, $sformatf("chip_id %h", id));
      chk(ver == 32'h0000_1004, $sformatf("version %h", ver));
    end
    // ---- configuration pins ---------------------------------------------------
    ninit_pin = 1; done_pin = 0;
    rd_ok(24'h06, q); chk(q == 1, "STAT_INIT");
    rd_ok(24'h08, q); chk(q == 0, "STAT_DONE 0");
    done_pin = 1; rd_ok(24'h08, q); chk(q == 1, "STAT_DONE 1");
    wr_ok(24'h02, 1); chk(!nprog, "NPROG driven low"); rd_ok(24'h02, q); chk(q == 1, "CMD_NPROG read");
    wr_ok(24'h02, 0); chk(nprog, "NPROG released");
    wr_ok(24'h04, 1); chk(!ninit_drv, "NINIT driven low"); wr_ok(24'h04, 0);
    // CONF_PSB without ENPROG: no CCLK
    wr_ok(24'h0A, 1); repeat (3) @(negedge clk); chk(n_cclk == 0, "no CCLK without ENPROG");
    wr_ok(24'h00, 1); chk(enprog, "ENPROG set");
    for (int i = 0; i < 16; i++) begin
      bit b = 1'($urandom);
      @(negedge clk); vme_req = 1; vme_wr = 1; vme_addr = 23'(24'h0A >> 1); vme_wdata = {15'h7FFF, b};
      @(negedge clk); vme_req = 0;
      chk(vme_dtack, "CONF_PSB DTACK");
      chk(conf_din == b && !conf_cclk, "DIN set before CCLK");
      @(negedge clk); chk(conf_din == b && conf_cclk, "CCLK with DIN stable");
      @(negedge clk); chk(!conf_cclk, "one CCLK");
    end
    chk(n_cclk == 16, $sformatf("16 CCLK pulses (%0d)", n_cclk));
    expect_berr(0, 24'h0A);
    wr_ok(24'h00, 0);
    // ---- command pulses --------------------------------------------------------
    wr_ok(24'h10, 16'h0007);
    chk(n_pwrdwn == 1 && n_resdcm == 1 && n_reset == 1, "one pulse each");
    chk(!running, "not running");
    wr_ok(24'h10, 16'h0008); chk(running, "SET_RUNNING");
    @(negedge clk) reset_mode = 1; @(negedge clk) reset_mode = 0; @(negedge clk);
    chk(n_reset == 2, "RESET_MODE gives RESET_PSB");
    expect_berr(0, 24'h10);
    // ---- status pulse register ---------------------------------------------------
    clk_locked_psb = 0; rd_ok(24'h12, q); chk(q == 16'h0008, $sformatf("status %h", q));
    // LOCKED_LED: all enabled receivers and CLK_LOCKED
    wr_ok(24'h42, 16'h0003);                          // ENREC 0 and 1
    clk_locked_psb = 1; locked = 8'h01; repeat (4) @(negedge clk);
    chk(!locked_led, "LED off: receiver 1 not locked");
    locked = 8'h03; repeat (4) @(negedge clk);
    chk(locked_led, "LED on");
    rd_ok(24'h12, q); chk(q == 16'h000E, $sformatf("status %h", q));
    rd_ok(24'h46, q); chk(q == 16'h0003, "LOCKED register");
    clk_locked_psb = 0; @(negedge clk); chk(!locked_led, "LED off without CLK_LOCKED");
    // ---- command / status register, JTAG truth table -------------------------------
    for (int k = 0; k < 32; k++) begin
      d = 16'(k);
      wr_ok(24'h14, d);
      rd_ok(24'h14, q); chk(q == d, "command register read back");
      for (int j = 0; j < 2; j++) begin
        jtag_jumper = j[0]; clk_locked_psb = 1'($urandom);
        #1;
        chk(nen_chlink == !(d[0] && clk_locked_psb), "NEN_CHLINK");
        chk(nen_robus == !d[1] && vme_conf == d[2], "NEN_ROBUS, VME_CONF");
        chk(jtag_sel_cables == (d[3] || jtag_jumper), "JTAG cables");
        chk(jtag_sel_backpl == (!d[3] && !jtag_jumper && d[4]), "JTAG backplane");
        rd_ok(24'h16, q);
        chk(q == {10'd0, jtag_jumper, 2'b00, d[2], 1'b0, d[0] && clk_locked_psb},
            $sformatf("status register %h", q));
      end
    end
    // ---- serial-link registers ---------------------------------------------------------
    for (int k = 0; k < 50; k++) begin
      d = 16'($urandom);
      wr_ok(24'h40, d); rd_ok(24'h40, q); chk(q == d, "SERLINK0");
      chk(send_sync == d[15:12] && line_loopback == d[11:8] && ntpwrdwn == ~d[7:4] && entr == d[3:0], "SERLINK0 pins");
      d = 16'($urandom);
      wr_ok(24'h42, d); rd_ok(24'h42, q); chk(q == d, "SERLINK1");
      chk(nrpwrdwn == ~d[15:8] && enrec == d[7:0], "SERLINK1 pins");
      d = 16'($urandom);
      wr_ok(24'h44, d); rd_ok(24'h44, q); chk(q == {8'h00, d[7:0]}, "SERLINK2");
      chk(local_loopback == d[7:0], "SERLINK2 pins");
      d = 16'($urandom);
      wr_ok(24'h50, d); rd_ok(24'h50, q); chk(q == d && en_ttin == d, "EN_TTIN");
    end
    // ---- error counters -------------------------------------------------------------------
    wr_ok(24'h42, 16'h00FF);
    locked = '1; repeat (4) @(negedge clk);
    for (int i = 0; i < 8; i++) rd_ok(24'h60 + 2 * i, q);       // clear
    for (int r = 0; r < 300; r++) begin
      @(negedge clk) locked = 8'b1000_0101 ^ 8'hFF;             // channels 0, 2, 7 drop
      @(negedge clk) locked = '1;
      if (r == 2) begin
        repeat (4) @(negedge clk);
        rd_ok(24'h60, q); chk(q == 3, $sformatf("error counter 0 = %0d", q));
        rd_ok(24'h60, q); chk(q == 0, "cleared by read");
      end
    end
    repeat (4) @(negedge clk);
    rd_ok(24'h60, q); chk(q == 16'h00FF, $sformatf("error counter 0 saturated %h", q));
    rd_ok(24'h62, q); chk(q == 0, "error counter 1");
    rd_ok(24'h64, q); chk(q == 16'h00FF, "error counter 2 saturated");
    rd_ok(24'h6E, q); chk(q == 16'h00FF, "error counter 7 saturated");
    rd_ok(24'h6E, q); chk(q == 0, "error counter 7 cleared");
    // ---- bus errors ---------------------------------------------------------------------------
    expect_berr(1, 24'h06);  expect_berr(1, 24'h12);  expect_berr(1, 24'h46);
    expect_berr(1, 24'h60);  expect_berr(1, 24'h20);  expect_berr(0, 24'h0C);
    expect_berr(0, 24'h30);  expect_berr(1, 24'h3E);  expect_berr(0, 24'h100);
    expect_berr(0, 24'h200000); expect_berr(1, 24'hF00040);
    // ---- forwarding to the PSB chip -----------------------------------------------------------
    for (int k = 0; k < 100; k++) begin
      logic [19:1] a;
      bit w;
      a = 19'($urandom); w = 1'($urandom); d = 16'($urandom);
      p0 = psb_reqs;
      access(w, {4'h1, a, 1'b0}, d, q, ok, c);
      chk(ok && c == 3, $sformatf("PSB access DTACK after 3 clocks (%0d %0d)", ok, c));
      chk(psb_reqs == p0 + 1, "one local-bus request");
      chk(psb_last_addr == a && psb_last_wr == w && (!w || psb_last_wdata == d), "forwarded address/data");
      if (!w) chk(q == {a[15:1], 1'b1}, "forwarded read data");
    end
    psb_dead = 1;
    access(0, 24'h100864, 0, q, ok, c);
    chk(!ok && c == 9, $sformatf("BERR after time-out (%0d %0d)", ok, c));
    psb_dead = 0;
    // ---- reset --------------------------------------------------------------------------------
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    chk(!running && en_ttin == 0 && enrec == 0 && nen_chlink, "reset clears registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
