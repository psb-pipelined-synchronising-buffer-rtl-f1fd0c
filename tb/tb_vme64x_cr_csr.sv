// Testbench of vme64x_cr_csr. Checked against values written out here:
// configuration-ROM bytes listed for the board (access widths, space ID,
// program ID, user-CR/CRAM/user-CSR/serial-number offsets, DAWPR, AMCAP,
// ADEM), chip_id / version / serial number for several card numbers, BAR
// from the slot and the amnesia address, no answer for another slot or an
// address that is not 3 mod 4, ADER read-back, bit set/clear registers,
// function 0/1 base-address decode, CRAM write/read, TEST_OUT selection and
// its one-clock latency, answer one clock after the request.
module tb_vme64x_cr_csr;
  logic clk = 0, rst = 1;
  logic [4:0] ga = 5'd7;
  logic [3:0] card_nr = 4'd5;
  logic csr_req = 0, csr_wr = 0, csr_ack;
  logic [23:0] csr_addr = '0;
  logic [7:0] csr_wdata = '0, csr_rdata;
  logic [5:0] acc_am = '0;
  logic [31:25] acc_addr = '0;
  logic f0_sel, f1_sel, berr_seen = 0, module_enabled, reset_mode, berr_flag;
  logic [14:0] test_sig = '0;
  logic [3:0] test_out;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vme64x_cr_csr dut (.*);

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

  // access with the board's BAR; returns whether it was acknowledged
  task automatic acc(input bit w, input logic [4:0] slot, input logic [18:0] a,
                     input logic [7:0] d, output logic [7:0] q, output bit ack);
    @(negedge clk);
    csr_req = 1; csr_wr = w; csr_addr = {slot, a}; csr_wdata = d;
    @(negedge clk);
    csr_req = 0;
    ack = csr_ack; q = csr_rdata;
    @(negedge clk);
    chk(!csr_ack, "acknowledge lasts one clock");
  endtask
  logic [4:0] myslot;
  task automatic rd(input logic [18:0] a, output logic [7:0] q);
    bit ack;
    acc(0, myslot, a, 0, q, ack);
    chk(ack, $sformatf("read %h acknowledged", a));
  endtask
  task automatic wr(input logic [18:0] a, input logic [7:0] d);
    logic [7:0] q; bit ack;
    acc(1, myslot, a, d, q, ack);
    chk(ack, $sformatf("write %h acknowledged", a));
  endtask
  task automatic expect_rd(input logic [18:0] a, input logic [7:0] v, input string m);
    logic [7:0] q;
    rd(a, q);
    chk(q == v, $sformatf("%s: %h = %h, expected %h", m, a, q, v));
  endtask
  // a big-endian field of n bytes at every fourth address
  task automatic expect_field(input logic [18:0] a, input int n, input logic [63:0] v, input string m);
    for (int i = 0; i < n; i++)
      expect_rd(a + 19'(4 * i), v[8 * (n - 1 - i) +: 8], m);
  endtask

  logic [7:0] q;
  bit ack;
  logic [7:0] cram_ref [512];

  initial begin
    myslot = 5'd7;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- configuration ROM ------------------------------------------------------
    expect_rd(19'h13, 8'h81, "CR access width");
    expect_rd(19'h17, 8'h81, "CSR access width");
    expect_rd(19'h1B, 8'h02, "CR/CSR space ID");
    expect_field(19'h27, 3, 0, "manufacturer ID");
    expect_rd(19'h7F, 8'h01, "program ID");
    expect_field(19'h83, 3, 24'h001003, "BEG_USER_CR");
    expect_field(19'h8F, 3, 24'h00101F, "END_USER_CR");
    expect_field(19'h9B, 3, 24'h003003, "BEG_CRAM");
    expect_field(19'hA7, 3, 24'h0037FF, "END_CRAM");
    expect_field(19'hB3, 3, 24'h005003, "BEG_USER_CSR");
    expect_field(19'hBF, 3, 24'h00502F, "END_USER_CSR");
    expect_field(19'hCB, 3, 24'h001023, "BEG_SN");
    expect_field(19'hD7, 3, 24'h001033, "END_SN");
    expect_rd(19'hE3, 8'h00, "slave characteristics");
    expect_rd(19'hEB, 8'h00, "master characteristics");
    expect_rd(19'hFF, 8'h81, "CRAM access width");
    expect_rd(19'h103, 8'h83, "F0 DAWPR");
    expect_rd(19'h107, 8'h83, "F1 DAWPR");
    expect_field(19'h123, 8, 64'h2200, "F0 AMCAP");
    expect_field(19'h143, 8, 64'h8800, "F1 AMCAP");
    expect_field(19'h623, 4, 32'hFE000000, "F0 ADEM");
    expect_field(19'h633, 4, 32'hFE000000, "F1 ADEM");
    // ---- user CR ------------------------------------------------------------------
    for (int c = 0; c < 16; c++) begin
      int sn;
      card_nr = 4'(c);
      sn = (c == 0) ? 16 : c;
      expect_field(19'h01003, 4, {32'h00018011 | (32'(c) << 8)}, "chip_id");
      expect_field(19'h01013, 4, 32'h0000100C, "version");
      expect_field(19'h01023, 5, {8'h50, 8'h53, 8'h42, 8'(8'h30 + sn / 10), 8'(8'h30 + sn % 10)}, "serial number");
    end
    // ---- BAR, slot match, alignment -------------------------------------------------
    expect_rd(19'h7FFFF, {5'd7, 3'b000}, "BAR from slot");
    acc(0, 5'd8, 19'h0001B, 0, q, ack); chk(!ack, "other slot not answered");
    acc(0, 5'd7, 19'h0001A, 0, q, ack); chk(!ack, "address not 3 mod 4 not answered");
    ga = 0; myslot = 5'b11110;
    expect_rd(19'h7FFFF, {5'b11110, 3'b000}, "BAR amnesia address");
    acc(0, 5'd7, 19'h7FFFF, 0, q, ack); chk(!ack, "old slot not answered");
    ga = 5'd20; myslot = 5'd20;
    // ---- bit set / clear ------------------------------------------------------------------
    chk(!module_enabled && !reset_mode && !berr_flag, "reset state");
    acc_am = 6'h0D; acc_addr = 7'h00; #1 chk(!f0_sel, "disabled module not selected");
    wr(19'h7FFFB, 8'h10); chk(module_enabled, "module enabled by BSR bit 4");
    expect_rd(19'h7FFFB, 8'h10, "BSR read");
    wr(19'h7FFFB, 8'h80); chk(reset_mode, "RESET_MODE set");
    wr(19'h7FFF7, 8'h80); chk(!reset_mode && module_enabled, "RESET_MODE cleared");
    @(negedge clk) berr_seen = 1; @(negedge clk) berr_seen = 0;
    chk(berr_flag, "BERR flag set");
    expect_rd(19'h7FFF7, 8'h18, "BCR read");
    wr(19'h7FFF7, 8'h08); chk(!berr_flag, "BERR flag cleared");
    // ---- ADER and decode -----------------------------------------------------------------------
    for (int k = 0; k < 50; k++) begin
      logic [31:0] a0, a1;
      logic [6:0] x;
      a0 = $urandom; a1 = $urandom;
      for (int i = 0; i < 4; i++) begin
        wr(19'h7FF63 + 19'(4 * i), a0[8 * (3 - i) +: 8]);
        wr(19'h7FF73 + 19'(4 * i), a1[8 * (3 - i) +: 8]);
      end
      expect_field(19'h7FF63, 4, a0, "ADER F0");
      expect_field(19'h7FF73, 4, a1, "ADER F1");
      for (int j = 0; j < 20; j++) begin
        logic [5:0] am;
        x = (j < 5) ? a0[31:25] : (j < 10) ? a1[31:25] : 7'($urandom);
        am = (j % 4 == 0) ? 6'h0D : (j % 4 == 1) ? 6'h09 : (j % 4 == 2) ? 6'h0F : 6'h0B;
        if (j >= 18) am = 6'($urandom);
        acc_am = am; acc_addr = x;
        #1;
        chk(f0_sel == ((am == 6'h0D || am == 6'h09) && x == a0[31:25]), "F0 decode");
        chk(f1_sel == ((am == 6'h0F || am == 6'h0B) && x == a1[31:25]), "F1 decode");
      end
    end
    wr(19'h7FFF7, 8'h10);
    acc_am = 6'h0D; acc_addr = 7'(0); #1;
    chk(!f0_sel && !f1_sel && !module_enabled, "module disabled by BCR");
    // ---- CRAM ------------------------------------------------------------------------------------
    for (int i = 0; i < 512; i++) begin
      cram_ref[i] = 8'($urandom);
      wr(19'h03003 + 19'(4 * i), cram_ref[i]);
    end
    for (int k = 0; k < 600; k++) begin
      int i = $urandom_range(0, 511);
      expect_rd(19'h03003 + 19'(4 * i), cram_ref[i], "CRAM");
    end
    // ---- TEST_OUT ----------------------------------------------------------------------------------
    for (int k = 0; k < 200; k++) begin
      logic [7:0] s12, s34;
      logic [15:0] t;
      s12 = $urandom; s34 = $urandom;
      wr(19'h05003, s12); wr(19'h05007, s34);
      expect_rd(19'h05003, s12, "sel_test_out_12");
      expect_rd(19'h05007, s34, "sel_test_out_34");
      if (k == 100) wr(19'h7FFFB, 8'h10);
      @(negedge clk) test_sig = 15'($urandom);
      @(negedge clk);
      t = {module_enabled, test_sig};
      chk(test_out == {t[s34[7:4]], t[s34[3:0]], t[s12[7:4]], t[s12[3:0]]},
          $sformatf("TEST_OUT %b", test_out));
    end
    // ---- unmapped space ---------------------------------------------------------------------------
    expect_rd(19'h05013, 8'h00, "unused USER_CSR");
    expect_rd(19'h40003, 8'h00, "unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
