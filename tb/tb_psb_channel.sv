// Self-checking testbench of one PSB channel (with LVDS and transmitter
// options) and of a channel without them, on a 100-bx orbit driven by the
// testbench. Serial samples carry {phase, tick, time stamp}; checked are the
// phase selection, the programmed delay, the LVDS word replacing the serial
// word, the empty word when LVDS is selected on a channel without LVDS, the
// simulation playback on the backplane and transmitter outputs, and the ring
// buffer holding the backplane word of each bx.
module tb_psb_channel;
  import psb_pkg::*;
  localparam int ORBIT = 100;
  logic clk = 0, rst = 1;
  logic [1:0][3:0][WORD_W-1:0] ser_samp;
  logic [CHW-1:0] lvds_word;
  chan_reg_t cfg;
  logic [15:0] dly_cfg;
  logic bcres_int, bcres_lat, start_next_orbit;
  logic [BX_W-1:0] bc_num;
  logic [1:0][CHW-1:0] gtl_out, tx_out;
  logic clr_a, clr_b;
  logic [1:0][15:0] cnt_a, cnt_b;
  logic [12:0] vme_addr;
  logic vme_we, vme_re;
  logic [WORD_W-1:0] vme_wdata;
  logic [1:0][WORD_W-1:0] vme_rdata;
  logic [1:0] spy_we, sim_active;
  logic ring_rd_en;
  logic [7:0] ring_rd_addr;
  logic [1:0][CHW-1:0] ring_rd_data;
  int checks = 0, failures = 0;
  int n = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    psb_channel #(.HAS_LVDS(i == 0), .HAS_TX(i == 0)) dut (
      .clk, .rst, .ser_samp, .lvds_word, .cfg, .dly_cfg, .bcres_int, .bcres_lat, .bc_num,
      .start_next_orbit, .gtl_out(gtl_out[i]), .tx_out(tx_out[i]), .clr_a, .clr_b,
      .cnt_a(cnt_a[i]), .cnt_b(cnt_b[i]), .vme_addr, .vme_we, .vme_re, .vme_wdata,
      .vme_rdata(vme_rdata[i]), .spy_we(spy_we[i]), .sim_active(sim_active[i]),
      .ring_rd_en, .ring_rd_addr, .ring_rd_data(ring_rd_data[i]));
  end

  // orbit, stimulus applied 1 ns after the rising edge
  always @(posedge clk) begin
    #1;
    n++;
    if (rst) bc_num = 0;
    else     bc_num = (bc_num == ORBIT - 1) ? 0 : bc_num + 1;
    bcres_int = !rst && bc_num == 0;
    bcres_lat = !rst && bc_num == 10;
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < 4; p++) ser_samp[t][p] = {2'(p), 1'(t), 13'(n)};
    lvds_word = {16'hF00D, 16'(n)};
  end

  logic [CHW-1:0] hist [int];
  always @(negedge clk) hist[n] = gtl_out[0];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    bit ok;
    int cnt;
    cfg = '0; dly_cfg = 0; start_next_orbit = 0; clr_a = 0; clr_b = 0;
    vme_addr = 0; vme_we = 0; vme_re = 0; vme_wdata = 0; ring_rd_en = 0; ring_rd_addr = 0;
    bc_num = 0; bcres_int = 0; bcres_lat = 0; ser_samp = '0; lvds_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 2, delay 5 (1 + A = 4): latency 2 + 5
    cfg.sel_phase = 2'b10; dly_cfg = 16'h0041;
    repeat (20) @(negedge clk);
    ok = 1;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      if (gtl_out[0] != {2'd2, 1'b1, 13'(n - 7), 2'd2, 1'b0, 13'(n - 7)}) ok = 0;
      if (gtl_out[1] != gtl_out[0] || tx_out != '0) ok = 0;
    end
    chk(ok, $sformatf("serial word %h (n=%0d)", gtl_out[0], n));
    // ring buffer: read the bx written 10 bx earlier
    begin
      ok = 1;
      for (int k = 0; k < 20; k++) begin
        int m;
        @(negedge clk);
        m = n - 6;   // wr_last holds the word of the previous falling edge
        ring_rd_en = 1;
        ring_rd_addr = 8'(g_dut[0].dut.u_ring.wr_last - 8'd5);
        @(negedge clk);
        ring_rd_en = 0;
        if (ring_rd_data[0] != hist[m]) begin ok = 0; $display("ring %h hist %h %h %h", ring_rd_data[0], hist[m-1], hist[m], hist[m+1]); end
      end
      chk(ok, "ring buffer holds the backplane words");
    end
    // LVDS
    cfg.sel_lvdsdata = 1;
    repeat (3) @(negedge clk);
    ok = 1;
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      if (gtl_out[0] != {16'hF00D, 16'(n - 1)} || gtl_out[1] != '0) ok = 0;
    end
    chk(ok, $sformatf("LVDS word %h / %h", gtl_out[0], gtl_out[1]));
    cfg.sel_lvdsdata = 0;
    // simulation data: words {bx, tick}
    for (int a = 0; a < 2 * ORBIT; a++) begin
      @(negedge clk); vme_addr = 13'(a); vme_wdata = {4'(3 + a % 2), 12'(a / 2)}; vme_we = 1;
    end
    @(negedge clk) vme_we = 0;
    cfg.sel_sim_mode = 1; cfg.en_trx_data = 1;
    @(negedge clk) start_next_orbit = 1;
    @(negedge clk) start_next_orbit = 0;
    cnt = 0; ok = 1;
    for (int k = 0; k < 3 * ORBIT; k++) begin
      @(negedge clk);
      if (gtl_out[0] != 0) begin
        cnt++;
        if (gtl_out[0][15:12] != 4'h3 || gtl_out[0][31:28] != 4'h4 ||
            gtl_out[0][11:0] != 12'((int'(bc_num) + ORBIT - 2) % ORBIT)) ok = 0;
        if (tx_out[0] != gtl_out[0] || tx_out[1] != 0 || gtl_out[1] != gtl_out[0]) ok = 0;
      end
    end
    chk(cnt == ORBIT, $sformatf("playback of %0d bx", cnt));
    chk(ok, "playback words, transmitter only on the channel with it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
