// End-to-end testbench of the PSB chip at its full size (no parameter
// overrides: 3564-bx orbit, 8k-word SIM/SPY memories, 256-word rings,
// 512-word FIFOs). Everything is set up through the local VME bus.
//
// Stimulus: every serial sample word carries its phase, channel, tick and a
// time stamp n (one count per bx): {phase[1:0], chan[2:0], tick, n[9:0]}.
// The LVDS samples carry, per phase p, the group pattern p in groups 0..3
// and the time stamp in groups 4..7 (and the same in bits 63..32), sent in
// negative logic. From the backplane words the testbench thus sees which
// phase was selected and how many clocks the data took.
//
// Mechanisms exercised, each counted (one that never happens is a failure):
// register access, phase selection and inhibit, phase counters, channel
// delay, LVDS data with per-group phase and delay, Technical-Trigger edge
// pulses, simulation playback over a full orbit (with the transmitter
// output), spy of a full orbit, BC error and resynchronisation, test point,
// ROBUS START/STOP, 3-bx and 5-bx readout records, event counter reset,
// FIFO warning / full and L1A loss, L1Res.
module tb_psb_chip;
  import psb_pkg::*;
  localparam int ORBIT = 3564;

  logic clk = 0, rst = 1;
  logic [N_CHAN-1:0][1:0][3:0][WORD_W-1:0] ser_samp;
  logic [3:0][N_LVDS-1:0] lvds_samp_n;
  logic tt_edge_en;
  logic bcres_in, l1a_in, l1res_in, evcres_in;
  logic robus_rdrqst;
  logic [2:0] robus_strobe;
  logic [11:0] robus_bx;
  logic bus_en, bus_wr, bus_ack;
  logic [19:1] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic [N_CHAN-1:0][CHW-1:0] gtl_out;
  logic [3:0][CHW-1:0] tx_out;
  logic [CL_W-1:0] chlink;
  logic chlink_rec, bcres_out, l1a_lost;
  logic [3:0] psb_status;
  logic [6:0] testpoint;

  int checks = 0, failures = 0;
  int mech [string];

  always #12.5 clk = ~clk;

  psb_chip dut (.*);

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, m); end
  endtask
  function automatic void hit(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction

  // ---- stimulus: time stamp, bunch number seen from outside ----------------
  int n = 0;       // time stamp, +1 per clock
  int bc_tb = 0;   // bunch number from bcres_out
  int cyc = 0;      // clock counter
  always @(posedge clk) begin
    #2;
    cyc++;
    n++;
    for (int c = 0; c < N_CHAN; c++)
      for (int t = 0; t < 2; t++)
        for (int p = 0; p < 4; p++)
          ser_samp[c][t][p] = {2'(p), 3'(c), 1'(t), 10'(n)};
    for (int p = 0; p < 4; p++)
      lvds_samp_n[p] = ~{2{16'(n), 4'(p), 4'(p), 4'(p), 4'(p)}};
    bc_tb = bcres_out ? 0 : bc_tb + 1;
  end
  // stimulus is applied 2 ns after the clock edge, so n, bc_tb and all
  // outputs are stable at the falling edge where they are checked

  // ---- Channel Link record monitor ------------------------------------------
  typedef logic [CL_W-1:0] rec_t [$];
  rec_t cur, recs [$];
  always @(negedge clk) if (!rst) begin
    if (chlink_rec) cur.push_back(chlink);
    else if (cur.size() > 0) begin recs.push_back(cur); cur = {}; end
  end

  // ---- test point 0 pulses --------------------------------------------------
  int tp0_pulses = 0;
  always @(posedge clk) if (!rst && testpoint[0]) tp0_pulses++;

  // ---- local bus ------------------------------------------------------------
  task automatic access(input bit wr, input int byte_addr, input logic [15:0] d,
                        output logic [15:0] q);
    @(negedge clk);
    bus_en = 1; bus_wr = wr; bus_addr = 19'(byte_addr >> 1); bus_wdata = d;
    @(negedge clk);
    bus_en = 0;
    @(negedge clk);
    chk(bus_ack, "bus acknowledge");
    q = bus_rdata;
  endtask
  task automatic wr(input int a, input logic [15:0] d);
    logic [15:0] q;
    access(1, a, d, q);
  endtask
  task automatic rd(input int a, output logic [15:0] q);
    access(0, a, 16'h0, q);
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask
  task automatic bgo(input logic [11:0] b);
    @(negedge clk) begin robus_rdrqst = 1; robus_strobe = 3'b001; robus_bx = b; end
    @(negedge clk) begin robus_rdrqst = 0; robus_strobe = 0; robus_bx = 0; end
    repeat (3) @(negedge clk);
  endtask

  // serial word latency and phase of channel c, A word
  task automatic check_serial(input int c, input int ph, input int lat, input string m);
    logic [15:0] w;
    int bad = 0;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      w = gtl_out[c][15:0];
      if (w[15:14] != 2'(ph) || w[13:11] != 3'(c) || w[10] != 1'b0 || w[9:0] != 10'(n - lat)) bad++;
      if (gtl_out[c][31:16] != {2'(ph), 3'(c), 1'b1, 10'(n - lat)}) bad++;
    end
    chk(bad == 0, $sformatf("%s: channel %0d word %h (n=%0d)", m, c, w, n));
    if (bad == 0) hit(m);
  endtask

  // wait for the end of the readout activity
  task automatic wait_records(input int want, input int max_clk);
    int k = 0;
    while (recs.size() < want && k < max_clk) begin @(negedge clk); k++; end
    repeat (5) @(negedge clk);
  endtask

  // check one record; returns the central bunch number
  function automatic int check_rec(input rec_t r, input int nbx, input int evnr, input logic [15:0] bid);
    int ok = 1, half = nbx / 2, central = -1;
    int stamp0;
    if (r.size() != 24 * nbx + 1) return -2;
    for (int k = 0; k < nbx; k++) begin
      int w = 24 * k;
      logic [15:0] a2;
      if (r[w] != {4'hA, 8'h00, 16'(evnr)}) ok = 0;
      if (r[w+1] != {4'hB, 16'h0, 8'(evnr >> 16)}) ok = 0;
      if (r[w+2][27:24] != 4'hC || r[w+2][15:12] != 4'(k - half)) ok = 0;
      if (k > 0 && r[w+2][11:0] != 12'((int'(r[w-22][11:0]) + 1) % ORBIT)) ok = 0;
      if (k == half) central = int'(r[w+2][11:0]);
      if (r[w+3] != {4'hD, 8'h00, bid}) ok = 0;
      // channel 2: serial data, time stamps one apart from bx to bx
      a2 = r[w+4+2][15:0];
      if (r[w+4+2][27:16] != 12'h100 || a2[13:11] != 3'd2) ok = 0;
      if (k == 0) stamp0 = int'(a2[9:0]);
      else if (a2[9:0] != 10'(stamp0 + k)) ok = 0;
      if (r[w+12+2][15:0] != {a2[15:11], 1'b1, a2[9:0]}) ok = 0;
      if (r[w+20][27:24] != 4'hE) ok = 0;
      for (int e = 21; e < 24; e++) if (r[w+e] != 28'hE000000) ok = 0;
    end
    if (r[24 * nbx] != 28'hFFFFFFF) ok = 0;
    return ok ? central : -1;
  endfunction

  initial begin
    logic [15:0] q;
    int r0, c_bx, d0, l1a_bc, cnt, off0;
    bit ok;
    ser_samp = '0; lvds_samp_n = '1; tt_edge_en = 0;
    bcres_in = 0; l1a_in = 0; l1res_in = 0; evcres_in = 0;
    robus_rdrqst = 0; robus_strobe = 0; robus_bx = 0;
    bus_en = 0; bus_wr = 0; bus_addr = 0; bus_wdata = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---- identification and reset values --------------------------------------
    rd(16'h864, q); chk(q == 16'h8131, "CHIP_ID"); if (q == 16'h8131) hit("register access");
    rd(16'h048, q); chk(q == 16'h0DEB, "MAX_BC_NUMBER reset value");

    // ---- bunch counter: orbit length, BC error, resynchronisation -----------
    begin
      int t1 = -1, t2 = -1;
      for (int k = 0; k < 2 * ORBIT + 10; k++) begin
        @(negedge clk);
        if (bcres_out) begin if (t1 < 0) t1 = n; else if (t2 < 0) t2 = n; end
      end
      chk(t2 - t1 == ORBIT, $sformatf("internal orbit %0d clocks", t2 - t1));
    end
    rd(16'h860, q); chk(q[4], "BC_ERROR set after reset");
    wr(16'h070, 16'h1000);  // Res_BC_error
    rd(16'h860, q); chk(!q[4], "BC_ERROR cleared");
    while (bc_tb != 1000) @(negedge clk);
    @(negedge clk) bcres_in = 1;  // out of phase
    d0 = cyc;
    @(negedge clk) bcres_in = 0;
    repeat (10) @(negedge clk);
    chk(bc_tb < 20, $sformatf("counter resynchronised (bc %0d)", bc_tb));
    rd(16'h860, q); chk(q[4], "BC_ERROR after out-of-phase BCRES");
    if (q[4] && bc_tb < 20) hit("BC error and resync");
    wr(16'h070, 16'h1000);
    while (cyc != d0 + ORBIT) @(negedge clk);
    bcres_in = 1;               // same relative timing, one orbit later: in phase
    @(negedge clk) bcres_in = 0;
    repeat (10) @(negedge clk);
    rd(16'h860, q); chk(!q[4], "no BC_ERROR for in-phase BCRES");
    if (!q[4]) hit("in-phase BCRES");

    // ---- serial channels: phase selection, inhibit, delay --------------------
    wr(16'h002, 16'h0002);   // CHAN_REG1: phase 2
    wr(16'h00A, 16'h0001);   // CHAN_REG5: inhibit
    wr(16'h014, 16'h0A52);   // CHAN_DELAY2: 2 + 5 + 10 = 17
    repeat (30) @(negedge clk);
    check_serial(0, 0, 2, "phase 0 selection");
    check_serial(1, 2, 2, "phase 2 selection");
    check_serial(2, 0, 19, "channel delay");
    chk(gtl_out[5] == 0, "inhibited channel gives 0");
    if (gtl_out[5] == 0) hit("phase inhibit");
    wr(16'h00A, 16'h0000);
    // phase counters of channel 0: only pre3 -> 0 sees the bit-0 transitions
    rd(16'h800, q); chk(q == 16'h00FF, $sformatf("PHASE_CNTR_A0 %h", q));
    rd(16'h800, q); chk(q[15:8] == 0 && q[7:0] < 8'h10, $sformatf("cleared on read %h", q));
    rd(16'h810, q); chk(q == 16'h0000, $sformatf("PHASE_CNTR_B0 %h", q));
    if (failures == 0) hit("phase counters");

    // ---- LVDS data on channel 0 ------------------------------------------------
    wr(16'h04A, 16'h00E4);   // groups 3..0 select phases 3,2,1,0
    for (int g = 4; g < 8; g++) wr(16'h020 + 2 * g, 16'h0002);  // stamp groups: delay 2
    wr(16'h000, 16'h0004);   // CHAN_REG0: sel_lvdsdata
    wr(16'h008, 16'h0004);   // CHAN_REG4: sel_lvdsdata on a channel without LVDS
    repeat (30) @(negedge clk);
    ok = 1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      if (gtl_out[0] != {16'(n - 4), 16'h3210}) ok = 0;
    end
    chk(ok, $sformatf("LVDS word %h (n=%0d)", gtl_out[0], n));
    chk(gtl_out[4] == 0, "LVDS select on a channel without LVDS gives 0");
    if (ok) hit("LVDS per-group phase and delay");
    rd(16'h820, q); chk(q == 16'hFFFF, $sformatf("LVDS PHASE_CNTR_A0 %h", q));
    rd(16'h840, q); chk(q == 16'hFFFF, $sformatf("LVDS PHASE_CNTR_B0 %h", q));
    rd(16'h828, q); chk(q == 16'h00FF, $sformatf("LVDS PHASE_CNTR_A4 %h", q));
    // Technical Trigger edges
    tt_edge_en = 1;
    repeat (10) @(negedge clk);
    ok = 1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      if (gtl_out[0] != {16'(n - 5) ^ 16'(n - 6), 16'h0000}) ok = 0;
    end
    chk(ok, $sformatf("edge pulses %h (n=%0d)", gtl_out[0], n));
    if (ok) hit("Technical Trigger edge pulses");
    tt_edge_en = 0;
    wr(16'h000, 16'h0000);
    wr(16'h008, 16'h0000);

    // ---- test point 0 = internal BCRES ----------------------------------------
    wr(16'h052, 16'h4000);
    tp0_pulses = 0;
    repeat (2 * ORBIT) @(negedge clk);
    chk(tp0_pulses == 2, $sformatf("test point pulses %0d in two orbits", tp0_pulses));
    if (tp0_pulses == 2) hit("test point");
    wr(16'h052, 16'h0000);

    // ---- simulation playback on channel 3 over one full orbit -----------------
    for (int a = 0; a < 2 * ORBIT; a++)
      wr(32'h20000 + 32'h4000 * 3 + 2 * a, {4'(5 + a % 2), 12'(a / 2)});
    wr(16'h006, 16'h0028);   // sim mode, transmitter on
    wr(16'h070, 16'h0008);   // run_next_orbit[3]
    cnt = 0; off0 = -1; ok = 1;
    for (int k = 0; k < 3 * ORBIT; k++) begin
      @(negedge clk);
      if (gtl_out[3] != 0) begin
        int off;
        cnt++;
        off = (bc_tb - int'(gtl_out[3][11:0]) + ORBIT) % ORBIT;
        if (off0 < 0) off0 = off;
        if (off != off0 || gtl_out[3][15:12] != 4'h5 || gtl_out[3][31:28] != 4'h6 ||
            gtl_out[3][27:16] != gtl_out[3][11:0]) ok = 0;
        if (tx_out[3] != gtl_out[3]) ok = 0;
      end
    end
    chk(cnt == ORBIT, $sformatf("playback lasted %0d bx", cnt));
    chk(off0 == 2, "simulation word of address b is sent in bx b + 2");
    chk(ok, "playback data and transmitter output");
    $display("simulation data appear %0d bx after their address", off0);
    if (cnt == ORBIT && ok) hit("simulation playback");
    wr(16'h006, 16'h0000);

    // ---- spy one orbit of channel 4 --------------------------------------------
    wr(16'h070, 16'h0010);
    repeat (2 * ORBIT + 10) @(negedge clk);
    ok = 1;
    begin
      logic [15:0] w0, w1, w2;
      for (int b = 0; b < ORBIT - 1; b += 97) begin
        rd(32'h20000 + 32'h4000 * 4 + 4 * b, w0);
        rd(32'h20000 + 32'h4000 * 4 + 4 * b + 2, w1);
        rd(32'h20000 + 32'h4000 * 4 + 4 * b + 4, w2);
        if (w0[15:10] != {2'd0, 3'd4, 1'b0} || w1 != {w0[15:11], 1'b1, w0[9:0]} ||
            w2[9:0] != 10'(w0[9:0] + 1)) ok = 0;
      end
    end
    chk(ok, "spy memory content");
    if (ok) hit("spy");

    // ---- readout -----------------------------------------------------------------
    wr(16'h040, 16'h0BD7);    // BOARD_ID
    wr(16'h044, 16'h0A52);    // LATENCY_DELAY 17
    repeat (ORBIT) @(negedge clk);   // read counter restarts at the next orbit
    wr(16'h046, 16'h000A);    // READY, ROBUS enabled
    bgo(12'h020);             // START_RUN
    rd(16'h862, q); chk(q[14], "run flag after BGo START");
    if (q[14]) hit("ROBUS START");
    d0 = -1; ok = 1;
    for (int e = 1; e <= 4; e++) begin
      r0 = recs.size();
      repeat ($urandom_range(100, 400)) @(negedge clk);
      l1a_bc = bc_tb + 1;       // the L1A is sampled one clock later
      pulse(l1a_in);
      wait_records(r0 + 1, 500);
      chk(recs.size() == r0 + 1, "one record per L1A");
      if (recs.size() == r0 + 1) begin
        c_bx = check_rec(recs[r0], 3, e, 16'h0BD7);
        chk(c_bx >= 0, $sformatf("3-bx record %0d content (%0d, length %0d)", e, c_bx, recs[r0].size()));
        if (c_bx >= 0) begin
          int d;
          d = (l1a_bc - c_bx + ORBIT) % ORBIT;
          if (d0 < 0) d0 = d;
          chk(d == d0, "central bx at a fixed distance from the L1A");
          hit("3-bx readout");
        end
      end
    end
    $display("central bx of a record is %0d bx before the L1A", d0);
    chk(d0 == 17, "record central bx = L1A bx - LATENCY_DELAY");
    wr(16'h046, 16'h000E);    // five bx per event
    r0 = recs.size();
    pulse(l1a_in);
    wait_records(r0 + 1, 500);
    if (recs.size() == r0 + 1) begin
      c_bx = check_rec(recs[r0], 5, 5, 16'h0BD7);
      chk(c_bx >= 0, $sformatf("5-bx record content (length %0d)", recs[r0].size()));
      if (c_bx >= 0) hit("5-bx readout");
    end else chk(0, "5-bx record missing");
    wr(16'h046, 16'h000A);
    // event counter reset
    pulse(evcres_in);
    r0 = recs.size();
    pulse(l1a_in);
    wait_records(r0 + 1, 500);
    if (recs.size() == r0 + 1) begin
      c_bx = check_rec(recs[r0], 3, 1, 16'h0BD7);
      chk(c_bx >= 0, "first event after event counter reset is 1");
      if (c_bx >= 0) hit("event counter reset");
    end else chk(0, "record after event counter reset missing");
    // L1A burst: queue and FIFOs overflow
    begin
      bit saw_warn = 0, saw_full = 0, saw_busy = 0;
      for (int k = 0; k < 1500; k++) begin
        @(negedge clk) l1a_in = 1;
        if (dut.rop_status[10]) saw_warn = 1;
        if (dut.rop_status[9])  saw_full = 1;
        if (psb_status == 4'b0100) saw_busy = 1;
      end
      @(negedge clk) l1a_in = 0;
      chk(l1a_lost, "l1a_lost after burst");
      chk(saw_warn && saw_full && saw_busy, $sformatf("FIFO warning %0d, full %0d, busy status %0d", saw_warn, saw_full, saw_busy));
      if (l1a_lost) hit("L1A lost");
      if (saw_warn && saw_full && saw_busy) hit("FIFO warning and full");
    end
    // L1Res: FIFOs empty once the current record is done
    pulse(l1res_in);
    repeat (200) @(negedge clk);
    rd(16'h862, q);
    chk(q[8:0] == 9'h1FF && q[15], $sformatf("ROP_STATUS after L1Res %h", q));
    if (q[8:0] == 9'h1FF) hit("L1Res");
    chk(recs.size() > 0 && recs[$].size() == 73, "record interrupted by L1Res is complete");
    wr(16'h070, 16'h8000);   // reset_error_flag
    chk(!l1a_lost, "l1a_lost cleared");
    rd(16'h860, q); chk(q[3:0] == 4'b1000, $sformatf("PSB status READY %h", q));
    // ROBUS STOP
    bgo(12'h040);
    rd(16'h862, q); chk(!q[14], "run flag cleared by BGo STOP");
    r0 = recs.size();
    pulse(l1a_in);
    repeat (300) @(negedge clk);
    chk(recs.size() == r0, "no readout after STOP");
    if (!q[14] && recs.size() == r0) hit("ROBUS STOP");

    // ---- all mechanisms seen ---------------------------------------------------
    foreach (mech[m]) $display("mechanism %-32s %0d", m, mech[m]);
    begin
      string need [] = '{"register access", "BC error and resync", "in-phase BCRES",
        "phase 0 selection", "phase 2 selection", "channel delay", "phase inhibit",
        "phase counters", "LVDS per-group phase and delay", "Technical Trigger edge pulses",
        "test point", "simulation playback", "spy", "ROBUS START", "3-bx readout",
        "5-bx readout", "event counter reset", "L1A lost", "FIFO warning and full", "L1Res",
        "ROBUS STOP"};
      foreach (need[i]) begin
        checks++;
        if (!mech.exists(need[i])) begin failures++; $display("FAIL: mechanism never seen: %s", need[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
