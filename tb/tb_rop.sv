// Self-checking testbench of the readout processor. The ring buffers are
// modelled in the testbench: a free-running 8-bit read counter, and read data
// that are a known function of channel and address, returned one clock after
// the read. Checked: the complete record (headers A-D, 16 data words, E words,
// trailer) against the model for 3- and 5-bx events, the record length of 73 /
// 121 words sent one word per clock, IDLE_ID between records, the run flag
// (no readout when not started or not READY), event numbering from 1 with the
// event-counter reset, loss of events when the FIFOs overflow (l1a_lost),
// L1Res clearing the FIFOs, and the PSB status code for the PSB modes.
module tb_rop;
  import psb_pkg::*;
  localparam int FD = 16;   // small FIFOs to reach the overflow quickly
  logic clk = 0, rst = 1;
  logic l1a, l1res, evc_res, start_run, stop_run, reset_error_flag;
  rop_setup_t setup;
  logic [15:0] board_id;
  logic [27:0] idle_id;
  logic [7:0] ring_rd_cnt, ring_rd_addr;
  logic ring_rd_en;
  logic [N_CHAN-1:0][CHW-1:0] ring_ch_data;
  logic [BX_W-1:0] ring_bx_data;
  logic [CL_W-1:0] chlink;
  logic chlink_rec, run_flag, l1a_lost;
  logic [15:0] rop_status;
  logic [3:0] psb_status;
  logic write_fifo, read_fifo, store_fifo_data, sclr_fifo, inc_event_nr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rop #(.RING_AW(8), .FIFO_DEPTH(FD), .Q_DEPTH(16)) dut (.*);

  function automatic logic [31:0] chdata(input int c, input logic [7:0] a);
    return {8'(8'hC0 + c), a, 8'(a * 3), 8'(c * 17 + a)};
  endfunction
  function automatic logic [11:0] bxdata(input logic [7:0] a);
    return 12'(a * 5 + 7);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) ring_rd_cnt <= 8'd0;
    else     ring_rd_cnt <= ring_rd_cnt + 1'b1;
    if (ring_rd_en) begin
      for (int c = 0; c < N_CHAN; c++) ring_ch_data[c] <= chdata(c, ring_rd_addr);
      ring_bx_data <= bxdata(ring_rd_addr);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask

  // ---- event bookkeeping --------------------------------------------------
  logic [7:0] cnt_of_ev [int];
  int         tb_evnr = 0;
  int         nbx_mode = 3;

  // ---- record monitor -------------------------------------------------------
  logic [CL_W-1:0] rec [$];
  int n_records = 0, n_bad_len = 0;
  int seen_ev [$];

  task automatic check_record();
    int evnr, nbx, half, w;
    logic [7:0] c0, a;
    evnr = int'(rec[0][15:0]) | (int'(rec[1][7:0]) << 16);
    seen_ev.push_back(evnr);
    nbx  = (rec.size() - 1) / 24;
    chk(rec.size() == 24 * nbx_mode + 1, $sformatf("record length %0d", rec.size()));
    if (!cnt_of_ev.exists(evnr)) begin chk(0, $sformatf("unknown event %0d", evnr)); return; end
    c0 = cnt_of_ev[evnr];
    half = nbx / 2;
    w = 0;
    for (int k = 0; k < nbx; k++) begin
      logic [3:0] boff;
      a = 8'(int'(c0) + k - half);
      boff = 4'(k - half);
      chk(rec[w+0] == {4'hA, 8'h00, 16'(evnr)}, $sformatf("A word %h", rec[w+0]));
      chk(rec[w+1] == {4'hB, 16'h0, 8'(evnr >> 16)}, $sformatf("B word %h", rec[w+1]));
      chk(rec[w+2] == {4'hC, 8'h00, boff, bxdata(a)}, $sformatf("C word %h", rec[w+2]));
      chk(rec[w+3] == {4'hD, 8'h00, board_id}, $sformatf("D word %h", rec[w+3]));
      for (int c = 0; c < 8; c++) begin
        logic [31:0] d;
        d = chdata(c, a);
        chk(rec[w+4+c]  == {4'h1, 8'h00, d[15:0]},  $sformatf("ev %0d bx %0d ch %0d A %h", evnr, k, c, rec[w+4+c]));
        chk(rec[w+12+c] == {4'h1, 8'h00, d[31:16]}, $sformatf("ev %0d bx %0d ch %0d B %h", evnr, k, c, rec[w+12+c]));
      end
      chk(rec[w+20] == {4'hE, 11'h0, 13'(a)}, $sformatf("E word %h", rec[w+20]));
      for (int e = 21; e < 24; e++) chk(rec[w+e] == 28'hE000000, "E000000 word");
      w += 24;
    end
    chk(rec[w] == 28'hFFFFFFF, $sformatf("trailer %h", rec[w]));
  endtask

  logic rst_q;
  bit saw_warn = 0, saw_full = 0;
  always @(posedge clk) begin
    if (rop_status[10]) saw_warn = 1;
    if (rop_status[9])  saw_full = 1;
  end
  always_ff @(posedge clk) rst_q <= rst;
  always @(negedge clk) begin
    if (!rst && !rst_q) begin
      if (chlink_rec) rec.push_back(chlink);
      else begin
        chk(chlink == idle_id, $sformatf("idle word %h", chlink));
        if (rec.size() > 0) begin
          check_record();
          n_records++;
          rec.delete();
        end
      end
    end
  end

  // ---- stimulus helpers -----------------------------------------------------
  task automatic send_l1a();
    @(negedge clk);
    l1a = 1;
    tb_evnr++;
    cnt_of_ev[tb_evnr] = ring_rd_cnt;
    @(negedge clk) l1a = 0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask
  task automatic wait_idle();
    int n = 0;
    do begin @(negedge clk); n++; end
    while ((!rop_status[15] || !(&rop_status[8:0]) || rec.size() != 0 || dut.t_state != 0) && n < 20000);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int r0, lat, t0;
    l1a = 0; l1res = 0; evc_res = 0; start_run = 0; stop_run = 0; reset_error_flag = 0;
    setup = '0; board_id = 16'h1234; idle_id = 28'h555AAAA;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // status codes per mode
    setup.psb_mode = PSB_DISCONNECTED; #1 chk(psb_status == 4'b0000, "DISCONNECTED code");
    setup.psb_mode = PSB_BAD_CODE;     #1 chk(psb_status == 4'b1111, "BAD_CODE code");
    setup.psb_mode = PSB_BUSY;         #1 chk(psb_status == 4'b0100, "BUSY code");
    setup.psb_mode = PSB_READY;        #1 chk(psb_status == 4'b1000, "READY code");
    // not started: L1As are ignored
    send_l1a(); repeat (100) @(negedge clk);
    chk(n_records == 0 && !run_flag, "no readout before start");
    // start and read 3-bx events, measure the L1A-to-record latency
    pulse(start_run);
    chk(run_flag, "run flag set by start");
    chk(rop_status[14], "ROP_STATUS run flag bit");
    send_l1a();
    t0 = 0;
    while (!chlink_rec && t0 < 100) begin @(negedge clk); t0++; end
    lat = t0;
    $display("L1A to first record word: %0d clocks", lat + 1);
    chk(lat < 20, "record starts within 20 clocks");
    for (int i = 0; i < 5; i++) begin
      repeat ($urandom_range(0, 200)) @(negedge clk);
      send_l1a();
    end
    wait_idle();
    chk(n_records == 6, $sformatf("6 records, got %0d", n_records));
    chk(seen_ev[0] == 2, $sformatf("first read event number %0d (L1A before start counted)", seen_ev[0]));
    // 5-bx events
    setup.five_bx_event = 1; nbx_mode = 5;
    r0 = n_records;
    for (int i = 0; i < 3; i++) begin send_l1a(); repeat (50) @(negedge clk); end
    wait_idle();
    chk(n_records == r0 + 3, "3 five-bx records");
    setup.five_bx_event = 0; nbx_mode = 3;
    // event counter reset: next event number is 1
    pulse(evc_res);
    tb_evnr = 0;
    send_l1a(); wait_idle();
    chk(seen_ev[$] == 1, $sformatf("event number after reset %0d", seen_ev[$]));
    // burst: overflow of the FIFOs gives l1a_lost, surviving records stay whole
    r0 = n_records;
    chk(!l1a_lost, "no loss before burst");
    for (int i = 0; i < 12; i++) send_l1a();
    wait_idle();
    chk(saw_warn && saw_full, "FIFO warning and full flags during burst");
    chk(l1a_lost, "l1a_lost after overflow");
    chk(n_records - r0 < 12 && n_records - r0 >= FD / 3, $sformatf("burst kept %0d events", n_records - r0));
    pulse(reset_error_flag);
    chk(!l1a_lost, "l1a_lost cleared");
    // L1Res in the middle of a burst: FIFOs cleared after the current record
    for (int i = 0; i < 6; i++) send_l1a();
    pulse(l1res);
    wait_idle();
    chk(&rop_status[8:0], "FIFOs empty after L1Res");
    r0 = n_records;
    send_l1a(); wait_idle();
    chk(n_records == r0 + 1, "readout works after L1Res");
    // stop: no more records
    pulse(stop_run);
    chk(!run_flag, "run flag cleared by stop");
    r0 = n_records;
    send_l1a(); repeat (200) @(negedge clk);
    chk(n_records == r0, "no readout after stop");
    // leaving READY clears the run flag
    pulse(start_run);
    setup.psb_mode = PSB_BUSY; @(negedge clk); @(negedge clk);
    chk(!run_flag, "run flag cleared when not READY");
    chk(!rop_status[12], "no out-of-sync");
    $display("records read: %0d", n_records);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
