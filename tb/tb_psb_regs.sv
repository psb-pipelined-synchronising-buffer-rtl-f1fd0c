// Self-checking testbench of the PSB register file. The SIM/SPY memories are
// modelled as eight small arrays with one clock read latency. Checked: the
// reset values, write / read-back of every setup register (with the field
// outputs), CMD_PULSE giving one-clock pulses, read-only identifiers and
// status words, phase-counter reads with their clear strobes, the memory
// window routing, and the acknowledge two clocks after every request.
module tb_psb_regs;
  import psb_pkg::*;
  logic clk = 0, rst = 1;
  logic bus_en, bus_wr, bus_ack;
  logic [19:1] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  chan_reg_t [N_CHAN-1:0] chan_reg;
  logic [N_CHAN-1:0][15:0] chan_delay;
  logic [N_GRP-1:0][15:0] lvds_delay;
  logic [15:0] board_id, bcres_delay, latency_delay, max_bc, sel_phase3100, sel_phase6332;
  rop_setup_t rop_setup;
  logic [27:0] idle_id;
  logic [6:0][15:0] testmask;
  cmd_pulse_t cmd;
  logic [N_CHAN-1:0][15:0] ser_cnt_a, ser_cnt_b;
  logic [N_CHAN-1:0] ser_clr_a, ser_clr_b;
  logic [N_GRP-1:0][15:0] lvds_cnt_a, lvds_cnt_b;
  logic [N_GRP-1:0] lvds_clr_a, lvds_clr_b;
  logic [15:0] psb_status, rop_status;
  logic [N_CHAN-1:0] mem_we, mem_re;
  logic [12:0] mem_addr;
  logic [15:0] mem_wdata;
  logic [N_CHAN-1:0][15:0] mem_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  psb_regs dut (.*);

  logic [15:0] mem [N_CHAN][64];
  always_ff @(posedge clk)
    for (int n = 0; n < N_CHAN; n++) begin
      if (mem_we[n]) mem[n][mem_addr[5:0]] <= mem_wdata;
      if (mem_re[n]) mem_rdata[n] <= mem[n][mem_addr[5:0]];
    end

  // strobe recorders
  logic [N_CHAN-1:0] seen_clr_a, seen_clr_b;
  logic [N_GRP-1:0]  seen_lclr_a, seen_lclr_b;
  int                n_cmd_clocks = 0;
  always @(posedge clk) begin
    seen_clr_a  |= ser_clr_a;   seen_clr_b  |= ser_clr_b;
    seen_lclr_a |= lvds_clr_a;  seen_lclr_b |= lvds_clr_b;
    if (cmd != 0) n_cmd_clocks++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  task automatic access(input bit wr, input int byte_addr, input logic [15:0] d,
                        output logic [15:0] q);
    int n = 0;
    @(negedge clk);
    bus_en = 1; bus_wr = wr; bus_addr = 19'(byte_addr >> 1); bus_wdata = d;
    @(negedge clk);
    bus_en = 0;
    chk(!bus_ack, "no ack after one clock");
    @(negedge clk);
    chk(bus_ack, $sformatf("ack two clocks after access to %h", byte_addr));
    q = bus_rdata;
  endtask
  task automatic wr(input int a, input logic [15:0] d);
    logic [15:0] q;
    access(1, a, d, q);
  endtask
  task automatic rd(input int a, output logic [15:0] q);
    access(0, a, 16'h0, q);
  endtask

  initial begin
    logic [15:0] q, v;
    logic [15:0] shadow [int];
    bus_en = 0; bus_wr = 0; bus_addr = 0; bus_wdata = 0;
    for (int n = 0; n < N_CHAN; n++) begin
      ser_cnt_a[n] = 16'h1100 + 16'(n); ser_cnt_b[n] = 16'h2200 + 16'(n);
    end
    for (int g = 0; g < N_GRP; g++) begin
      lvds_cnt_a[g] = 16'h3300 + 16'(g); lvds_cnt_b[g] = 16'h4400 + 16'(g);
    end
    psb_status = 16'h0018; rop_status = 16'hC1FF;
    mem_rdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    seen_clr_a = 0; seen_clr_b = 0; seen_lclr_a = 0; seen_lclr_b = 0;
    // reset values
    rd(16'h048, q); chk(q == 16'h0DEB, $sformatf("MAX_BC reset %h", q));
    rd(16'h04E, q); chk(q == 16'hAAAA, "IDLE_ID_LOW reset");
    rd(16'h050, q); chk(q == 16'h0555, "IDLE_ID_HIGH reset");
    rd(16'h000, q); chk(q == 0, "CHAN_REG0 reset");
    // random writes to every setup register, then read back
    for (int a = 0; a <= 16'h05E; a += 2) begin
      v = 16'($urandom);
      if (a == 16'h050) v[15:12] = 0;
      shadow[a] = v;
      wr(a, v);
    end
    for (int a = 0; a <= 16'h05E; a += 2) begin
      rd(a, q);
      chk(q == shadow[a], $sformatf("read-back %h: %h expected %h", a, q, shadow[a]));
    end
    chk(chan_reg[3] == chan_reg_t'(shadow[6]), "CHAN_REG3 field output");
    chk(chan_delay[7] == shadow[16'h1E], "CHAN_DELAY7 output");
    chk(lvds_delay[15] == shadow[16'h3E], "LVDS_DELAY15 output");
    chk(idle_id == {shadow[16'h50][11:0], shadow[16'h4E]}, "IDLE_ID output");
    chk(testmask[6] == shadow[16'h5E], "TESTMASK6 output");
    chk(max_bc == shadow[16'h48], "MAX_BC output");
    // command pulses: one clock each
    n_cmd_clocks = 0;
    wr(16'h070, 16'hA5C3);
    repeat (3) @(negedge clk);
    chk(n_cmd_clocks == 1, $sformatf("CMD_PULSE lasted %0d clocks", n_cmd_clocks));
    rd(16'h070, q); chk(q == 0, "CMD_PULSE reads 0");
    // read-only words
    rd(16'h864, q); chk(q == 16'h8131, "CHIP_ID");
    rd(16'h866, q); chk(q == 16'h0005, "VERSION_NR");
    rd(16'h868, q); chk(q == 16'h0001, "CHIP_IDH");
    rd(16'h860, q); chk(q == psb_status, "PSB_STATUS");
    rd(16'h862, q); chk(q == rop_status, "ROP_STATUS");
    wr(16'h864, 16'h0000); rd(16'h864, q); chk(q == 16'h8131, "CHIP_ID not writable");
    // phase counters and their clears
    for (int n = 0; n < N_CHAN; n++) begin
      rd(16'h800 + 2 * n, q); chk(q == ser_cnt_a[n], "serial counter A");
      rd(16'h810 + 2 * n, q); chk(q == ser_cnt_b[n], "serial counter B");
    end
    for (int g = 0; g < N_GRP; g++) begin
      rd(16'h820 + 2 * g, q); chk(q == lvds_cnt_a[g], "LVDS counter A");
      rd(16'h840 + 2 * g, q); chk(q == lvds_cnt_b[g], "LVDS counter B");
    end
    chk(&seen_clr_a && &seen_clr_b && &seen_lclr_a && &seen_lclr_b, "all counter clears seen");
    // memory windows
    for (int n = 0; n < N_CHAN; n++)
      for (int a = 0; a < 4; a++) wr(32'h20000 + 32'h4000 * n + 2 * a, 16'((n << 8) | a));
    for (int n = 0; n < N_CHAN; n++)
      for (int a = 0; a < 4; a++) begin
        rd(32'h20000 + 32'h4000 * n + 2 * a, q);
        chk(q == 16'((n << 8) | a), $sformatf("memory %0d word %0d: %h", n, a, q));
      end
    rd(16'h600, q); chk(q == 0, "unused address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
