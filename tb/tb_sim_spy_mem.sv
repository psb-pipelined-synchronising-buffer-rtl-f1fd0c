// Self-checking testbench of sim_spy_mem with a 40-bx orbit (the bunch
// number and BCRES are driven by the testbench): VME write and read-back of
// both banks, simulation playback for exactly one orbit after a start pulse,
// continuous playback, and spying one orbit of input data, read back by VME.
module tb_sim_spy_mem;
  import psb_pkg::*;
  localparam int ORBIT = 40;
  logic clk = 0, rst = 1;
  logic sim_mode, contin, start, bcres;
  logic [11:0] bc;
  logic [31:0] din, sim_out;
  logic active, spy_we;
  logic [12:0] vaddr;
  logic vwe, vre;
  logic [15:0] vwdata, vrdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sim_spy_mem dut (.clk, .rst, .sel_sim_mode(sim_mode), .sel_contin_mode(contin),
                   .start_next_orbit(start), .bcres_int(bcres), .bc_num(bc), .din, .sim_out,
                   .active, .spy_we, .vme_addr(vaddr), .vme_we(vwe), .vme_re(vre),
                   .vme_wdata(vwdata), .vme_rdata(vrdata));

  // orbit generator: bcres in the clock where bc == 0
  always_ff @(posedge clk) begin
    if (rst) bc <= 0;
    else     bc <= (bc == ORBIT - 1) ? 0 : bc + 1;
  end
  assign bcres = !rst && (bc == 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL: %s", m); end
  endtask

  function automatic logic [15:0] pat(input int a);
    return 16'(a * 16'h0111 + 16'h5A00);
  endfunction

  task automatic vme_write(input int a, input logic [15:0] d);
    @(negedge clk); vaddr = 13'(a); vwdata = d; vwe = 1;
    @(negedge clk); vwe = 0;
  endtask
  task automatic vme_read(input int a, output logic [15:0] d);
    @(negedge clk); vaddr = 13'(a); vre = 1;
    @(negedge clk); vre = 0; d = vrdata;
  endtask

  initial begin
    logic [15:0] d;
    int played, first_bc;
    sim_mode = 1; contin = 0; start = 0; din = 0; vaddr = 0; vwe = 0; vre = 0; vwdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // load a pattern: word address {bx, tick}
    for (int a = 0; a < 2 * ORBIT; a++) vme_write(a, pat(a));
    for (int a = 0; a < 2 * ORBIT; a += 7) begin
      vme_read(a, d);
      chk(d == pat(a), $sformatf("VME read-back %0d: %h", a, d));
    end
    // playback one orbit
    chk(sim_out == 0, "no output before start");
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    played = 0;
    for (int n = 0; n < 3 * ORBIT; n++) begin
      logic [11:0] b;
      b = bc;
      @(negedge clk);
      if (sim_out != 0) begin
        played++;
        chk(sim_out == {pat(2 * b + 1), pat(2 * b)}, $sformatf("playback bx %0d: %h", b, sim_out));
      end
    end
    chk(played == ORBIT, $sformatf("one-shot playback lasted %0d bx", played));
    // continuous playback for several orbits
    contin = 1;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    played = 0;
    for (int n = 0; n < 5 * ORBIT; n++) begin @(negedge clk); if (sim_out != 0) played++; end
    chk(played >= 4 * ORBIT - 1, $sformatf("continuous playback %0d bx", played));
    contin = 0;
    repeat (2 * ORBIT) @(negedge clk);
    chk(!active, "stopped after leaving continuous mode");
    // spy one orbit
    sim_mode = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    for (int n = 0; n < 3 * ORBIT; n++) begin
      din = {4'hB, 12'(bc), 4'hA, 12'(bc)};
      @(negedge clk);
    end
    for (int b = 0; b < ORBIT; b += 3) begin
      vme_read(2 * b, d);     chk(d == {4'hA, 12'(b)}, $sformatf("spy A bx %0d: %h", b, d));
      vme_read(2 * b + 1, d); chk(d == {4'hB, 12'(b)}, $sformatf("spy B bx %0d: %h", b, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
