// Self-checking testbench of bc_counter with a short orbit (MAX_BC_NUMBER is
// a register input, set here to 49): wrap and internal BCRES period, BC_ERROR
// after reset and on a misplaced external BCRES, its clearing, an external
// BCRES in phase (no error), the BCRES delay, the latency-delayed BCRES and
// MAX_BC_NUMBER = 0 (no internal BCRES).
module tb_bc_counter;
  import psb_pkg::*;
  logic clk = 0, rst = 1;
  logic bcres_ext, bcres_vme, res_err;
  logic [15:0] max_bc, dly, lat;
  logic [11:0] bc_num;
  logic bcres_int, bcres_dly, bcres_lat, bc_error;
  int checks = 0, failures = 0;
  int cyc = 0, last_int = -1, last_lat = -1;
  int n_int = 0, n_lat = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  bc_counter dut (.clk, .rst, .bcres_ext, .bcres_vme, .res_bc_error(res_err), .max_bc,
                  .bcres_dly_cfg(dly), .latency_cfg(lat), .bc_num, .bcres_int, .bcres_dly,
                  .bcres_lat, .bc_error);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // period of bcres_int and bcres_int <-> bc_num relation
  always @(negedge clk) if (!rst) begin
    if (bcres_int) begin
      chk(bc_num == 0, "bc_num is 0 with bcres_int");
      n_int++;
      last_int = cyc;
    end
    if (bcres_lat) begin
      n_lat++;
      if (last_int >= 0) chk(cyc - last_int == 7, $sformatf("latency delay %0d", cyc - last_int));
    end
  end

  task automatic wait_bc(input int n);
    do @(negedge clk); while (bc_num != 12'(n));
  endtask
  task automatic wait_int();
    do @(negedge clk); while (!bcres_int);
  endtask

  initial begin
    int t0;
    bcres_ext = 0; bcres_vme = 0; res_err = 0;
    max_bc = 16'd49; dly = 16'h0003; lat = 16'h0043;   // BCRES delay 3, latency 4+3 = 7
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(bc_error == 1, "BC_ERROR set after reset");
    // free running: check period
    wait_int(); t0 = cyc;
    wait_int();
    chk(cyc - t0 == 50, $sformatf("orbit period %0d", cyc - t0));
    // clear the error
    @(negedge clk) res_err = 1; @(negedge clk) res_err = 0;
    chk(bc_error == 0, "BC_ERROR cleared");
    // external BCRES in phase: the delayed pulse must coincide with bc_num == max
    // pulse while bc_num == 46: after the delay of 3 the counter is at 49
    wait_bc(46);
    bcres_ext = 1; @(negedge clk) bcres_ext = 0;
    repeat (6) @(negedge clk);
    chk(bc_error == 0, "no BC_ERROR for BCRES in phase");
    // misplaced external BCRES
    wait_bc(10);
    bcres_ext = 1; @(negedge clk) bcres_ext = 0;
    repeat (3) @(negedge clk);
    chk(bc_num == 0, $sformatf("counter resynchronised by delayed BCRES (%0d)", bc_num));
    chk(bcres_int == 1, "bcres_int at resync");
    @(negedge clk);
    chk(bc_error == 1, "BC_ERROR on misplaced BCRES");
    // software BCRES also flags
    @(negedge clk) res_err = 1; @(negedge clk) res_err = 0;
    wait_bc(20);
    bcres_vme = 1; @(negedge clk) bcres_vme = 0;
    repeat (5) @(negedge clk);
    chk(bc_error == 1, "BC_ERROR after BCRes_vme");
    // MAX_BC_NUMBER = 0: no internal BCRES for a long time
    max_bc = 0;
    repeat (60) @(negedge clk);
    t0 = n_int;
    repeat (3000) @(negedge clk);
    chk(n_int == t0, "no internal BCRES with MAX_BC_NUMBER = 0");
    chk(n_lat > 3, "latency-delayed BCRES seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
