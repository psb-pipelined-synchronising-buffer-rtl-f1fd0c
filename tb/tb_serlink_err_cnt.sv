// Testbench of serlink_err_cnt: random LOCKED signals of eight receivers,
// random ENREC enables and random clear-on-read pulses, compared every clock
// with a reference model (three-clock latency of a LOCKED change, counting of
// enabled high-to-low changes, saturation at FF, clear on read). Long
// unlocked/locked stretches drive some counters into saturation.
module tb_serlink_err_cnt;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  logic [N-1:0] locked = '0, enrec = '0, clr = '0, locked_sync;
  logic [N-1:0][7:0] cnt;
  int checks = 0, failures = 0;
  int sat_seen = 0, clr_seen = 0;

  always #5 clk = ~clk;

  serlink_err_cnt #(.N(N)) dut (.*);

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: LOCKED delayed by 2 (sync) and 3 (edge register) clocks
  logic [N-1:0] d1, d2, d3;
  int unsigned ref_cnt [N];

  always @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      for (int i = 0; i < N; i++) ref_cnt[i] = 0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clr[i]) ref_cnt[i] = (d3[i] && !d2[i] && enrec[i]) ? 1 : 0;
        else if (d3[i] && !d2[i] && enrec[i] && ref_cnt[i] < 255) ref_cnt[i]++;
      end
      d1 <= locked; d2 <= d1; d3 <= d2;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (locked_sync !== d2) begin
      failures++; $display("FAIL locked_sync %h exp %h", locked_sync, d2);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (cnt[i] !== 8'(ref_cnt[i])) begin
        failures++;
        if (failures < 20) $display("FAIL @%0t ch %0d cnt %h exp %h", $time, i, cnt[i], ref_cnt[i]);
      end
      if (cnt[i] == 8'hFF) sat_seen++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    enrec = 8'b0111_1111;     // channel 7 disabled: must stay 0
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        // channels 0..1 toggle fast (saturate), others rarely
        if ($urandom_range(0, i < 2 ? 1 : 20) == 0) locked[i] = !locked[i];
        clr[i] = (i >= 2) && ($urandom_range(0, 400) == 0);
        if (clr[i]) clr_seen++;
      end
      if (k == 10000) enrec = '1;
    end
    checks++;
    if (sat_seen == 0 || clr_seen == 0) begin
      failures++; $display("FAIL saturation %0d / clear %0d not exercised", sat_seen, clr_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
