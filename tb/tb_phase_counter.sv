// Self-checking testbench of phase_counter: random increments, saturation at
// FF and clear-on-read, against a reference count.
module tb_phase_counter;
  logic clk = 0, rst = 1;
  logic [1:0] inc;
  logic clr;
  logic [7:0] cnt;
  int checks = 0, failures = 0;
  int ref_cnt = 0, sat_seen = 0;

  always #5 clk = ~clk;
  phase_counter dut (.clk, .rst, .inc, .clr, .cnt);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0; clr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      inc = 2'($urandom_range(0, 3));
      clr = ($urandom_range(0, 299) == 0);
      @(posedge clk);
      if (clr) ref_cnt = int'(inc);
      else     ref_cnt = (ref_cnt + int'(inc) > 255) ? 255 : ref_cnt + int'(inc);
      @(negedge clk);
      checks++;
      if (ref_cnt == 255) sat_seen++;
      if (cnt !== 8'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("n=%0d cnt=%0d expected %0d", n, cnt, ref_cnt);
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
