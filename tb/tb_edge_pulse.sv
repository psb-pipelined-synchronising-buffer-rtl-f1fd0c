// Self-checking testbench of edge_pulse: slowly changing random levels; one
// pulse of one clock must follow every rising and every falling edge.
module tb_edge_pulse;
  logic clk = 0, rst = 1;
  logic [7:0] din, pulse, prev;
  int checks = 0, failures = 0, rises = 0, falls = 0;

  always #5 clk = ~clk;
  edge_pulse #(.W(8)) dut (.clk, .rst, .din, .pulse);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; prev = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int b = 0; b < 8; b++) if ($urandom_range(0, 9) == 0) din[b] = ~din[b];
      @(posedge clk);
      @(negedge clk);
      checks++;
      rises += $countones(din & ~prev);
      falls += $countones(~din & prev);
      if (pulse !== (din ^ prev)) begin failures++; if (failures < 10) $display("n=%0d pulse %b exp %b", n, pulse, din ^ prev); end
      prev = din;
    end
    checks++;
    if (rises == 0 || falls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
