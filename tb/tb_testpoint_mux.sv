// Self-checking testbench of the test-point multiplexer: random masks and
// signals; each test point must be the OR of its selected signals one clock
// later.
module tb_testpoint_mux;
  localparam int N = 7;
  logic clk = 0, rst = 1;
  logic [N-1:0][15:0] mask, sig;
  logic [N-1:0] tp, exp_tp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  testpoint_mux #(.N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask = '0; sig = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++; if (tp != 0) failures++;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int t = 0; t < N; t++) begin
        mask[t] = ($urandom_range(0, 1) == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'($urandom);
        sig[t]  = 16'($urandom);
        exp_tp[t] = |(mask[t] & sig[t]);
      end
      @(negedge clk);
      checks++;
      if (tp != exp_tp) begin
        failures++;
        if (failures < 10) $display("FAIL: tp %b expected %b", tp, exp_tp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
