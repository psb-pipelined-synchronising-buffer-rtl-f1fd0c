// Self-checking testbench of derand_fifo (depth 16): random push/pop against
// a queue model, the empty/full/warning flags, overflow rejection and the
// synchronous clear.
module tb_derand_fifo;
  logic clk = 0, rst = 1;
  logic clr, push, pop, empty, full, warn;
  logic [15:0] din, dout;
  logic [4:0] count;
  int checks = 0, failures = 0, fulls = 0, warns = 0, clears = 0;
  logic [15:0] q [$];

  always #5 clk = ~clk;
  derand_fifo #(.W(16), .DEPTH(16)) dut (.clk, .rst, .clr, .push, .din, .pop, .dout, .empty, .full, .warn, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_valid;
    logic [15:0] exp_d;
    clr = 0; push = 0; pop = 0; din = 0; exp_valid = 0; exp_d = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6000; n++) begin
      // phases: fill-biased, drain-biased
      int bias;
      bias = ((n / 300) % 2 == 0) ? 70 : 30;
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 100 - bias);
      clr  = ($urandom_range(0, 999) == 0);
      din  = 16'($urandom);
      // flags before the clock
      checks += 3;
      if (empty !== (q.size() == 0)) failures++;
      if (full  !== (q.size() == 16)) failures++;
      if (warn  !== (q.size() > 12)) failures++;
      if (full) fulls++;
      if (warn) warns++;
      exp_valid = 0;
      if (clr) begin
        q.delete(); clears++;
      end else begin
        // a push is refused while full, even with a pop in the same clock
        int sz;
        sz = q.size();
        if (pop && sz > 0) begin exp_d = q.pop_front(); exp_valid = 1; end
        if (push && sz < 16) q.push_back(din);
      end
      @(posedge clk);
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (dout !== exp_d) begin failures++; if (failures < 10) $display("n=%0d dout %h exp %h", n, dout, exp_d); end
      end
    end
    checks++;
    if (fulls == 0 || warns == 0 || clears == 0) begin failures++; $display("full %0d warn %0d clr %0d", fulls, warns, clears); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
