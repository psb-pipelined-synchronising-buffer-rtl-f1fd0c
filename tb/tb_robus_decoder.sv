// Self-checking testbench of the ROBUS BGo decoder: random ROBUS traffic;
// a reference model gives one pulse per command two clocks after it starts
// (input register, edge detection), only for STROBE = 001 with RDRQST and
// only when en_robust is set.
module tb_robus_decoder;
  logic clk = 0, rst = 1;
  logic en_robust, rdrqst;
  logic [2:0] strobe;
  logic [11:0] bx;
  logic start_run, stop_run, res_orbitnr, hard_res;
  logic [3:0] user_msg;
  int checks = 0, failures = 0, n_cmd = 0;

  always #5 clk = ~clk;
  robus_decoder dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: command seen in clock n -> outputs during clock n+1
  logic m_cmd_q, m_cmd_qq;
  logic [11:0] m_bx_q;
  always_ff @(posedge clk) begin
    if (rst) begin m_cmd_q <= 0; m_cmd_qq <= 0; m_bx_q <= 0; end
    else begin
      m_cmd_q  <= rdrqst && strobe == 3'b001 && en_robust;
      m_cmd_qq <= m_cmd_q;
      m_bx_q   <= bx;
    end
  end

  always @(negedge clk) if (!rst) begin
    logic f;
    f = m_cmd_q && !m_cmd_qq;
    checks++;
    if (start_run != (f && m_bx_q[5]) || stop_run != (f && m_bx_q[6]) ||
        res_orbitnr != (f && m_bx_q[4]) || hard_res != (f && m_bx_q[3]) ||
        user_msg != (f ? m_bx_q[11:8] : 4'h0)) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t", $time);
    end
    if (start_run || stop_run) n_cmd++;
  end

  initial begin
    en_robust = 0; rdrqst = 0; strobe = 0; bx = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i % 5000 == 0) en_robust = (i != 0);
      rdrqst = ($urandom_range(0, 3) == 0);
      strobe = ($urandom_range(0, 1) == 0) ? 3'b001 : 3'($urandom);
      bx     = 12'($urandom);
    end
    // directed START_RUN: exactly one pulse for a command held 3 clocks
    begin
      int n = 0;
      @(negedge clk) begin rdrqst = 1; strobe = 3'b001; bx = 12'h020; end
      for (int k = 0; k < 3; k++) begin @(negedge clk); n += start_run; end
      rdrqst = 0; strobe = 0; bx = 0;
      for (int k = 0; k < 3; k++) begin @(negedge clk); n += start_run; end
      checks++;
      if (n != 1) begin failures++; $display("FAIL: held command gave %0d pulses", n); end
    end
    checks++;
    if (n_cmd == 0) begin failures++; $display("FAIL: no commands decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
