// Self-checking testbench of delay_line: random 16-bit data through several
// delay settings; the output must equal the input of exactly
// C + B + A + bits[1:0] clocks earlier (0 = same clock).
module tb_delay_line;
  logic clk = 0, rst = 1;
  logic [15:0] cfg, din, dout;
  int checks = 0, failures = 0;
  logic [15:0] hist [0:63];

  always #5 clk = ~clk;

  delay_line #(.W(16)) dut (.clk, .rst, .dly_cfg(cfg), .din, .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int total(input logic [15:0] c);
    return int'(c[15:12]) + int'(c[11:8]) + int'(c[7:4]) + int'(c[1:0]);
  endfunction

  logic [15:0] cfgs [8] = '{16'h0000, 16'h0001, 16'h0003, 16'h0013, 16'h00F3, 16'h0F53, 16'hFFF3, 16'h7A2F};

  initial begin
    int d;
    cfg = '0; din = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (cfgs[k]) begin
      cfg = cfgs[k];
      d = total(cfg);
      // fill the line with fresh data, then check
      for (int n = 0; n < 120; n++) begin
        @(negedge clk);
        din = 16'($urandom);
        for (int i = 63; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = din;
        #1;
        if (n > 60) begin
          checks++;
          if (dout !== hist[d]) begin
            failures++;
            if (failures < 10) $display("cfg %h delay %0d: got %h expected %h", cfg, d, dout, hist[d]);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
