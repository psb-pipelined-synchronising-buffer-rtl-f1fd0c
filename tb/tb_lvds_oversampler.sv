// Self-checking testbench of lvds_oversampler: random negative-logic samples
// and random per-group phase selections; checks the inverted, selected bits
// and the phase counters of every group (bit 4g, pre3 from the previous
// clock, clear-on-read) against a reference model.
module tb_lvds_oversampler;
  import psb_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0][63:0] samp_n;
  logic [15:0] s3100, s6332;
  logic [63:0] bits;
  logic [15:0] clr_a, clr_b;
  logic [15:0][15:0] cnt_a, cnt_b;
  int checks = 0, failures = 0;
  int rc [16][4];
  logic [15:0] prev3;

  always #5 clk = ~clk;
  lvds_oversampler dut (.clk, .rst, .samp_n, .sel_phase3100(s3100), .sel_phase6332(s6332),
                        .bits, .clr_a, .clr_b, .cnt_a, .cnt_b);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    return v > 255 ? 255 : v;
  endfunction

  initial begin
    logic [63:0] exp_bits;
    logic [3:0][63:0] s;
    logic [31:0] sel;
    samp_n = '1; s3100 = 0; s6332 = 0; clr_a = 0; clr_b = 0; prev3 = 0;
    foreach (rc[g, k]) rc[g][k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < 4; p++) samp_n[p] = {$urandom, $urandom};
      s3100 = 16'($urandom); s6332 = 16'($urandom);
      clr_a = 16'($urandom) & 16'($urandom) & 16'($urandom) & 16'($urandom);
      clr_b = 16'($urandom) & 16'($urandom) & 16'($urandom) & 16'($urandom);
      s = ~samp_n;
      sel = {s6332, s3100};
      for (int b = 0; b < 64; b++) exp_bits[b] = s[sel[2*(b/4) +: 2]][b];
      for (int g = 0; g < 16; g++) begin
        int inc [4];
        inc[0] = int'(s[0][4*g] ^ prev3[g]);
        inc[1] = int'(s[1][4*g] ^ s[0][4*g]);
        inc[2] = int'(s[2][4*g] ^ s[1][4*g]);
        inc[3] = int'(s[3][4*g] ^ s[2][4*g]);
        for (int k = 0; k < 2; k++) rc[g][k] = clr_a[g] ? inc[k] : sat(rc[g][k] + inc[k]);
        for (int k = 2; k < 4; k++) rc[g][k] = clr_b[g] ? inc[k] : sat(rc[g][k] + inc[k]);
        prev3[g] = s[3][4*g];
      end
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (bits !== exp_bits) begin failures++; if (failures < 10) $display("n=%0d bits %h exp %h", n, bits, exp_bits); end
      for (int g = 0; g < 16; g++) begin
        checks += 2;
        if (cnt_a[g] !== {8'(rc[g][1]), 8'(rc[g][0])}) begin failures++; if (failures < 10) $display("n=%0d g=%0d cnt_a %h", n, g, cnt_a[g]); end
        if (cnt_b[g] !== {8'(rc[g][3]), 8'(rc[g][2])}) begin failures++; if (failures < 10) $display("n=%0d g=%0d cnt_b %h", n, g, cnt_b[g]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
