// Self-checking testbench of serial_oversampler: random samples of two ticks
// per clock; checks the selected {B, A} word for every phase setting and the
// four phase counters (including pre3 from the previous clock and
// clear-on-read) against a reference model.
module tb_serial_oversampler;
  import psb_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0][3:0][15:0] samp;
  logic [1:0] sel;
  logic [31:0] word;
  logic clr_a, clr_b;
  logic [15:0] cnt_a, cnt_b;
  int checks = 0, failures = 0;
  int r0p3, r10, r21, r32;
  logic prev3;

  always #5 clk = ~clk;
  serial_oversampler dut (.clk, .rst, .samp, .sel_phase(sel), .word, .clr_a, .clr_b, .cnt_a, .cnt_b);

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
    logic [31:0] exp_word;
    samp = '0; sel = 0; clr_a = 0; clr_b = 0;
    r0p3 = 0; r10 = 0; r21 = 0; r32 = 0; prev3 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      // bit 0 changes rarely so that counters stay below saturation mostly
      for (int t = 0; t < 2; t++) for (int p = 0; p < 4; p++) samp[t][p] = 16'($urandom);
      if (n % 7 != 0) for (int t = 0; t < 2; t++) for (int p = 0; p < 4; p++) samp[t][p][0] = prev3;
      sel = 2'($urandom_range(0, 3));
      clr_a = ($urandom_range(0, 199) == 0);
      clr_b = ($urandom_range(0, 199) == 0);
      case (sel)
        2'b00: exp_word = {samp[1][0], samp[0][0]};
        2'b10: exp_word = {samp[1][2], samp[0][2]};
        default: exp_word = '0;
      endcase
      begin
        int i0p3, i10, i21, i32;
        i0p3 = int'(samp[0][0][0] ^ prev3) + int'(samp[1][0][0] ^ samp[0][3][0]);
        i10  = int'(samp[0][1][0] ^ samp[0][0][0]) + int'(samp[1][1][0] ^ samp[1][0][0]);
        i21  = int'(samp[0][2][0] ^ samp[0][1][0]) + int'(samp[1][2][0] ^ samp[1][1][0]);
        i32  = int'(samp[0][3][0] ^ samp[0][2][0]) + int'(samp[1][3][0] ^ samp[1][2][0]);
        r0p3 = clr_a ? i0p3 : sat(r0p3 + i0p3);
        r10  = clr_a ? i10  : sat(r10 + i10);
        r21  = clr_b ? i21  : sat(r21 + i21);
        r32  = clr_b ? i32  : sat(r32 + i32);
      end
      prev3 = samp[1][3][0];
      @(posedge clk);
      @(negedge clk);
      checks += 3;
      if (word !== exp_word) begin failures++; if (failures < 10) $display("n=%0d word %h exp %h", n, word, exp_word); end
      if (cnt_a !== {8'(r10), 8'(r0p3)}) begin failures++; if (failures < 10) $display("n=%0d cnt_a %h", n, cnt_a); end
      if (cnt_b !== {8'(r32), 8'(r21)}) begin failures++; if (failures < 10) $display("n=%0d cnt_b %h", n, cnt_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
