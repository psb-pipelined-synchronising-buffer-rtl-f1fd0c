// Self-checking testbench of ring_buffer: data written every clock with the
// write counter cleared by a BCRES every 300 clocks and the read counter
// cleared 40 clocks later. Checks that rd_cnt always points at the entry
// written 40 clocks before, that reads at rd_cnt + offset return the data of
// the neighbouring clocks, and that addresses wrap after 256.
module tb_ring_buffer;
  logic clk = 0, rst = 1;
  logic wr_clr, rd_clr, rd_en;
  logic [31:0] din, rd_data;
  logic [7:0] wr_cnt, rd_cnt, rd_addr;
  int checks = 0, failures = 0, wraps = 0;
  int cyc = 0;
  logic [31:0] hist [int];      // data by cycle
  logic [7:0]  whist [int];     // write address by cycle

  always #5 clk = ~clk;
  ring_buffer #(.W(32), .DEPTH(256)) dut (.clk, .rst, .wr_clr, .rd_clr, .din, .wr_cnt, .rd_cnt,
                                          .rd_en, .rd_addr, .rd_data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int off, pend_cyc;
    logic pend;
    wr_clr = 0; rd_clr = 0; rd_en = 0; rd_addr = 0; din = 0; pend = 0; pend_cyc = 0; off = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (cyc = 0; cyc < 3000; cyc++) begin
      wr_clr = (cyc % 300 == 0);
      rd_clr = (cyc % 300 == 40);
      din = $urandom;
      hist[cyc] = din;
      #1;
      whist[cyc] = wr_cnt;
      if (cyc > 0 && wr_cnt == 0 && whist[cyc-1] == 8'hFF) wraps++;
      // rd_cnt == write address of 40 clocks ago (after the first read clear)
      if (cyc > 45) begin
        checks++;
        if (rd_cnt !== whist[cyc-40]) begin failures++; if (failures < 10) $display("cyc %0d rd_cnt %0d exp %0d", cyc, rd_cnt, whist[cyc-40]); end
      end
      // check the previous read
      if (pend) begin
        checks++;
        if (rd_data !== hist[pend_cyc]) begin failures++; if (failures < 10) $display("cyc %0d read %h exp %h", cyc, rd_data, hist[pend_cyc]); end
      end
      pend = 0;
      rd_en = 0;
      // read rd_cnt + off, where the entry is not overwritten and lies inside one orbit segment
      if (cyc > 350 && (cyc % 300) > 45 && (cyc % 300) < 290 && $urandom_range(0, 2) == 0) begin
        off = $urandom_range(0, 4) - 2;
        rd_en = 1;
        rd_addr = rd_cnt + 8'(off);
        pend = 1;
        pend_cyc = cyc - 40 + off;
      end
      @(posedge clk);
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
