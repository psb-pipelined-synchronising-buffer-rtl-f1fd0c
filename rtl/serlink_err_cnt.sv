// Loss-of-lock counters of the eight serial-link receiver chips, in the
// board's VME interface chip.
//
// Each DS92LV16 receiver drives a LOCKED signal that is high while it is
// locked to the incoming serial stream. LOCKED is asynchronous to the chip
// clock, so it passes two flip-flops first. Every high-to-low change of a
// synchronised LOCKED (a lost lock) increments the channel's 8-bit counter,
// which stops at FF on overflow and is cleared by a read of its register
// (clr, one clock); a loss seen in the clock of the read starts the new count.
// Counting only channels whose receiver is enabled (ENREC) keeps switched-off
// receivers from filling their counters.
//
// Timing: a falling LOCKED edge is counted three clocks later (two
// synchroniser stages and the edge register).
//
// Counting lock losses (rather than clocks without lock) and the ENREC gating
// are this design's reading of "missed LOCKED-signals"; the 8-bit width, the
// saturation at FF and the clear on read follow the register description.
module serlink_err_cnt #(
  parameter int unsigned N = 8            // serial-link chips
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     locked,        // LOCKED pins, asynchronous
  input  logic [N-1:0]     enrec,         // receiver enabled (SERLINK1 ENREC)
  input  logic [N-1:0]     clr,           // clear on read, one clock
  output logic [N-1:0]     locked_sync,   // synchronised LOCKED (LOCKED register)
  output logic [N-1:0][7:0] cnt
);

  logic [N-1:0] meta, prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta        <= '0;
      locked_sync <= '0;
      prev        <= '0;
    end else begin
      meta        <= locked;
      locked_sync <= meta;
      prev        <= locked_sync;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_cnt
    logic lost;
    assign lost = prev[i] && !locked_sync[i] && enrec[i];
    phase_counter u_cnt (.clk, .rst, .inc({1'b0, lost}), .clr(clr[i]), .cnt(cnt[i]));
  end

endmodule
