// Edge sensing for Technical Trigger bits, which need not arrive as 40 MHz
// pulses: for every rising or falling edge of an input bit the output gives
// one pulse of one bx clock (25 ns), synchronous to the system clock. The
// input is expected already sampled into the clock domain (the LVDS
// oversampler output). The output pulse is registered: it appears in the
// clock after the new input level is first seen.
module edge_pulse #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] pulse
);

  logic [W-1:0] prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev  <= '0;
      pulse <= '0;
    end else begin
      prev  <= din;
      pulse <= din ^ prev;
    end
  end

endmodule
