// Programmable pipeline delay used for every trigger channel, every LVDS group
// and for the BCRES and latency delays of the PSB chip.
//
// The 16-bit delay register is read as four fields, as printed in the
// programming guideline: bits 1..0 give a delay of 0..3 clocks, bits 7..4
// (Delay A), 11..8 (Delay B) and 15..12 (Delay C) each give 0..15 clocks.
// Bits 3..2 are not decoded. The stages are chained, so the total delay is
// C + B + A + bits[1:0] clocks, 0..48. A delay of zero is combinational.
// Each stage is an srl_stage (shift register plus output multiplexer, the
// SRL16 structure the document describes).
//
// The clock is the 40 MHz bx clock of this design: one delay step is one
// bunch crossing, that is one {B, A} word pair of a serial channel.
module delay_line #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [15:0]  dly_cfg,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] s0, sa, sb;

  srl_stage #(.W(W), .DEPTH(3),  .SEL_W(2)) u_s0 (.clk, .rst, .sel(dly_cfg[1:0]),   .din(din), .dout(s0));
  srl_stage #(.W(W), .DEPTH(15), .SEL_W(4)) u_sa (.clk, .rst, .sel(dly_cfg[7:4]),   .din(s0),  .dout(sa));
  srl_stage #(.W(W), .DEPTH(15), .SEL_W(4)) u_sb (.clk, .rst, .sel(dly_cfg[11:8]),  .din(sa),  .dout(sb));
  srl_stage #(.W(W), .DEPTH(15), .SEL_W(4)) u_sc (.clk, .rst, .sel(dly_cfg[15:12]), .din(sb),  .dout(dout));

endmodule
