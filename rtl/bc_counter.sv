// Bunch counter and internal BCRES generation.
//
// The distributed BCRES need not arrive every orbit, so the chip keeps its own
// bunch counter. The counter runs 0..MAX_BC_NUMBER (default 3563, orbit
// length - 1) and wraps; the clock in which it shows 0 carries the internal
// BCRES pulse (bcres_int) that every circuit of the chip uses.
//
// The external BCRES, or the software BCRes_vme pulse, is first delayed by
// the BCRES_DELAY register (same field format as every delay register). The
// delayed pulse forces the counter to 0. If the counter was not at
// MAX_BC_NUMBER at that moment the two disagree and the sticky BC_ERROR flag
// is set; it is also set by reset (power-up or clock reset), and cleared only
// by the Res_BC_error command pulse.
//
// MAX_BC_NUMBER = 0 disables the internal wrap: the counter then runs modulo
// 4096 and only an external BCRES restarts it.
//
// bcres_lat is bcres_int delayed by the LATENCY_DELAY register; it clears the
// ring-buffer read counters so that reading trails writing by the trigger
// latency.
module bc_counter
  import psb_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            bcres_ext,     // from backplane, one-clock pulse
  input  logic            bcres_vme,     // software BCRES
  input  logic            res_bc_error,
  input  logic [15:0]     max_bc,
  input  logic [15:0]     bcres_dly_cfg,
  input  logic [15:0]     latency_cfg,
  output logic [BX_W-1:0] bc_num,
  output logic            bcres_int,
  output logic            bcres_dly,     // delayed external BCRES (test point)
  output logic            bcres_lat,
  output logic            bc_error
);

  logic [BX_W-1:0] max_n;
  assign max_n = max_bc[BX_W-1:0];

  delay_line #(.W(1)) u_dly_ext (
    .clk, .rst, .dly_cfg(bcres_dly_cfg), .din(bcres_ext | bcres_vme), .dout(bcres_dly));

  logic wrap;
  assign wrap = (max_n != '0) && (bc_num == max_n);

  always_ff @(posedge clk) begin
    if (rst) begin
      bc_num    <= '0;
      bcres_int <= 1'b0;
      bc_error  <= 1'b1;
    end else begin
      if (bcres_dly || wrap) bc_num <= '0;
      else                   bc_num <= bc_num + 1'b1;
      bcres_int <= bcres_dly || wrap;

      if (bcres_dly && (bc_num != max_n)) bc_error <= 1'b1;
      else if (res_bc_error)              bc_error <= 1'b0;
    end
  end

  delay_line #(.W(1)) u_dly_lat (
    .clk, .rst, .dly_cfg(latency_cfg), .din(bcres_int), .dout(bcres_lat));

endmodule
