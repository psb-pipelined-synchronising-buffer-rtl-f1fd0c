// SIM/SPY memory of one channel: 8k x 16 bit, enough for one complete orbit
// of 80 MHz words (3564 bx x 2 words).
//
// It is kept as two banks of 4k x 16, bank A for the first word of a bx and
// bank B for the second; the 13-bit VME word address is {bx, tick}, so VME
// address bit 0 chooses the bank and bits 12..1 the bunch number.
//
// Channel side, addressed by the bunch number bc_num:
//  * spy mode (sel_sim_mode = 0): the channel's trigger data din are written;
//  * simulation mode (sel_sim_mode = 1): the memory is read and sim_out
//    (registered, one clock after bc_num) replaces the trigger data.
// The memory is inactive until a start pulse (CMD_PULSE run_next_orbit bit
// of this channel) arms it; it becomes active at the next internal BCRES and
// stays active for one orbit, or for every following orbit if
// sel_contin_mode = 1. While inactive it writes nothing and sim_out is zero.
//
// VME side: vme_we writes vme_wdata at vme_addr; vme_re reads, vme_rdata is
// valid one clock later. While the memory is spying, the spy writes have
// priority and a VME write in the same clock is lost.
module sim_spy_mem
  import psb_pkg::*;
#(
  parameter int unsigned DEPTH_BX = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sel_sim_mode,
  input  logic                   sel_contin_mode,
  input  logic                   start_next_orbit,
  input  logic                   bcres_int,
  input  logic [BX_W-1:0]        bc_num,
  input  logic [CHW-1:0]         din,
  output logic [CHW-1:0]         sim_out,
  output logic                   active,
  output logic                   spy_we,
  // VME port
  input  logic [BX_W:0]          vme_addr,
  input  logic                   vme_we,
  input  logic                   vme_re,
  input  logic [WORD_W-1:0]      vme_wdata,
  output logic [WORD_W-1:0]      vme_rdata
);

  localparam int unsigned AW = $clog2(DEPTH_BX);

  logic [WORD_W-1:0] bank_a [DEPTH_BX];
  logic [WORD_W-1:0] bank_b [DEPTH_BX];

  // ---- run control -------------------------------------------------------
  logic armed;
  logic run_now;   // active including the clock of the starting BCRES
  assign run_now = bcres_int ? (armed || (active && sel_contin_mode)) : active;

  always_ff @(posedge clk) begin
    if (rst) begin
      armed  <= 1'b0;
      active <= 1'b0;
    end else begin
      if (bcres_int) begin
        active <= armed || (active && sel_contin_mode);
        armed  <= start_next_orbit;
      end else if (start_next_orbit) begin
        armed  <= 1'b1;
      end
    end
  end

  // ---- channel port ------------------------------------------------------
  logic [AW-1:0] caddr;
  assign caddr  = bc_num[AW-1:0];
  assign spy_we = run_now && !sel_sim_mode;

  always_ff @(posedge clk) begin
    if (spy_we) begin
      bank_a[caddr] <= din[WORD_W-1:0];
      bank_b[caddr] <= din[CHW-1:WORD_W];
    end else if (vme_we) begin
      if (vme_addr[0]) bank_b[vme_addr[AW:1]] <= vme_wdata;
      else             bank_a[vme_addr[AW:1]] <= vme_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sim_out <= '0;
    else if (run_now && sel_sim_mode) sim_out <= {bank_b[caddr], bank_a[caddr]};
    else sim_out <= '0;
  end

  // ---- VME read ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (vme_re) vme_rdata <= vme_addr[0] ? bank_b[vme_addr[AW:1]] : bank_a[vme_addr[AW:1]];
  end

endmodule
