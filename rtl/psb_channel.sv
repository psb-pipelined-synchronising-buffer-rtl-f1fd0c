// One trigger channel of the PSB chip (a 16-bit serial-link stream, two
// words per bx).
//
// Data path, per bx:
//   serial samples -> serial_oversampler (phase select, phase counters)
//     -> delay_line (CHAN_DELAY) -> trigger word
//   if sel_lvdsdata (channels with HAS_LVDS only): the trigger word is the
//     channel's 32 LVDS bits instead (already phase selected and delayed per
//     4-bit group outside); on a channel without LVDS, sel_lvdsdata = 1 gives
//     no data at all, as the register description warns
//   sel_sim_mode = 0: the trigger word goes to the backplane and the ring
//     buffer, and the SIM/SPY memory may spy it
//   sel_sim_mode = 1: the SIM/SPY memory output replaces it for the
//     backplane and the ring buffer, and on channels with HAS_TX also goes
//     to the serial-link transmitter when en_trx_data = 1.
// The backplane word is registered. The ring buffer stores the backplane
// word. The 80 MHz GTL+ output multiplexing of the {B, A} pair is done by the
// I/O cells outside this module.
module psb_channel
  import psb_pkg::*;
#(
  parameter bit HAS_LVDS = 1'b0,
  parameter bit HAS_TX   = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [1:0][3:0][WORD_W-1:0]  ser_samp,
  input  logic [CHW-1:0]               lvds_word,
  input  chan_reg_t                    cfg,
  input  logic [15:0]                  dly_cfg,
  input  logic                         bcres_int,
  input  logic                         bcres_lat,
  input  logic [BX_W-1:0]              bc_num,
  input  logic                         start_next_orbit,
  // backplane and transmitter
  output logic [CHW-1:0]               gtl_out,
  output logic [CHW-1:0]               tx_out,
  // phase counters
  input  logic                         clr_a,
  input  logic                         clr_b,
  output logic [15:0]                  cnt_a,
  output logic [15:0]                  cnt_b,
  // SIM/SPY memory VME port
  input  logic [12:0]                  vme_addr,
  input  logic                         vme_we,
  input  logic                         vme_re,
  input  logic [WORD_W-1:0]            vme_wdata,
  output logic [WORD_W-1:0]            vme_rdata,
  output logic                         spy_we,
  output logic                         sim_active,
  // ring buffer read port
  input  logic                         ring_rd_en,
  input  logic [7:0]                   ring_rd_addr,
  output logic [CHW-1:0]               ring_rd_data
);

  logic [CHW-1:0] ser_word, ser_dly, trig, sim;

  serial_oversampler u_ovs (
    .clk, .rst, .samp(ser_samp), .sel_phase(cfg.sel_phase), .word(ser_word),
    .clr_a, .clr_b, .cnt_a, .cnt_b);

  delay_line #(.W(CHW)) u_dly (
    .clk, .rst, .dly_cfg, .din(ser_word), .dout(ser_dly));

  always_comb begin
    if (!cfg.sel_lvdsdata) trig = ser_dly;
    else if (HAS_LVDS)     trig = lvds_word;
    else                   trig = '0;
  end

  sim_spy_mem u_simspy (
    .clk, .rst, .sel_sim_mode(cfg.sel_sim_mode), .sel_contin_mode(cfg.sel_contin_mode),
    .start_next_orbit, .bcres_int, .bc_num, .din(trig), .sim_out(sim), .active(sim_active),
    .spy_we, .vme_addr, .vme_we, .vme_re, .vme_wdata, .vme_rdata);

  always_ff @(posedge clk) begin
    if (rst) begin
      gtl_out <= '0;
      tx_out  <= '0;
    end else begin
      gtl_out <= cfg.sel_sim_mode ? sim : trig;
      tx_out  <= (HAS_TX && cfg.sel_sim_mode && cfg.en_trx_data) ? sim : '0;
    end
  end

  logic [7:0] unused_wr, unused_rd;
  ring_buffer #(.W(CHW), .DEPTH(256)) u_ring (
    .clk, .rst, .wr_clr(bcres_int), .rd_clr(bcres_lat), .din(gtl_out),
    .wr_cnt(unused_wr), .rd_cnt(unused_rd),
    .rd_en(ring_rd_en), .rd_addr(ring_rd_addr), .rd_data(ring_rd_data));

endmodule
