// PSB synchronising chip: the logic of the Pipelined Synchronising Buffer
// board, which receives trigger data from the calorimeter trigger (8
// serial-link channels of 16-bit words at 80 MHz) and up to 64 parallel LVDS
// bits at 40 MHz, aligns them to the local clock and the LHC orbit, and
// forwards them over the backplane, while monitoring them in ring buffers and
// reading them out on Level-1 Accept.
//
// Structure (one 40 MHz bx clock; a serial channel word is the pair {B, A}):
//   * psb_channel x 8: phase selection, programmable delay, LVDS/serial and
//     simulation/trigger multiplexers, SIM/SPY memory, ring buffer.
//   * LVDS path: lvds_oversampler (inversion, per-group phase selection,
//     phase counters), optional edge_pulse for Technical Trigger inputs,
//     delay_line per 4-bit group; bits 31..0 feed channel 0, 63..32
//     channel 1 (low half = A word).
//   * bc_counter: internal bunch counter, internal and latency-delayed BCRES,
//     BC_ERROR.
//   * ring_buffer of bunch numbers, read together with the channel rings.
//   * rop: L1A queue, derandomising FIFOs, readout controller, Channel Link
//     records, PSB status.
//   * robus_decoder: BGo commands from the TIM board.
//   * psb_regs: VME register file and command pulses.
//   * testpoint_mux: 7 test points.
//
// Interface: ser_samp[c][tick][phase][bit] are the four samples per tick of
// channel c from the capture flip-flops; lvds_samp_n[phase][bit] the four
// samples per bx of the (negative-logic) LVDS bits. bcres_in, l1a_in,
// l1res_in and evcres_in are one-clock pulses from the backplane.
// tt_edge_en is a board strap: 1 on the board that takes Technical Trigger
// signals, which are then converted into 25 ns pulses. The local bus is
// described in psb_regs. gtl_out[c] is the {B, A} backplane word of channel
// c, tx_out[c] the transmitter word of channels 0..3, chlink the 28-bit
// Channel Link word (chlink_rec marks record words), psb_status the 4-bit
// status to the trigger control, bcres_out the internal BCRES.
module psb_chip
  import psb_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst,
  // trigger inputs
  input  logic [N_CHAN-1:0][1:0][3:0][WORD_W-1:0]   ser_samp,
  input  logic [3:0][N_LVDS-1:0]                    lvds_samp_n,
  input  logic                                      tt_edge_en,
  // timing signals
  input  logic                                      bcres_in,
  input  logic                                      l1a_in,
  input  logic                                      l1res_in,
  input  logic                                      evcres_in,
  // ROBUS from the TIM board
  input  logic                                      robus_rdrqst,
  input  logic [2:0]                                robus_strobe,
  input  logic [11:0]                               robus_bx,
  // local bus from the VME chip
  input  logic                                      bus_en,
  input  logic                                      bus_wr,
  input  logic [19:1]                               bus_addr,
  input  logic [15:0]                               bus_wdata,
  output logic [15:0]                               bus_rdata,
  output logic                                      bus_ack,
  // outputs
  output logic [N_CHAN-1:0][CHW-1:0]                gtl_out,
  output logic [3:0][CHW-1:0]                       tx_out,
  output logic [CL_W-1:0]                           chlink,
  output logic                                      chlink_rec,
  output logic [3:0]                                psb_status,
  output logic                                      bcres_out,
  output logic                                      l1a_lost,
  output logic [6:0]                                testpoint
);

  // ---- registers ---------------------------------------------------------
  chan_reg_t  [N_CHAN-1:0]      chan_reg;
  logic [N_CHAN-1:0][15:0]      chan_delay;
  logic [N_GRP-1:0][15:0]       lvds_delay;
  logic [15:0]                  board_id, bcres_delay, latency_delay, max_bc;
  logic [15:0]                  sel_phase3100, sel_phase6332;
  rop_setup_t                   rop_setup;
  logic [27:0]                  idle_id;
  logic [6:0][15:0]             testmask;
  cmd_pulse_t                   cmd;

  logic [N_CHAN-1:0][15:0]      ser_cnt_a, ser_cnt_b;
  logic [N_CHAN-1:0]            ser_clr_a, ser_clr_b;
  logic [N_GRP-1:0][15:0]       lvds_cnt_a, lvds_cnt_b;
  logic [N_GRP-1:0]             lvds_clr_a, lvds_clr_b;
  logic [15:0]                  rop_status, psb_status_reg;
  logic [N_CHAN-1:0]            mem_we, mem_re;
  logic [12:0]                  mem_addr;
  logic [15:0]                  mem_wdata;
  logic [N_CHAN-1:0][15:0]      mem_rdata;

  logic                         bc_error;

  assign psb_status_reg = {11'd0, bc_error, psb_status};

  psb_regs u_regs (
    .clk, .rst, .bus_en, .bus_wr, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .chan_reg, .chan_delay, .lvds_delay, .board_id, .bcres_delay, .latency_delay,
    .rop_setup, .max_bc, .sel_phase3100, .sel_phase6332, .idle_id, .testmask, .cmd,
    .ser_cnt_a, .ser_cnt_b, .ser_clr_a, .ser_clr_b,
    .lvds_cnt_a, .lvds_cnt_b, .lvds_clr_a, .lvds_clr_b,
    .psb_status(psb_status_reg), .rop_status,
    .mem_we, .mem_re, .mem_addr, .mem_wdata, .mem_rdata);

  // ---- bunch counter -----------------------------------------------------
  logic [BX_W-1:0] bc_num;
  logic            bcres_int, bcres_dly, bcres_lat;

  bc_counter u_bc (
    .clk, .rst, .bcres_ext(bcres_in), .bcres_vme(cmd.bcres_vme),
    .res_bc_error(cmd.res_bc_error), .max_bc, .bcres_dly_cfg(bcres_delay),
    .latency_cfg(latency_delay), .bc_num, .bcres_int, .bcres_dly, .bcres_lat, .bc_error);

  assign bcres_out = bcres_int;

  // ---- LVDS path ---------------------------------------------------------
  logic [N_LVDS-1:0] lvds_bits, lvds_sel, lvds_dly;
  logic [N_LVDS-1:0] lvds_edges;

  lvds_oversampler u_lvds (
    .clk, .rst, .samp_n(lvds_samp_n), .sel_phase3100, .sel_phase6332, .bits(lvds_bits),
    .clr_a(lvds_clr_a), .clr_b(lvds_clr_b), .cnt_a(lvds_cnt_a), .cnt_b(lvds_cnt_b));

  edge_pulse #(.W(N_LVDS)) u_tt_edge (.clk, .rst, .din(lvds_bits), .pulse(lvds_edges));

  assign lvds_sel = tt_edge_en ? lvds_edges : lvds_bits;

  for (genvar g = 0; g < N_GRP; g++) begin : g_lvds_dly
    delay_line #(.W(4)) u_dly (
      .clk, .rst, .dly_cfg(lvds_delay[g]), .din(lvds_sel[4*g +: 4]), .dout(lvds_dly[4*g +: 4]));
  end

  // ---- channels ----------------------------------------------------------
  logic                         ring_rd_en;
  logic [7:0]                   ring_rd_addr, ring_rd_cnt;
  logic [N_CHAN-1:0][CHW-1:0]   ring_ch_data;
  logic [BX_W-1:0]              ring_bx_data;
  logic [N_CHAN-1:0][CHW-1:0]   tx_all;
  logic [N_CHAN-1:0]            spy_we, sim_act;

  for (genvar c = 0; c < N_CHAN; c++) begin : g_chan
    psb_channel #(.HAS_LVDS(c < 2), .HAS_TX(c < 4)) u_ch (
      .clk, .rst, .ser_samp(ser_samp[c]),
      .lvds_word((c == 1) ? lvds_dly[63:32] : lvds_dly[31:0]),
      .cfg(chan_reg[c]), .dly_cfg(chan_delay[c]),
      .bcres_int, .bcres_lat, .bc_num, .start_next_orbit(cmd.run_next_orbit[c]),
      .gtl_out(gtl_out[c]), .tx_out(tx_all[c]),
      .clr_a(ser_clr_a[c]), .clr_b(ser_clr_b[c]), .cnt_a(ser_cnt_a[c]), .cnt_b(ser_cnt_b[c]),
      .vme_addr(mem_addr), .vme_we(mem_we[c]), .vme_re(mem_re[c]), .vme_wdata(mem_wdata),
      .vme_rdata(mem_rdata[c]), .spy_we(spy_we[c]), .sim_active(sim_act[c]),
      .ring_rd_en, .ring_rd_addr, .ring_rd_data(ring_ch_data[c]));
  end

  assign tx_out = tx_all[3:0];

  // bunch-number ring, written with the backplane words' clock
  logic [7:0] bx_wr_cnt;
  ring_buffer #(.W(BX_W), .DEPTH(256)) u_bx_ring (
    .clk, .rst, .wr_clr(bcres_int), .rd_clr(bcres_lat), .din(bc_num),
    .wr_cnt(bx_wr_cnt), .rd_cnt(ring_rd_cnt),
    .rd_en(ring_rd_en), .rd_addr(ring_rd_addr), .rd_data(ring_bx_data));

  // ---- BGo commands and readout -----------------------------------------
  logic       bgo_start, bgo_stop, bgo_res_orbitnr, bgo_hard_res;
  logic [3:0] bgo_user;

  robus_decoder u_robus (
    .clk, .rst, .en_robust(rop_setup.en_robust), .rdrqst(robus_rdrqst),
    .strobe(robus_strobe), .bx(robus_bx), .start_run(bgo_start), .stop_run(bgo_stop),
    .res_orbitnr(bgo_res_orbitnr), .hard_res(bgo_hard_res), .user_msg(bgo_user));

  logic l1res_int, run_flag;
  logic write_fifo, read_fifo, store_fifo_data, sclr_fifo, inc_event_nr;
  assign l1res_int = l1res_in | cmd.l1res_vme;

  rop u_rop (
    .clk, .rst, .l1a(l1a_in), .l1res(l1res_int), .evc_res(evcres_in | cmd.res_evnr_vme),
    .start_run(cmd.start_rop_vme | bgo_start), .stop_run(cmd.stop_rop_vme | bgo_stop),
    .reset_error_flag(cmd.reset_error_flag), .setup(rop_setup), .board_id, .idle_id,
    .ring_rd_cnt, .ring_rd_en, .ring_rd_addr, .ring_ch_data, .ring_bx_data,
    .chlink, .chlink_rec, .rop_status, .psb_status, .run_flag, .l1a_lost,
    .write_fifo, .read_fifo, .store_fifo_data, .sclr_fifo, .inc_event_nr);

  // ---- test points -------------------------------------------------------
  // Signal lists of TESTMASK0..6. Clocks, DCM lock and the per-clock phase
  // counter increments are not brought to the test points ('0); the VME
  // decode strobes of TESTMASK5/6 are replaced by the SIM/SPY memory strobes
  // and the command pulse where the table names them.
  logic [6:0][15:0] tsig;
  logic             res_orbnr;
  assign res_orbnr = cmd.res_orbitnr_vme | bgo_res_orbitnr;

  always_comb begin
    tsig = '0;
    tsig[0] = {1'b0, bcres_int, cmd.res_evnr_vme, cmd.run_next_orbit[0], cmd.l1res_vme,
               psb_status[0], 1'b0, chlink[24], write_fifo, bcres_lat, rop_status[11],
               rop_status[7], 4'h0};
    tsig[1] = {1'b0, bc_error, res_orbnr, sim_act[0], l1a_in,
               psb_status[1], 1'b0, chlink[25], read_fifo, bcres_int, rop_status[12],
               rop_status[8], 4'h0};
    tsig[2] = {1'b0, bcres_dly, l1res_int, spy_we[0], l1a_in,
               psb_status[2], bus_en & bus_wr, chlink[26], store_fifo_data, 1'b0,
               rop_status[14], rop_status[9], 4'h0};
    tsig[3] = {1'b0, bcres_lat, run_flag, gtl_out[0][15], l1a_in,
               psb_status[3], mem_we[0] | mem_re[0], chlink[27], sclr_fifo, inc_event_nr,
               rop_status[15], rop_status[10], psb_status};
    tsig[4] = '0;
    tsig[5] = {bus_en, bus_ack, mem_we[0], 9'h000,
               cmd.start_rop_vme, cmd.res_orbitnr_vme, cmd.res_evnr_vme, cmd.bcres_vme};
    tsig[6] = {bus_en, bus_wr, mem_re[0], 4'h0, |cmd, 4'h0,
               cmd.stop_rop_vme, cmd.reset_error_flag, cmd.res_bc_error, |cmd.run_next_orbit};
  end

  testpoint_mux #(.N(7)) u_tp (.clk, .rst, .mask(testmask), .sig(tsig), .tp(testpoint));

endmodule
