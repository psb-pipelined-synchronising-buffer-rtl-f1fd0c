// The logic of the PSB board: the PSB synchronising chip, the board's VME
// interface chip (VME-CHIP-PSB) and the CR/CSR space of its VME64x chip,
// connected as on the board.
//
// Connections made here:
//   * VME accesses reach vme_chip_psb_regs; those with A23..A20 = 0001 are
//     passed on the local bus to the PSB chip's register file.
//   * The PSB chip is reset by the board reset or by the VME chip's
//     RESET_PSB pulse (command pulse D2, or RESET_MODE, which is bit 7 of
//     the VME64x bit set/clear registers).
//   * A BERR answer of the VME chip sets the VME64x BERR flag.
//   * The VME64x chip's CR/CSR accesses (csr_*), its base-address decode of
//     data accesses (acc_*, f0_sel, f1_sel) and its test outputs are ports:
//     the VME protocol engine that uses them is outside this RTL.
//   * The parallel LVDS receivers: receiver g drives LVDS bits 4g..4g+3 and,
//     while disabled in the EN_TTIN register, sends 1111. Because the LVDS
//     lines are negative logic, a disabled receiver delivers zeros to the
//     PSB chip's trigger data.
// All other PSB-chip signals (sample inputs, backplane signals, ROBUS,
// outputs) and the VME chip's pins towards the configuration interface,
// serial-link chips, Channel Link, JTAG selection and LEDs are ports of
// this module. Timing: a VME access to the PSB chip is answered three clocks
// after the request (two-clock local bus plus the forwarding), an access to
// a VME-chip register one clock after it.
//
// The EN_TTIN meaning and the 1111 of disabled receivers follow the register
// description; the assignment of receiver g to bits 4g..4g+3 and the reset
// combination are this design's choices.
module psb_board
  import psb_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst,
  // PSB chip sample inputs
  input  logic [N_CHAN-1:0][1:0][3:0][WORD_W-1:0]   ser_samp,
  input  logic [3:0][N_LVDS-1:0]                    lvds_samp_n,
  input  logic                                      tt_edge_en,
  // backplane timing signals
  input  logic                                      bcres_in,
  input  logic                                      l1a_in,
  input  logic                                      l1res_in,
  input  logic                                      evcres_in,
  // ROBUS
  input  logic                                      robus_rdrqst,
  input  logic [2:0]                                robus_strobe,
  input  logic [11:0]                               robus_bx,
  // VME side of the VME chip
  input  logic                                      vme_req,
  input  logic                                      vme_wr,
  input  logic [23:1]                               vme_addr,
  input  logic [15:0]                               vme_wdata,
  output logic [15:0]                               vme_rdata,
  output logic                                      vme_dtack,
  output logic                                      vme_berr,
  // PSB chip outputs
  output logic [N_CHAN-1:0][CHW-1:0]                gtl_out,
  output logic [3:0][CHW-1:0]                       tx_out,
  output logic [CL_W-1:0]                           chlink,
  output logic                                      chlink_rec,
  output logic [3:0]                                psb_status,
  output logic                                      bcres_out,
  output logic                                      l1a_lost,
  output logic [6:0]                                testpoint,
  // VME chip pins
  output logic                                      enprog,
  output logic                                      nprog,
  output logic                                      ninit_drv,
  input  logic                                      ninit_pin,
  input  logic                                      done_pin,
  output logic                                      conf_din,
  output logic                                      conf_cclk,
  output logic                                      npwrdwn,
  output logic                                      res_dcm,
  input  logic                                      clk_locked_psb,
  output logic                                      locked_led,
  output logic                                      running,
  output logic                                      nen_chlink,
  output logic                                      nen_robus,
  output logic                                      vme_conf,
  output logic                                      jtag_sel_cables,
  output logic                                      jtag_sel_backpl,
  input  logic                                      jtag_jumper,
  input  logic [3:0]                                card_nr,
  output logic [3:0]                                send_sync,
  output logic [3:0]                                line_loopback,
  output logic [3:0]                                ntpwrdwn,
  output logic [3:0]                                entr,
  output logic [7:0]                                nrpwrdwn,
  output logic [7:0]                                enrec,
  output logic [7:0]                                local_loopback,
  input  logic [7:0]                                locked,
  // VME64x chip: CR/CSR space, function decode, test outputs
  input  logic [4:0]                                ga,
  input  logic                                      csr_req,
  input  logic                                      csr_wr,
  input  logic [23:0]                               csr_addr,
  input  logic [7:0]                                csr_wdata,
  output logic [7:0]                                csr_rdata,
  output logic                                      csr_ack,
  input  logic [5:0]                                acc_am,
  input  logic [31:25]                              acc_addr,
  output logic                                      f0_sel,
  output logic                                      f1_sel,
  output logic                                      module_enabled,
  output logic                                      berr_flag,
  input  logic [14:0]                               test_sig,
  output logic [3:0]                                test_out
);

  logic reset_mode;

  vme64x_cr_csr u_csr (
    .clk, .rst, .ga, .card_nr, .csr_req, .csr_wr, .csr_addr, .csr_wdata, .csr_rdata, .csr_ack,
    .acc_am, .acc_addr, .f0_sel, .f1_sel, .berr_seen(vme_berr), .module_enabled, .reset_mode,
    .berr_flag, .test_sig, .test_out);

  logic        bus_en, bus_wr, bus_ack, reset_psb;
  logic [19:1] bus_addr;
  logic [15:0] bus_wdata, bus_rdata, en_ttin;

  vme_chip_psb_regs u_vme (
    .clk, .rst, .vme_req, .vme_wr, .vme_addr, .vme_wdata, .vme_rdata, .vme_dtack, .vme_berr,
    .psb_bus_en(bus_en), .psb_bus_wr(bus_wr), .psb_bus_addr(bus_addr),
    .psb_bus_wdata(bus_wdata), .psb_bus_rdata(bus_rdata), .psb_bus_ack(bus_ack),
    .enprog, .nprog, .ninit_drv, .ninit_pin, .done_pin, .conf_din, .conf_cclk,
    .npwrdwn, .res_dcm, .reset_psb, .reset_mode, .clk_locked_psb, .locked_led, .running,
    .nen_chlink, .nen_robus, .vme_conf, .jtag_sel_cables, .jtag_sel_backpl, .jtag_jumper,
    .card_nr, .send_sync, .line_loopback, .ntpwrdwn, .entr, .nrpwrdwn, .enrec,
    .local_loopback, .locked, .en_ttin);

  // parallel LVDS receivers: disabled ones send 1111
  logic [3:0][N_LVDS-1:0] lvds_rx_n;
  always_comb begin
    for (int p = 0; p < 4; p++)
      for (int b = 0; b < N_LVDS; b++)
        lvds_rx_n[p][b] = lvds_samp_n[p][b] | !en_ttin[b / 4];
  end

  psb_chip u_psb (
    .clk, .rst(rst || reset_psb), .ser_samp, .lvds_samp_n(lvds_rx_n), .tt_edge_en,
    .bcres_in, .l1a_in, .l1res_in, .evcres_in, .robus_rdrqst, .robus_strobe, .robus_bx,
    .bus_en, .bus_wr, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .gtl_out, .tx_out, .chlink, .chlink_rec, .psb_status, .bcres_out, .l1a_lost, .testpoint);

endmodule
