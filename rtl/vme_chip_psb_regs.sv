// Register set of the board's VME interface chip (VME-CHIP-PSB), and its
// forwarding of accesses to the PSB chip.
//
// The VME protocol engine (address modifiers, strobes, base address) hands
// each access over as a one-clock request: vme_req with vme_wr, the 24-bit
// board-window address vme_addr (A23..A1) and vme_wdata. The answer is a
// one-clock vme_dtack with vme_rdata, or vme_berr.
//
// Chip selection by A23..A20:
//   0000  registers of this chip (below)
//   0001  PSB chip: the access is passed on the PSB local bus (A19..A1) and
//         answered with DTACK when the PSB chip acknowledges, or with BERR
//         if it has not answered within PSB_TIMEOUT clocks (BERR PSB_TIMEOUT+1
//         clocks after the request)
//   other not used: BERR
// Own registers (byte offsets, data in D7..D0 unless stated):
//   0x00 CMD_ENPROG  D0 ENPROG_PSB, VME may send configuration bits
//   0x02 CMD_NPROG   D0 = 1 drives NPROG low (PSB chip restarts configuration)
//   0x04 CMD_INIT    D0 = 1 drives NINIT low
//   0x06 STAT_INIT   D0 NINIT pin (read)     0x08 STAT_DONE  D0 DONE pin (read)
//   0x0A CONF_PSB    write: D0 goes to DIN and one CCLK pulse follows, only
//                    when ENPROG_PSB is set
//   0x10 command pulses (write): D0 PWRDWN_PSB (NPWRDWN low), D1 RES_DCM_PSB,
//        D2 RESET_PSB (also from reset_mode), D3 SET_RUNNING
//   0x12 status (read): D1 CLK_LOCKED_PSB, D2 LOCKED_LED, D3 RUNNING
//   0x14 command register: D0 EN_CHLINK, D1 EN_ROBUS, D2 VME_CONF,
//        D3 V_SEL_CABLES, D4 V_SEL_BACKPL
//   0x16 status register (read): D0 EN_CHLINK active, D2 STATUS_SEL_VME,
//        D5 JTAG_JUMPER
//   0x20-0x26 chip_id bytes 3..0 = 0x00018x21 (x = card number jumpers)
//   0x28-0x2E version bytes 3..0 = 0x00001004
//   0x40 SERLINK0 (D15..0): SEND_SYNC_PATTERN[3:0], LINE_LOOPBACK[3:0],
//        TPWRDWN[3:0], ENTR[3:0]     0x42 SERLINK1: RPWRDWN[7:0], ENREC[7:0]
//   0x44 SERLINK2: LOCAL_LOOPBACK[7:0]   0x46 LOCKED[7:0] (read)
//   0x50 EN_TTIN (D15..0): enables of the parallel LVDS receivers
//   0x60-0x6E ERR_CNT_SERLINK_0..7 (read, cleared by the read)
// Writing a writable register or reading a readable one gives DTACK one
// clock after the request; any other access gives BERR. The JTAG controller
// registers (0x30-0x3E) are not part of this module and answer BERR.
//
// Outputs: command pulses last one clock; NPROG, NINIT, NPWRDWN, NEN_CHLINK,
// NEN_ROBUS, NTPWRDWN and NRPWRDWN are active low as on the board. EN_CHLINK
// enables the Channel Link chips only while the PSB chip's clock is locked.
// LOCKED_LED is on when the PSB clock is locked and every enabled receiver
// is locked. RUNNING is set by SET_RUNNING and cleared by reset. The JTAG
// chain selection follows the truth table: cables if V_SEL_CABLES or the
// jumper, else backplane if V_SEL_BACKPL, else VME.
//
// Register contents, addresses and the truth table follow the register
// description; the request/answer handshake, the one-clock pulse widths,
// the PSB time-out and the use of VME_CONF as STATUS_SEL_VME are this
// design's choices.
module vme_chip_psb_regs #(
  parameter int unsigned      PSB_TIMEOUT = 16,
  parameter logic [15:0]      CHIP_ID_HI  = 16'h0001,   // chip_id 0x00018x21
  parameter logic [7:0]       CHIP_ID_B1  = 8'h80,      // with x = card_nr
  parameter logic [7:0]       CHIP_ID_B0  = 8'h21,
  parameter logic [31:0]      VERSION     = 32'h0000_1004
) (
  input  logic        clk,
  input  logic        rst,
  // VME side
  input  logic        vme_req,
  input  logic        vme_wr,
  input  logic [23:1] vme_addr,
  input  logic [15:0] vme_wdata,
  output logic [15:0] vme_rdata,
  output logic        vme_dtack,
  output logic        vme_berr,
  // local bus to the PSB chip
  output logic        psb_bus_en,
  output logic        psb_bus_wr,
  output logic [19:1] psb_bus_addr,
  output logic [15:0] psb_bus_wdata,
  input  logic [15:0] psb_bus_rdata,
  input  logic        psb_bus_ack,
  // PSB chip configuration
  output logic        enprog,
  output logic        nprog,
  output logic        ninit_drv,
  input  logic        ninit_pin,
  input  logic        done_pin,
  output logic        conf_din,
  output logic        conf_cclk,
  // pulses and status
  output logic        npwrdwn,
  output logic        res_dcm,
  output logic        reset_psb,
  input  logic        reset_mode,
  input  logic        clk_locked_psb,
  output logic        locked_led,
  output logic        running,
  // general command and status
  output logic        nen_chlink,
  output logic        nen_robus,
  output logic        vme_conf,
  output logic        jtag_sel_cables,
  output logic        jtag_sel_backpl,
  input  logic        jtag_jumper,
  input  logic [3:0]  card_nr,
  // serial-link chips
  output logic [3:0]  send_sync,
  output logic [3:0]  line_loopback,
  output logic [3:0]  ntpwrdwn,
  output logic [3:0]  entr,
  output logic [7:0]  nrpwrdwn,
  output logic [7:0]  enrec,
  output logic [7:0]  local_loopback,
  input  logic [7:0]  locked,
  // LVDS receiver enables
  output logic [15:0] en_ttin
);

  // ---- decode ----------------------------------------------------------------
  logic [3:0] chip_sel;
  logic [7:0] off;          // byte offset of an own register
  logic       own, to_psb, own_hit_hi;
  assign chip_sel   = vme_addr[23:20];
  assign off        = {vme_addr[7:1], 1'b0};
  assign own_hit_hi = (vme_addr[19:8] == '0);
  assign own        = (chip_sel == 4'h0) && own_hit_hi;
  assign to_psb     = (chip_sel == 4'h1);

  // writable and readable offsets
  function automatic logic is_wr(input logic [7:0] a);
    unique case (a)
      8'h00, 8'h02, 8'h04, 8'h0A, 8'h10, 8'h14, 8'h40, 8'h42, 8'h44, 8'h50: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction
  function automatic logic is_rd(input logic [7:0] a);
    if (a >= 8'h20 && a <= 8'h2E) return 1'b1;
    if (a >= 8'h60 && a <= 8'h6E) return 1'b1;
    unique case (a)
      8'h00, 8'h02, 8'h04, 8'h06, 8'h08, 8'h12, 8'h14, 8'h16,
      8'h40, 8'h42, 8'h44, 8'h46, 8'h50: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  logic wr_own, rd_own;
  assign wr_own = vme_req && vme_wr && own && is_wr(off);
  assign rd_own = vme_req && !vme_wr && own && is_rd(off);

  // ---- registers ---------------------------------------------------------------
  logic        en_chlink, en_robus, v_sel_cables, v_sel_backpl;
  logic        cmd_nprog, cmd_init;
  logic [15:0] serlink0, serlink1, serlink2;
  logic        cclk_pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      enprog       <= 1'b0;
      cmd_nprog    <= 1'b0;
      cmd_init     <= 1'b0;
      en_chlink    <= 1'b0;
      en_robus     <= 1'b0;
      vme_conf     <= 1'b0;
      v_sel_cables <= 1'b0;
      v_sel_backpl <= 1'b0;
      serlink0     <= '0;
      serlink1     <= '0;
      serlink2     <= '0;
      en_ttin      <= '0;
      conf_din     <= 1'b0;
      cclk_pend    <= 1'b0;
      conf_cclk    <= 1'b0;
    end else begin
      // CCLK one clock after DIN is set up
      conf_cclk <= cclk_pend;
      cclk_pend <= 1'b0;
      if (wr_own) begin
        unique case (off)
          8'h00: enprog    <= vme_wdata[0];
          8'h02: cmd_nprog <= vme_wdata[0];
          8'h04: cmd_init  <= vme_wdata[0];
          8'h0A: if (enprog) begin
                   conf_din  <= vme_wdata[0];
                   cclk_pend <= 1'b1;
                 end
          8'h14: begin
                   en_chlink    <= vme_wdata[0];
                   en_robus     <= vme_wdata[1];
                   vme_conf     <= vme_wdata[2];
                   v_sel_cables <= vme_wdata[3];
                   v_sel_backpl <= vme_wdata[4];
                 end
          8'h40: serlink0 <= vme_wdata;
          8'h42: serlink1 <= vme_wdata;
          8'h44: serlink2 <= {8'h00, vme_wdata[7:0]};
          8'h50: en_ttin  <= vme_wdata;
          default: ;
        endcase
      end
    end
  end

  assign nprog     = !cmd_nprog;
  assign ninit_drv = !cmd_init;

  // ---- command pulses ------------------------------------------------------------
  logic pulse_wr;
  assign pulse_wr = wr_own && (off == 8'h10);

  always_ff @(posedge clk) begin
    if (rst) begin
      npwrdwn   <= 1'b1;
      res_dcm   <= 1'b0;
      reset_psb <= 1'b0;
      running   <= 1'b0;
    end else begin
      npwrdwn   <= !(pulse_wr && vme_wdata[0]);
      res_dcm   <= pulse_wr && vme_wdata[1];
      reset_psb <= (pulse_wr && vme_wdata[2]) || reset_mode;
      if (pulse_wr && vme_wdata[3]) running <= 1'b1;
    end
  end

  // ---- serial links ----------------------------------------------------------------
  assign send_sync      = serlink0[15:12];
  assign line_loopback  = serlink0[11:8];
  assign ntpwrdwn       = ~serlink0[7:4];
  assign entr           = serlink0[3:0];
  assign nrpwrdwn       = ~serlink1[15:8];
  assign enrec          = serlink1[7:0];
  assign local_loopback = serlink2[7:0];

  logic [7:0]      locked_sync, err_clr;
  logic [7:0][7:0] err_cnt;

  always_comb begin
    err_clr = '0;
    if (rd_own && off >= 8'h60 && off <= 8'h6E) err_clr[off[3:1]] = 1'b1;
  end

  serlink_err_cnt #(.N(8)) u_err (
    .clk, .rst, .locked, .enrec, .clr(err_clr), .locked_sync, .cnt(err_cnt));

  // ---- status and general outputs ----------------------------------------------------
  assign locked_led      = clk_locked_psb && (&(locked_sync | ~enrec));
  assign nen_chlink      = !(en_chlink && clk_locked_psb);
  assign nen_robus       = !en_robus;
  assign jtag_sel_cables = v_sel_cables || jtag_jumper;
  assign jtag_sel_backpl = !jtag_sel_cables && v_sel_backpl;

  function automatic logic [15:0] rd_value(input logic [7:0] a);
    logic [31:0] cid;
    cid = {CHIP_ID_HI, CHIP_ID_B1 | {4'h0, card_nr}, CHIP_ID_B0};
    if (a >= 8'h60 && a <= 8'h6E) return {8'h00, err_cnt[a[3:1]]};
    unique case (a)
      8'h00: return {15'd0, enprog};
      8'h02: return {15'd0, cmd_nprog};
      8'h04: return {15'd0, cmd_init};
      8'h06: return {15'd0, ninit_pin};
      8'h08: return {15'd0, done_pin};
      8'h12: return {12'd0, running, locked_led, clk_locked_psb, 1'b0};
      8'h14: return {11'd0, v_sel_backpl, v_sel_cables, vme_conf, en_robus, en_chlink};
      8'h16: return {10'd0, jtag_jumper, 2'b00, vme_conf, 1'b0, !nen_chlink};
      8'h20: return {8'h00, cid[31:24]};
      8'h22: return {8'h00, cid[23:16]};
      8'h24: return {8'h00, cid[15:8]};
      8'h26: return {8'h00, cid[7:0]};
      8'h28: return {8'h00, VERSION[31:24]};
      8'h2A: return {8'h00, VERSION[23:16]};
      8'h2C: return {8'h00, VERSION[15:8]};
      8'h2E: return {8'h00, VERSION[7:0]};
      8'h40: return serlink0;
      8'h42: return serlink1;
      8'h44: return serlink2;
      8'h46: return {8'h00, locked_sync};
      8'h50: return en_ttin;
      default: return 16'h0000;
    endcase
  endfunction

  // ---- answers ---------------------------------------------------------------------
  localparam int unsigned TW = $clog2(PSB_TIMEOUT + 1);
  logic          psb_busy;
  logic [TW-1:0] psb_timer;

  assign psb_bus_en    = vme_req && to_psb && !psb_busy;
  assign psb_bus_wr    = vme_wr;
  assign psb_bus_addr  = vme_addr[19:1];
  assign psb_bus_wdata = vme_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      vme_dtack <= 1'b0;
      vme_berr  <= 1'b0;
      vme_rdata <= '0;
      psb_busy  <= 1'b0;
      psb_timer <= '0;
    end else begin
      vme_dtack <= 1'b0;
      vme_berr  <= 1'b0;
      if (psb_busy) begin
        if (psb_bus_ack) begin
          vme_dtack <= 1'b1;
          vme_rdata <= psb_bus_rdata;
          psb_busy  <= 1'b0;
        end else if (psb_timer == TW'(PSB_TIMEOUT - 1)) begin
          vme_berr <= 1'b1;
          psb_busy <= 1'b0;
        end else begin
          psb_timer <= psb_timer + 1'b1;
        end
      end else if (vme_req) begin
        if (to_psb) begin
          psb_busy  <= 1'b1;
          psb_timer <= '0;
        end else if (wr_own) begin
          vme_dtack <= 1'b1;
        end else if (rd_own) begin
          vme_dtack <= 1'b1;
          vme_rdata <= rd_value(off);
        end else begin
          vme_berr <= 1'b1;
        end
      end
    end
  end

endmodule
